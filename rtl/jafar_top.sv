// jafar_top: a DDR3 DIMM rank with the JAFAR select accelerator on it.
//
// Ties together, as on the module: the clock generator that doubles the
// data-bus clock for the accelerator; the memory access arbiter that takes
// memory requests from the host CPU and from JAFAR and drives the rank's
// RAS/CAS commands according to rank ownership; the IO buffer that turns each
// 512-bit prefetch into eight 64-bit words; and the JAFAR core. Words from the
// IO buffer go to the host data bus when the read was the CPU's and to JAFAR
// when it was JAFAR's.
// The DRAM arrays and sense amplifiers, and the host CPU, are not part of this
// RTL: the command bus towards the arrays, the 512-bit read return from them,
// the CPU request port, the host data bus and JAFAR's register bus are ports.
// All synchronous logic runs on jafar_clk (brought out for the DRAM and host
// side); the host ports are taken to be synchronous to it as well, which is a
// simplification of this implementation. jafar_clkgen is a behavioural model;
// synthesized as it stands, it yields a constant clock and all logic behind
// it is optimised away, so a netlist of this top needs a real PLL/DLL there.
module jafar_top
  import jafar_pkg::*;
#(
  parameter int unsigned CLK_HIGH_TIME = 250   // quarter bus-clock period
) (
  input  logic                  bus_clk,
  input  logic                  rst_n,          // synchronous to jafar_clk
  output logic                  jafar_clk,
  // rank ownership, set by the host's query execution manager
  input  logic                  jafar_owns_rank,
  // host register bus of JAFAR
  input  logic                  reg_we,
  input  logic [3:0]            reg_addr,
  input  logic [DATA_W-1:0]     reg_wdata,
  output logic [DATA_W-1:0]     reg_rdata,
  output logic                  jafar_busy,
  // host CPU memory requests and read data
  input  logic                  cpu_req_valid,
  output logic                  cpu_req_ready,
  input  mem_req_t              cpu_req,
  output logic                  host_rsp_valid,
  output logic [DATA_W-1:0]     host_rsp_data,
  // DRAM array command bus and read return
  output dram_cmd_e             dram_cmd,
  output logic [BANK_W-1:0]     dram_bank,
  output logic [ROW_W-1:0]      dram_row,
  output logic [COL_W-1:0]      dram_col,
  output logic [DATA_W-1:0]     dram_wdata,
  output logic [DATA_W-1:0]     dram_wmask,
  input  logic                  dram_rvalid,
  input  logic [BURST_BITS-1:0] dram_rdata
);

  logic              jf_req_valid, jf_req_ready;
  mem_req_t          jf_req;
  logic              rsp_tag;
  logic              io_valid, io_tag, io_last;
  logic [DATA_W-1:0] io_data;
  logic              jf_done;

  jafar_clkgen #(.HIGH_TIME(CLK_HIGH_TIME)) u_clkgen (
    .bus_clk, .clk_2x(jafar_clk)
  );

  jafar_mem_arbiter u_arb (
    .clk(jafar_clk), .rst_n,
    .jafar_owns_rank,
    .cpu_req_valid, .cpu_req_ready, .cpu_req,
    .jf_req_valid, .jf_req_ready, .jf_req,
    .cmd(dram_cmd), .cmd_bank(dram_bank), .cmd_row(dram_row), .cmd_col(dram_col),
    .cmd_wdata(dram_wdata), .cmd_wmask(dram_wmask),
    .rsp_arrive(dram_rvalid), .rsp_tag
  );

  jafar_io_buffer #(.TAG_W(1)) u_iobuf (
    .clk(jafar_clk), .rst_n,
    .load(dram_rvalid), .load_data(dram_rdata), .load_tag(rsp_tag),
    .out_valid(io_valid), .out_data(io_data), .out_tag(io_tag), .out_last(io_last)
  );

  assign host_rsp_valid = io_valid && !io_tag;
  assign host_rsp_data  = io_data;

  jafar_core u_jafar (
    .clk(jafar_clk), .rst_n,
    .reg_we, .reg_addr, .reg_wdata, .reg_rdata,
    .req_valid(jf_req_valid), .req_ready(jf_req_ready), .req(jf_req),
    .rsp_valid(io_valid && io_tag), .rsp_data(io_data),
    .busy(jafar_busy), .done(jf_done)
  );

  // burst boundaries and the completion pulse are observed only in simulation
  logic unused;
  assign unused = io_last ^ jf_done;

endmodule
