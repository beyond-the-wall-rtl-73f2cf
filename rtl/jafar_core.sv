// jafar_core: JAFAR ("Just A Filtering Accelerator on Relations"), the
// near-memory select unit that sits on the DIMM next to the DRAM chips.
//
// The host programs a select call through memory-mapped registers (column
// page address, row count, two predicate operands and opcodes, output and
// completion addresses) and starts it. The request sequencer then reads the
// column burst by burst through the memory access arbiter, exactly like a CPU
// would, and each 64-bit word coming out of the DRAM IO buffer passes through
// the filter datapath at one word per clock: data latch, two ALUs in parallel,
// and an output bitset with one bit per row. Filled bitsets are written back
// to DRAM at the programmed location without stalling the filter, and when the
// last one is written a completion word is stored for the host to poll.
// Everything but the register bus runs on the JAFAR clock (twice the data-bus
// clock). Structure and behaviour follow the design description; the
// register map, request handshake and bitset size of 64 rows are this
// implementation's own.
module jafar_core
  import jafar_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  // host register bus
  input  logic              reg_we,
  input  logic [3:0]        reg_addr,
  input  logic [DATA_W-1:0] reg_wdata,
  output logic [DATA_W-1:0] reg_rdata,
  // memory requests towards the arbiter
  output logic              req_valid,
  input  logic              req_ready,
  output mem_req_t          req,
  // read data words from the IO buffer (this requester's only)
  input  logic              rsp_valid,
  input  logic [DATA_W-1:0] rsp_data,
  // status
  output logic              busy,
  output logic              done
);

  localparam int unsigned CNT_W = 32;

  jafar_cfg_t        cfg;
  logic              start, overflow;
  logic              dp_clear, dp_valid, dp_last;
  logic [DATA_W-1:0] dp_data;
  logic              wb_valid, wb_ready, wb_last;
  logic [DATA_W-1:0] wb_bits, wb_mask;
  logic [CNT_W-1:0]  wb_index;

  jafar_ctrl_regs u_regs (
    .clk, .rst_n,
    .reg_we, .reg_addr, .reg_wdata, .reg_rdata,
    .cfg, .start, .busy, .done, .overflow
  );

  jafar_controller #(.CNT_W(CNT_W)) u_ctrl (
    .clk, .rst_n,
    .start, .cfg, .busy, .done,
    .req_valid, .req_ready, .req,
    .rsp_valid, .rsp_data,
    .dp_clear, .dp_valid, .dp_last, .dp_data,
    .wb_valid, .wb_ready, .wb_bits, .wb_mask, .wb_index, .wb_last
  );

  jafar_datapath #(.N_BITS(DATA_W), .CNT_W(CNT_W)) u_dp (
    .clk, .rst_n,
    .clear(dp_clear),
    .in_valid(dp_valid), .in_last(dp_last), .in_data(dp_data),
    .left_val(cfg.left_val), .left_op(cfg.left_op),
    .right_val(cfg.right_val), .right_op(cfg.right_op),
    .ilv_shift(cfg.ilv_shift), .ilv_phase(cfg.ilv_phase),
    .wb_valid, .wb_ready, .wb_bits, .wb_mask, .wb_index, .wb_last, .overflow
  );

endmodule
