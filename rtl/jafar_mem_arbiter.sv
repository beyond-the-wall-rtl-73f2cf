// jafar_mem_arbiter: memory access arbiter in front of one DRAM rank.
//
// Two requesters share the rank: the host CPU and the JAFAR accelerator.
// Access follows rank ownership: while jafar_owns_rank is high (the host has
// handed the rank to the accelerator, e.g. by enabling the MR3 multipurpose
// register so that its own memory controller can no longer issue reads and
// writes) only accelerator requests are taken and the CPU is held off;
// otherwise only CPU requests are taken. An accepted request is decoded into
// bank, row and column and turned into DRAM commands with an open-row
// policy:
//   row already open in the bank  -> RD/WR (CAS) only (row hit)
//   other row open                -> PRE, wait tRP, ACT (RAS), wait tRCD, CAS
//   bank closed                   -> ACT, wait tRCD, CAS
// PRE also waits until tRAS has passed since the bank's last ACT, and two CAS
// commands are at least T_CCD clocks apart. The design description defines CL
// as that minimum CAS-to-CAS delay and also speaks of a CAS latency of about
// 13 ns; both are honoured here with the same 26-clock value: T_CCD spaces
// the CAS commands and the DRAM returns read data CL clocks after RD.
// A read returns its 512-bit burst CL clocks after RD (counted by the DRAM);
// a small FIFO remembers which requester each outstanding read belongs to,
// and rsp_tag gives the owner of the burst arriving now (1 = JAFAR).
// The arbiter, RAS/CAS decoding, the four DRAM timing parameters and rank
// ownership follow the design description. The address map (8 KB rows,
// 8 banks above the column bits), the single-word masked write, the
// values of the timing parameters (in 2 GHz JAFAR clocks: tRCD = tRP = 26,
// about 13 ns; tRAS = 70, 35 ns) and all interface details are this
// implementation's choices.
// Interface timing: a request is taken in the clock where *_req_valid and
// *_req_ready are both high; commands are registered outputs valid for one
// clock.
module jafar_mem_arbiter
  import jafar_pkg::*;
#(
  parameter int unsigned T_RCD   = 26,
  parameter int unsigned T_RP    = 26,
  parameter int unsigned T_RAS   = 70,
  parameter int unsigned T_CCD   = 26,   // CL as CAS-to-CAS delay, 13 ns
  parameter int unsigned TAG_DEPTH = 8
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              jafar_owns_rank,
  // CPU side
  input  logic              cpu_req_valid,
  output logic              cpu_req_ready,
  input  mem_req_t          cpu_req,
  // accelerator side
  input  logic              jf_req_valid,
  output logic              jf_req_ready,
  input  mem_req_t          jf_req,
  // DRAM command bus
  output dram_cmd_e         cmd,
  output logic [BANK_W-1:0] cmd_bank,
  output logic [ROW_W-1:0]  cmd_row,
  output logic [COL_W-1:0]  cmd_col,
  output logic [DATA_W-1:0] cmd_wdata,
  output logic [DATA_W-1:0] cmd_wmask,
  // read return routing
  input  logic              rsp_arrive,   // a read burst arrives from the array
  output logic              rsp_tag       // its owner: 1 = JAFAR, 0 = CPU
);

  typedef enum logic [1:0] {S_IDLE, S_PRE, S_ACT, S_CAS} state_e;

  localparam int unsigned TW = 8;
  localparam int unsigned PW = $clog2(TAG_DEPTH);

  state_e            state;
  mem_req_t          cur;
  logic              cur_jf;
  logic [BANK_W-1:0] bank;
  logic [ROW_W-1:0]  row;
  logic [COL_W-1:0]  col;
  logic [TW-1:0]     wait_cnt, ccd_cnt;
  logic [TW-1:0]     ras_cnt [2**BANK_W];
  logic              open_q  [2**BANK_W];
  logic [ROW_W-1:0]  open_row[2**BANK_W];

  // owner FIFO of outstanding reads
  logic [TAG_DEPTH-1:0] tag_mem;
  logic [PW-1:0]        wr_ptr, rd_ptr;
  logic [PW:0]          tag_cnt;
  logic                 tag_full, push;

  logic     take;
  mem_req_t sel;
  logic     sel_valid;

  assign tag_full = (tag_cnt == (PW+1)'(TAG_DEPTH));

  always_comb begin
    sel       = jafar_owns_rank ? jf_req : cpu_req;
    sel_valid = jafar_owns_rank ? jf_req_valid : cpu_req_valid;
  end

  assign take          = (state == S_IDLE) && sel_valid && !tag_full;
  assign jf_req_ready  = (state == S_IDLE) && !tag_full && jafar_owns_rank;
  assign cpu_req_ready = (state == S_IDLE) && !tag_full && !jafar_owns_rank;

  // address decode of a byte address: | row | bank | column | byte in word |
  function automatic logic [BANK_W-1:0] f_bank(logic [ADDR_W-1:0] a);
    return a[3+COL_W +: BANK_W];
  endfunction
  function automatic logic [ROW_W-1:0] f_row(logic [ADDR_W-1:0] a);
    return a[3+COL_W+BANK_W +: ROW_W];
  endfunction
  function automatic logic [COL_W-1:0] f_col(logic [ADDR_W-1:0] a);
    return a[3 +: COL_W];
  endfunction

  assign push = (state == S_CAS) && (wait_cnt == '0) && (ccd_cnt == '0) && !cur.we;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      cur       <= '0;
      cur_jf    <= 1'b0;
      bank      <= '0;
      row       <= '0;
      col       <= '0;
      wait_cnt  <= '0;
      ccd_cnt   <= '0;
      cmd       <= CMD_NOP;
      cmd_bank  <= '0;
      cmd_row   <= '0;
      cmd_col   <= '0;
      cmd_wdata <= '0;
      cmd_wmask <= '0;
      for (int b = 0; b < 2**BANK_W; b++) begin
        open_q[b]   <= 1'b0;
        open_row[b] <= '0;
        ras_cnt[b]  <= '0;
      end
    end else begin
      cmd <= CMD_NOP;
      if (wait_cnt != '0) wait_cnt <= wait_cnt - 1'b1;
      if (ccd_cnt  != '0) ccd_cnt  <= ccd_cnt - 1'b1;
      for (int b = 0; b < 2**BANK_W; b++)
        if (ras_cnt[b] != '0) ras_cnt[b] <= ras_cnt[b] - 1'b1;

      unique case (state)
        S_IDLE: if (take) begin
          cur    <= sel;
          cur_jf <= jafar_owns_rank;
          bank   <= f_bank(sel.addr);
          row    <= f_row(sel.addr);
          col    <= f_col(sel.addr);
          if (open_q[f_bank(sel.addr)] && open_row[f_bank(sel.addr)] == f_row(sel.addr))
            state <= S_CAS;
          else if (open_q[f_bank(sel.addr)])
            state <= S_PRE;
          else
            state <= S_ACT;
        end
        S_PRE: if (wait_cnt == '0 && ras_cnt[bank] == '0) begin
          cmd          <= CMD_PRE;
          cmd_bank     <= bank;
          open_q[bank] <= 1'b0;
          wait_cnt     <= TW'(T_RP - 1);
          state        <= S_ACT;
        end
        S_ACT: if (wait_cnt == '0) begin
          cmd            <= CMD_ACT;
          cmd_bank       <= bank;
          cmd_row        <= row;
          open_q[bank]   <= 1'b1;
          open_row[bank] <= row;
          ras_cnt[bank]  <= TW'(T_RAS - 1);
          wait_cnt       <= TW'(T_RCD - 1);
          state          <= S_CAS;
        end
        S_CAS: if (wait_cnt == '0 && ccd_cnt == '0) begin
          cmd       <= cur.we ? CMD_WR : CMD_RD;
          cmd_bank  <= bank;
          cmd_row   <= row;
          cmd_col   <= col;
          cmd_wdata <= cur.wdata;
          cmd_wmask <= cur.wmask;
          ccd_cnt   <= TW'(T_CCD - 1);
          state     <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // owner FIFO: pushed at RD, popped when the burst arrives
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      tag_mem <= '0;
      wr_ptr  <= '0;
      rd_ptr  <= '0;
      tag_cnt <= '0;
    end else begin
      if (push) begin
        tag_mem[wr_ptr] <= cur_jf;
        wr_ptr          <= wr_ptr + 1'b1;
      end
      if (rsp_arrive) rd_ptr <= rd_ptr + 1'b1;
      tag_cnt <= tag_cnt + (PW+1)'(push) - (PW+1)'(rsp_arrive);
    end
  end

  assign rsp_tag = tag_mem[rd_ptr];

  a_no_orphan_data: assert property (@(posedge clk) disable iff (!rst_n)
    rsp_arrive |-> tag_cnt != '0);

endmodule
