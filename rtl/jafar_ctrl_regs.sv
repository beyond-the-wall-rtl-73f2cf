// jafar_ctrl_regs: memory-mapped control registers of the select accelerator.
//
// The host programs one select call through these registers: the address of
// the column page (col_data), the number of rows, the two predicate operands
// and opcodes (range_low with GE on the left ALU, range_high with LE on the
// right one for an inclusive range), the address of the output bitset
// (out_buf) and the address of the completion word it polls. Writing 1 to
// bit 0 of CTRL starts the call; configuration writes are ignored while the
// accelerator is busy, so the sequencer sees stable values. STATUS reads back
// busy (bit 0), done (bit 1, sticky until the next start) and the output
// buffer overflow flag (bit 2). INTERLEAVE describes how the column is spread
// over several modules (see jafar_page_offset_counter).
// Control through memory-mapped registers and the API arguments follow the
// design description; the register map (jafar_pkg::REG_*), the simple
// single-cycle register bus and reset values are this implementation's own.
// Timing: writes take effect at the clock edge with reg_we high; reads are
// combinational from reg_addr.
module jafar_ctrl_regs
  import jafar_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  // host register bus (64-bit word addressed)
  input  logic              reg_we,
  input  logic [3:0]        reg_addr,
  input  logic [DATA_W-1:0] reg_wdata,
  output logic [DATA_W-1:0] reg_rdata,
  // towards the accelerator
  output jafar_cfg_t        cfg,
  output logic              start,
  input  logic              busy,
  input  logic              done,
  input  logic              overflow
);

  logic done_q;
  logic wr_ok;

  assign wr_ok = reg_we && !busy;
  assign start = wr_ok && (reg_addr == REG_CTRL) && reg_wdata[0];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cfg <= '{left_op: OP_ANY, right_op: OP_ANY, default: '0};
    end else if (wr_ok) begin
      unique case (reg_addr)
        REG_COL_ADDR:  cfg.col_addr  <= reg_wdata[ADDR_W-1:0];
        REG_NUM_ROWS:  cfg.num_rows  <= reg_wdata[31:0];
        REG_LEFT_VAL:  cfg.left_val  <= reg_wdata;
        REG_RIGHT_VAL: cfg.right_val <= reg_wdata;
        REG_OPCODES: begin
          cfg.left_op  <= cmp_op_e'(reg_wdata[2:0]);
          cfg.right_op <= cmp_op_e'(reg_wdata[10:8]);
        end
        REG_OUT_ADDR:  cfg.out_addr  <= reg_wdata[ADDR_W-1:0];
        REG_DONE_ADDR: cfg.done_addr <= reg_wdata[ADDR_W-1:0];
        REG_INTERLEAVE: begin
          cfg.ilv_shift <= reg_wdata[ILV_SHIFT_W-1:0];
          cfg.ilv_phase <= reg_wdata[4 +: ILV_PHASE_W];
        end
        default: ;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n || start) done_q <= 1'b0;
    else if (done)       done_q <= 1'b1;
  end

  always_comb begin
    reg_rdata = '0;
    unique case (reg_addr)
      REG_STATUS:    reg_rdata = {61'd0, overflow, done_q, busy};
      REG_COL_ADDR:  reg_rdata = DATA_W'(cfg.col_addr);
      REG_NUM_ROWS:  reg_rdata = DATA_W'(cfg.num_rows);
      REG_LEFT_VAL:  reg_rdata = cfg.left_val;
      REG_RIGHT_VAL: reg_rdata = cfg.right_val;
      REG_OPCODES:   reg_rdata = {53'd0, cfg.right_op, 5'd0, cfg.left_op};
      REG_OUT_ADDR:  reg_rdata = DATA_W'(cfg.out_addr);
      REG_DONE_ADDR: reg_rdata = DATA_W'(cfg.done_addr);
      REG_INTERLEAVE: reg_rdata = {57'd0, cfg.ilv_phase, 2'd0, cfg.ilv_shift};
      default:       reg_rdata = '0;
    endcase
  end

endmodule
