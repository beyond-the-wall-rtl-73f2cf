// tb_jafar_ctrl_regs: writes every configuration register and reads it back,
// checks the decoded configuration (interleave setting included), the start pulse, that writes are ignored
// while busy, and the sticky done bit in STATUS.
module tb_jafar_ctrl_regs;
  import jafar_pkg::*;

  logic clk = 0, rst_n = 0;
  logic reg_we, start, busy, done, overflow;
  logic [3:0] reg_addr;
  logic [63:0] reg_wdata, reg_rdata;
  jafar_cfg_t cfg;
  int checks = 0, failures = 0, starts = 0;

  jafar_ctrl_regs dut (.clk, .rst_n, .reg_we, .reg_addr, .reg_wdata, .reg_rdata, .cfg, .start, .busy, .done, .overflow);

  always #5 clk = ~clk;
  always @(posedge clk) if (start) starts++;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic wr(logic [3:0] a, logic [63:0] d);
    @(negedge clk); reg_we = 1; reg_addr = a; reg_wdata = d;
    @(negedge clk); reg_we = 0;
  endtask

  task automatic expect_rd(logic [3:0] a, logic [63:0] d, string what);
    @(negedge clk); reg_addr = a; #1;
    checks++;
    if (reg_rdata !== d) begin failures++; $display("FAIL %s: %h exp %h", what, reg_rdata, d); end
  endtask

  initial begin
    reg_we = 0; reg_addr = '0; reg_wdata = '0; busy = 0; done = 0; overflow = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    wr(REG_COL_ADDR, 64'h0000_1000);
    wr(REG_NUM_ROWS, 64'd512);
    wr(REG_LEFT_VAL, 64'd250000);
    wr(REG_RIGHT_VAL, 64'd750000);
    wr(REG_OPCODES, {53'd0, 3'(OP_LE), 5'd0, 3'(OP_GE)});
    wr(REG_OUT_ADDR, 64'h0002_0000);
    wr(REG_DONE_ADDR, 64'h0003_0000);
    wr(REG_INTERLEAVE, 64'hFFFF_FF32);             // stride 4, phase 3; other bits dropped
    expect_rd(REG_COL_ADDR, 64'h1000, "col_addr");
    expect_rd(REG_NUM_ROWS, 64'd512, "num_rows");
    expect_rd(REG_LEFT_VAL, 64'd250000, "left");
    expect_rd(REG_RIGHT_VAL, 64'd750000, "right");
    expect_rd(REG_OPCODES, {53'd0, 3'(OP_LE), 5'd0, 3'(OP_GE)}, "opcodes");
    expect_rd(REG_OUT_ADDR, 64'h2_0000, "out_addr");
    expect_rd(REG_DONE_ADDR, 64'h3_0000, "done_addr");
    expect_rd(REG_INTERLEAVE, 64'h32, "interleave");
    checks++;
    if (cfg.left_op != OP_GE || cfg.right_op != OP_LE || cfg.num_rows != 512 || cfg.col_addr != 31'h1000 ||
        cfg.ilv_shift != 2 || cfg.ilv_phase != 3) begin
      failures++; $display("FAIL cfg decode");
    end
    wr(REG_CTRL, 64'd1);
    checks++;
    if (starts != 1) begin failures++; $display("FAIL start pulses %0d", starts); end
    // busy: writes ignored, no second start
    @(negedge clk) busy = 1;
    wr(REG_NUM_ROWS, 64'd7);
    wr(REG_CTRL, 64'd1);
    expect_rd(REG_NUM_ROWS, 64'd512, "write while busy");
    expect_rd(REG_STATUS, 64'd1, "status busy");
    checks++;
    if (starts != 1) begin failures++; $display("FAIL start while busy"); end
    // done pulse -> sticky done bit, cleared by the next start
    @(negedge clk) begin busy = 0; done = 1; end
    @(negedge clk) done = 0;
    expect_rd(REG_STATUS, 64'd2, "status done");
    overflow = 1;
    expect_rd(REG_STATUS, 64'd6, "status overflow");
    overflow = 0;
    wr(REG_CTRL, 64'd1);
    expect_rd(REG_STATUS, 64'd0, "done cleared");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
