// tb_jafar_core: the accelerator on its own, attached to a simple memory.
// Programs several select calls through the register bus (range filter over
// one 4 KB page, one-sided and equality filters, a row count that is not a
// multiple of the burst or bitset size, an empty call) and checks the bitset
// words written back against a software filter of the same memory contents,
// that the partial last word only touches valid bits, that the completion
// word is written last and STATUS reports done. It also checks that the run
// time of a call does not depend on the selectivity.
module tb_jafar_core;
  import jafar_pkg::*;

  logic clk = 0, rst_n = 0;
  logic reg_we;
  logic [3:0] reg_addr;
  logic [63:0] reg_wdata, reg_rdata;
  logic req_valid, req_ready, rsp_valid, busy, done;
  mem_req_t req;
  logic [63:0] rsp_data;
  int checks = 0, failures = 0;
  longint cyc = 0;

  jafar_core dut (.clk, .rst_n, .reg_we, .reg_addr, .reg_wdata, .reg_rdata,
    .req_valid, .req_ready, .req, .rsp_valid, .rsp_data, .busy, .done);

  mem_responder_model #(.LAT(26)) u_mem (.clk, .rst_n, .req_valid, .req_ready, .req, .rsp_valid, .rsp_data);

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic wr(logic [3:0] a, logic [63:0] d);
    @(negedge clk); reg_we = 1; reg_addr = a; reg_wdata = d;
    @(negedge clk); reg_we = 0;
  endtask

  function automatic bit pred(longint v, longint o, cmp_op_e p);
    case (p)
      OP_EQ: return v == o;  OP_LT: return v < o;  OP_GT: return v > o;
      OP_LE: return v <= o;  OP_GE: return v >= o; default: return 1;
    endcase
  endfunction

  // run one call and check it; returns its duration in clocks
  task automatic select(longint unsigned col, int rows, longint lo, longint hi, cmp_op_e lop, cmp_op_e rop,
                        longint unsigned outa, longint unsigned donea, output longint dur);
    longint t0;
    int nw0;
    longint unsigned pre_word;
    nw0 = u_mem.wlog_addr.size();
    pre_word = 64'hA5A5_A5A5_A5A5_A5A5;
    u_mem.mem[(outa >> 3) + (rows - 1) / 64] = pre_word;     // bits beyond the last row must survive
    wr(REG_COL_ADDR, col); wr(REG_NUM_ROWS, rows);
    wr(REG_LEFT_VAL, lo); wr(REG_RIGHT_VAL, hi);
    wr(REG_OPCODES, {53'd0, 3'(rop), 5'd0, 3'(lop)});
    wr(REG_OUT_ADDR, outa); wr(REG_DONE_ADDR, donea);
    u_mem.mem[donea >> 3] = 0;
    wr(REG_CTRL, 1);
    t0 = cyc;
    while (!done) @(posedge clk);
    dur = cyc - t0;
    @(negedge clk);
    // completion word, written last
    checks++;
    if (u_mem.peek(donea >> 3) != DONE_FLAG || u_mem.wlog_addr[$] != donea) begin
      failures++; $display("FAIL completion word");
    end
    // bitset words
    for (int k = 0; k < (rows + 63) / 64; k++) begin
      longint unsigned expw, got;
      expw = (k == (rows - 1) / 64 && rows % 64 != 0) ? pre_word : 0;
      for (int r = 64 * k; r < 64 * k + 64 && r < rows; r++) begin
        longint v = u_mem.peek((col >> 3) + r);
        expw[r % 64] = pred(v, lo, lop) && pred(v, hi, rop);
      end
      got = u_mem.peek((outa >> 3) + k);
      checks++;
      if (got != expw) begin failures++; $display("FAIL bitset word %0d: %h exp %h", k, got, expw); end
    end
    checks++;
    if (u_mem.wlog_addr.size() - nw0 != (rows + 63) / 64 + 1) begin
      failures++; $display("FAIL write count %0d", u_mem.wlog_addr.size() - nw0);
    end
    reg_addr = REG_STATUS; #1;
    checks++;
    if (reg_rdata[1:0] != 2'b10) begin failures++; $display("FAIL status %h", reg_rdata); end
    checks++;
    if (u_mem.max_outstanding > 2) begin failures++; $display("FAIL more than two reads outstanding"); end
  endtask

  longint d0, d100, d50, dn;

  initial begin
    reg_we = 0; reg_addr = '0; reg_wdata = '0;
    repeat (3) @(posedge clk); rst_n = 1;
    select(64'h10000, 512, 0, -1, OP_LT, OP_ANY, 64'h80000, 64'h90000, d0);          // 0 %
    select(64'h10000, 512, 0, 1000000, OP_GE, OP_LE, 64'h80000, 64'h90000, d100);   // 100 %
    select(64'h10000, 512, 250000, 750000, OP_GE, OP_LE, 64'h80000, 64'h90000, d50);
    checks++;
    if (d0 != d100 || d0 != d50) begin failures++; $display("FAIL run time depends on selectivity: %0d %0d %0d", d0, d50, d100); end
    $display("core: 512-row page in %0d clocks", d0);
    select(64'h20040, 203, 500000, 0, OP_GT, OP_ANY, 64'hA0000, 64'hB0008, dn);
    select(64'h30000, 77, 777, 0, OP_EQ, OP_ANY, 64'hA1000, 64'hB0010, dn);
    // equality hit: plant the value
    u_mem.mem[(64'h31000 >> 3) + 5] = 4242;
    select(64'h31000, 9, 4242, 0, OP_EQ, OP_ANY, 64'hA2000, 64'hB0018, dn);
    checks++;
    if (!u_mem.peek(64'hA2000 >> 3) [5]) begin failures++; $display("FAIL planted equality"); end
    select(64'h32000, 0, 0, 0, OP_ANY, OP_ANY, 64'hA3000, 64'hB0020, dn);              // empty call
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
