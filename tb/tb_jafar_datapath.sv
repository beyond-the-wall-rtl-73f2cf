// tb_jafar_datapath: streams rows into the filter pipeline (mostly one per
// clock, with some gaps) under several predicate settings and checks every
// written-back bitset, its mask and index against a software filter. It also
// checks the pipeline latency: the bitset holding a row appears in the
// write-back register two clocks after the row enters the data latch. Two
// runs treat the rows as one module's share of an interleaved column (every
// 2nd row from row 1, every 4th row from row 2): bits and mask then sit at
// the stride positions and a word is written back after 64 / stride rows.
module tb_jafar_datapath;
  import jafar_pkg::*;

  logic clk = 0, rst_n = 0;
  logic clear, in_valid, in_last;
  logic [63:0] in_data, left_val, right_val;
  cmp_op_e left_op, right_op;
  logic [1:0] ilv_shift;
  logic [2:0] ilv_phase;
  logic wb_valid, wb_ready, wb_last, overflow;
  logic [63:0] wb_bits, wb_mask;
  logic [31:0] wb_index;
  int checks = 0, failures = 0;
  logic [63:0] exp_bits[$], exp_mask[$];
  bit exp_last[$];
  int exp_idx[$];
  longint cyc = 0, last_in_cyc, wb_cyc;

  jafar_datapath dut (.clk, .rst_n, .clear, .in_valid, .in_last, .in_data,
    .left_val, .left_op, .right_val, .right_op, .ilv_shift, .ilv_phase,
    .wb_valid, .wb_ready, .wb_bits, .wb_mask, .wb_index, .wb_last, .overflow);

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic bit pred(longint v, longint o, cmp_op_e p);
    case (p)
      OP_EQ: return v == o;  OP_LT: return v < o;  OP_GT: return v > o;
      OP_LE: return v <= o;  OP_GE: return v >= o; default: return 1;
    endcase
  endfunction

  always @(posedge clk) if (rst_n && wb_valid && wb_ready) begin
    checks++;
    if (wb_last) wb_cyc = cyc;
    if (exp_bits.size() == 0 || wb_bits !== exp_bits[0] || wb_mask !== exp_mask[0] ||
        wb_index !== exp_idx[0] || wb_last !== exp_last[0]) begin
      failures++;
      $display("FAIL wb idx=%0d bits=%h exp=%h", wb_index, wb_bits, exp_bits.size() ? exp_bits[0] : 0);
    end
    if (exp_bits.size() != 0) begin
      void'(exp_bits.pop_front()); void'(exp_mask.pop_front()); void'(exp_idx.pop_front()); void'(exp_last.pop_front());
    end
  end

  task automatic run(int rows, longint lo, longint hi, cmp_op_e lop, cmp_op_e rop, bit gaps,
                     int sh = 0, int ph = 0);
    logic [63:0] b, m;
    int g;
    @(negedge clk);
    left_val = lo; right_val = hi; left_op = lop; right_op = rop;
    ilv_shift = 2'(sh); ilv_phase = 3'(ph);
    clear = 1; @(negedge clk); clear = 0;
    b = '0; m = '0;
    for (int r = 0; r < rows; r++) begin
      while (gaps && $urandom_range(0, 5) == 0) begin in_valid = 0; @(negedge clk); end
      in_valid = 1;
      in_data  = (r % 7 == 0) ? lo : longint'($urandom_range(0, 1000000));
      in_last  = (r == rows - 1);
      g = r * (1 << sh) + ph;                      // row number in the column
      if (pred(in_data, lo, lop) && pred(in_data, hi, rop)) b[g % 64] = 1;
      m[g % 64] = 1;
      if (g % 64 + (1 << sh) > 63 || r == rows - 1) begin
        exp_bits.push_back(b); exp_mask.push_back(m); exp_idx.push_back(g / 64); exp_last.push_back(r == rows - 1);
        b = '0; m = '0;
      end
      if (r == rows - 1) last_in_cyc = cyc + 1;   // sampled at the next edge
      @(negedge clk);
    end
    in_valid = 0; in_last = 0;
    repeat (5) @(negedge clk);
    checks++;
    if (wb_cyc - last_in_cyc != 2) begin failures++; $display("FAIL latency %0d", wb_cyc - last_in_cyc); end
  endtask

  initial begin
    clear = 0; in_valid = 0; in_last = 0; in_data = '0; wb_ready = 1; ilv_shift = 0; ilv_phase = 0;
    left_val = '0; right_val = '0; left_op = OP_ANY; right_op = OP_ANY;
    repeat (2) @(posedge clk); rst_n = 1;
    run(512, 250000, 750000, OP_GE, OP_LE, 0);   // range filter over a 4 KB page
    run(200, 500000, 0, OP_LT, OP_ANY, 1);
    run(77, 123456, 0, OP_EQ, OP_ANY, 1);
    run(130, 900000, 100000, OP_GT, OP_GE, 0);
    run(64, 0, 1000001, OP_GE, OP_LE, 0);        // 100 % selectivity
    run(100, 250000, 750000, OP_GE, OP_LE, 1, 1, 1);   // 2-way interleaved, odd rows
    run(70, 0, 1000001, OP_GE, OP_LE, 0, 2, 2);        // 4-way interleaved, 100 %
    checks++;
    if (exp_bits.size() != 0 || overflow) begin failures++; $display("FAIL leftover"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
