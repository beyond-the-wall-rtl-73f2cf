// tb_jafar_page_offset_counter: steps the row counter at random and clears it
// every 250 cycles, each time with a new interleave setting (stride 1, 2, 4
// or 8 and a phase, sometimes with bits set above the stride, which must be
// ignored). Checks the offset, the one-hot bitmask, the buffer-full flag and
// the bitset word index against the row number the testbench computes,
// row = offset * stride + (phase mod stride).
module tb_jafar_page_offset_counter;
  logic clk = 0, rst_n = 0;
  logic clear, step, buf_last;
  logic [1:0] shift;
  logic [2:0] phase;
  logic [31:0] offset, buf_index;
  logic [63:0] bitmask;
  int unsigned ref_off, row, stride;
  int checks = 0, failures = 0, n_ilv_last = 0;

  jafar_page_offset_counter dut (.clk, .rst_n, .clear, .step, .shift, .phase,
    .offset, .bitmask, .buf_last, .buf_index);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    clear = 0; step = 0; shift = 0; phase = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    ref_off = 0;
    for (int i = 0; i < 1000; i++) begin
      @(negedge clk);
      stride = 1 << shift;
      row    = ref_off * stride + (phase % stride);
      checks++;
      if (offset !== ref_off || bitmask !== (64'd1 << (row % 64)) ||
          buf_last !== ((row % 64) + stride > 63) || buf_index !== row / 64) begin
        failures++;
        $display("FAIL i=%0d stride=%0d phase=%0d off=%0d ref=%0d idx=%0d last=%0b",
                 i, stride, phase, offset, ref_off, buf_index, buf_last);
      end
      if (buf_last && stride > 1) n_ilv_last++;
      clear = (i % 250 == 249);
      step  = $urandom_range(0, 4) != 0;
      @(posedge clk);
      if (clear) begin
        ref_off = 0;
        #1 shift = 2'(i / 250 + 1); phase = 3'($urandom_range(0, 7));
      end else if (step) ref_off++;
    end
    checks++;
    if (n_ilv_last == 0) begin failures++; $display("FAIL never: full word under interleaving"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
