// tb_jafar_output_buffer: feeds rows with random pass/fail results, drains the
// write-back register with a random ready, and checks every written-back
// bitset, its valid-row mask, index and last flag against a reference bitset,
// over calls of many lengths, some with rows at interleaved (strided) bit
// positions. A final phase holds ready low to check that a lost write-back is
// flagged.
module tb_jafar_output_buffer;
  localparam int N = 64;
  logic clk = 0, rst_n = 0;
  logic clear, step, wr_en, buf_last, row_last, wb_valid, wb_ready, wb_last, overflow;
  logic [N-1:0] bitmask, wb_bits, wb_mask;
  logic [31:0] buf_index, wb_index;
  int checks = 0, failures = 0;
  // reference
  logic [N-1:0] ref_bits;
  logic [N-1:0] exp_bits[$], exp_mask[$];
  int           exp_idx[$];
  bit           exp_last[$];
  int row;
  int total_rows;

  jafar_output_buffer #(.N_BITS(N)) dut (.clk, .rst_n, .clear, .step, .wr_en, .bitmask, .buf_last,
    .row_last, .buf_index, .wb_valid, .wb_ready, .wb_bits, .wb_mask, .wb_index, .wb_last, .overflow);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // drain and compare
  always @(posedge clk) if (rst_n && wb_valid && wb_ready) begin
    checks++;
    if (exp_bits.size() == 0) begin
      failures++; $display("FAIL unexpected write-back");
    end else begin
      logic [N-1:0] eb, em; int ei; bit el;
      eb = exp_bits.pop_front(); em = exp_mask.pop_front(); ei = exp_idx.pop_front(); el = exp_last.pop_front();
      if (wb_bits !== eb || wb_mask !== em || wb_index !== ei || wb_last !== el) begin
        failures++;
        $display("FAIL wb idx=%0d bits=%h exp=%h mask=%h exp=%h", wb_index, wb_bits, eb, wb_mask, em);
      end
    end
  end

  // one call: rows at column positions row * stride + phase, random pass/fail,
  // random ready; expected bitset and mask built from the positions used
  task automatic run_call(int total_rows, int sh, int ph);
    logic [N-1:0] ref_mask;
    int g;
    @(negedge clk); step = 0; clear = 1; @(negedge clk); clear = 0;
    ref_bits = '0; ref_mask = '0;
    row = 0;
    while (row < total_rows) begin
      @(negedge clk);
      wb_ready = $urandom_range(0, 1);
      step = $urandom_range(0, 7) != 0;
      if (wb_valid && !wb_ready) step = 0;      // keep the test free of overflow here
      if (step) begin
        g        = row * (1 << sh) + ph;
        wr_en    = $urandom_range(0, 2) == 0;
        bitmask  = N'(1) << (g % N);
        buf_last = (g % N) + (1 << sh) > N - 1;
        row_last = row == total_rows - 1;
        buf_index = g / N;
        if (wr_en) ref_bits[g % N] = 1'b1;
        ref_mask[g % N] = 1'b1;
        if (buf_last || row_last) begin
          exp_bits.push_back(ref_bits);
          exp_mask.push_back(ref_mask);
          exp_idx.push_back(g / N);
          exp_last.push_back(row_last);
          ref_bits = '0; ref_mask = '0;
        end
        row++;
      end else begin
        wr_en = 0; buf_last = 0; row_last = 0;
      end
    end
    @(negedge clk); step = 0; wb_ready = 1;
    repeat (4) @(posedge clk);
    checks++;
    if (exp_bits.size() != 0 || overflow) begin failures++; $display("FAIL leftover or overflow"); end
  endtask

  initial begin
    clear = 0; step = 0; wr_en = 0; bitmask = '0; buf_last = 0; row_last = 0; buf_index = '0; wb_ready = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    run_call(64 * 5 + 23, 0, 0);         // five full bitsets and a partial one
    run_call(64, 0, 0);                  // exactly one full bitset
    run_call(1, 0, 0);                   // a single row
    for (int c = 0; c < 30; c++) begin   // random lengths and interleave settings
      int sh;
      sh = $urandom_range(0, 3);
      run_call($urandom_range(1, 300), sh, $urandom_range(0, (1 << sh) - 1));
    end
    // overflow: two closes with ready held low
    @(negedge clk); clear = 1; wb_ready = 0; @(negedge clk); clear = 0;
    for (int r = 0; r < 2 * N; r++) begin
      step = 1; wr_en = 0; bitmask = N'(1) << (r % N); buf_last = (r % N) == N - 1; row_last = 0;
      buf_index = r / N;
      @(negedge clk);
    end
    step = 0;
    @(negedge clk);
    checks++;
    if (!overflow) begin failures++; $display("FAIL overflow not flagged"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
