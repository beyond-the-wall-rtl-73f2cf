// tb_jafar_data_latch: checks that the data latch presents each incoming word,
// with its valid and last flags, exactly one clock later.
module tb_jafar_data_latch;
  logic clk = 0, rst_n = 0;
  logic in_valid, in_last, out_valid, out_last;
  logic [63:0] in_data, out_data;
  logic [63:0] exp_data;
  logic exp_valid, exp_last;
  int checks = 0, failures = 0;

  jafar_data_latch dut (.clk, .rst_n, .in_valid, .in_last, .in_data, .out_valid, .out_last, .out_data);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in_valid = 0; in_last = 0; in_data = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    exp_data = '0;
    for (int i = 0; i < 500; i++) begin
      @(negedge clk);
      in_valid = $urandom_range(0, 3) != 0;
      in_last  = $urandom_range(0, 7) == 0;
      in_data  = {$urandom, $urandom};
      exp_valid = in_valid;
      exp_last  = in_valid && in_last;
      if (in_valid) exp_data = in_data;
      @(posedge clk); #1;
      checks++;
      if (out_valid !== exp_valid || out_last !== exp_last || (exp_valid && out_data !== exp_data)) begin
        failures++;
        $display("FAIL i=%0d", i);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
