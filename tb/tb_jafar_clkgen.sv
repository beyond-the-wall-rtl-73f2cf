// tb_jafar_clkgen: drives a bus clock of period 1000 time units and checks
// that the generated clock has two rising edges per bus cycle, each 500 units
// apart, with a high time of 250 units.
module tb_jafar_clkgen;
  logic bus_clk = 0, clk_2x;
  int checks = 0, failures = 0, rises = 0;
  realtime last_rise = -1.0, last_fall;

  jafar_clkgen #(.HIGH_TIME(250)) dut (.bus_clk, .clk_2x);

  always #500 bus_clk = ~bus_clk;

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk_2x) begin
    if (last_rise >= 0) begin
      checks++;
      if ($realtime - last_rise != 500) begin failures++; $display("FAIL period %0t", $realtime - last_rise); end
    end
    last_rise = $realtime;
    rises++;
  end
  always @(negedge clk_2x) begin
    checks++;
    if ($realtime - last_rise != 250) begin failures++; $display("FAIL high time"); end
  end

  initial begin
    #100100;   // 100 bus cycles
    checks++;
    if (rises != 200) begin failures++; $display("FAIL rises=%0d", rises); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
