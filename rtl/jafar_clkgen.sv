// jafar_clkgen: behavioural model of the JAFAR clock generator (clock doubler).
//
// The DRAM IO buffer delivers two 64-bit words per data-bus clock, one on each
// edge. Instead of building dual-edge logic the accelerator runs from its own
// clock at twice the bus frequency. This is a behavioural model, not
// synthesizable logic: a real part would be a PLL or DLL. It raises clk_2x at
// every edge of bus_clk and lowers it HIGH_TIME simulator time units later,
// so HIGH_TIME must be a quarter of the bus clock period (250 time units for a
// 1000-unit bus period, i.e. 1 GHz bus / 2 GHz JAFAR clock at 1 ps units).
// A synthesis tool drops the delay and reduces clk_2x to a constant, which
// leaves everything clocked by it without a clock: in a netlist this module
// must be replaced by the clock macro of the target technology.
// The doubling follows the design description; the pulse-based model and
// its parameter are this implementation's choices.
module jafar_clkgen #(
  parameter int unsigned HIGH_TIME = 250
) (
  input  logic bus_clk,
  output logic clk_2x
);

  initial clk_2x = 1'b0;

  always @(bus_clk) begin
    clk_2x = 1'b1;
    #(HIGH_TIME) clk_2x = 1'b0;
  end

endmodule
