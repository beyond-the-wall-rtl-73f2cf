// jafar_data_latch: input register of the filter datapath.
//
// Captures each 64-bit word arriving from the DRAM IO buffer together with its
// valid and last-row flags, so that the two ALUs work from a stable register
// for one full JAFAR clock. One cycle of latency, one word per cycle.
// The latch itself is named in the design; its valid/last side-band signals
// and the synchronous active-low reset are this implementation's choices.
module jafar_data_latch
  import jafar_pkg::*;
#(
  parameter int unsigned W = DATA_W
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  input  logic         in_last,   // this word is the final row of the call
  input  logic [W-1:0] in_data,
  output logic         out_valid,
  output logic         out_last,
  output logic [W-1:0] out_data
);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_last  <= 1'b0;
      out_data  <= '0;
    end else begin
      out_valid <= in_valid;
      out_last  <= in_valid && in_last;
      if (in_valid) out_data <= in_data;
    end
  end

endmodule
