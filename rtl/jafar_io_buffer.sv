// jafar_io_buffer: DDR3 IO buffer, 512-bit prefetch to 64-bit word stream.
//
// A DDR3 read fetches 512 bits (8n prefetch) from the array into the IO
// buffer, which drives them onto the 64-bit data bus on both edges of the bus
// clock over four bus cycles. This model works in the JAFAR clock, which runs
// at twice the bus clock, so both bus edges become consecutive JAFAR clock
// edges: one 64-bit word per clock, eight clocks per burst, lowest word first.
// A tag travelling with the burst says which requester the data belongs to.
// Timing: a burst loaded at clock edge t appears as words at edges
// t+1 ... t+8 (out_valid high for eight cycles). A new burst may be loaded in
// the cycle that shows the last word of the previous one, so bursts issued
// eight clocks apart stream without a gap.
// The 512-to-64 conversion and the word rate follow the design description;
// single-clock modelling of the double-data-rate transfer and the tag are this
// implementation's choices.
module jafar_io_buffer
  import jafar_pkg::*;
#(
  parameter int unsigned TAG_W = 1
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  load,
  input  logic [BURST_BITS-1:0] load_data,
  input  logic [TAG_W-1:0]      load_tag,
  output logic                  out_valid,
  output logic [DATA_W-1:0]     out_data,
  output logic [TAG_W-1:0]      out_tag,
  output logic                  out_last
);

  logic [BURST_BITS-1:0] buf_q;
  logic [3:0]            cnt;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      buf_q   <= '0;
      cnt     <= '0;
      out_tag <= '0;
    end else if (load) begin
      buf_q   <= load_data;
      cnt     <= 4'(BURST_WORDS);
      out_tag <= load_tag;
    end else if (cnt != '0) begin
      buf_q <= buf_q >> DATA_W;
      cnt   <= cnt - 1'b1;
    end
  end

  assign out_valid = (cnt != '0);
  assign out_data  = buf_q[DATA_W-1:0];
  assign out_last  = (cnt == 4'd1);

  // a new burst must not cut off words of the previous one
  a_no_overrun: assert property (@(posedge clk) disable iff (!rst_n)
    load |-> cnt <= 4'd1);

endmodule
