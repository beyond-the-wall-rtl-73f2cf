// jafar_output_buffer: output bitset of the filter and its write-back register.
//
// Each filtered row ORs its one-hot page-offset bitmask into the N_BITS
// bitset when the combined comparison is true (write enable). valid_mask
// records which bit positions belong to rows actually filtered. When the row
// that fills the bitset (or the final row of the call) is processed, bitset
// and mask move into a write-back register in the same cycle and the bitset
// restarts empty, so filtering never waits for the write to DRAM. The
// write-back register is handed to the request sequencer with a valid/ready
// handshake; wb_mask lets the write touch only the bits of rows that were
// filtered, which matters for a partly filled last word.
// The n-bit bitset, the write enable from the comparison and the periodic
// write-back follow the design description; the second (write-back) register,
// the mask and the sticky overflow flag (a write-back still pending when the
// next one is due) are this implementation's choices.
module jafar_output_buffer #(
  parameter int unsigned N_BITS = 64,
  parameter int unsigned IDX_W  = 32
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              clear,       // start of a call
  input  logic              step,        // a row is filtered this cycle
  input  logic              wr_en,       // comparison is true for that row
  input  logic [N_BITS-1:0] bitmask,     // one-hot position of that row
  input  logic              buf_last,    // that row fills the bitset
  input  logic              row_last,    // that row is the final row of the call
  input  logic [IDX_W-1:0]  buf_index,   // bitset word number of that row
  // write-back register
  output logic              wb_valid,
  input  logic              wb_ready,
  output logic [N_BITS-1:0] wb_bits,
  output logic [N_BITS-1:0] wb_mask,
  output logic [IDX_W-1:0]  wb_index,
  output logic              wb_last,     // holds the final row of the call
  output logic              overflow     // sticky: a write-back was lost
);

  logic [N_BITS-1:0] bits, valid_mask;
  logic [N_BITS-1:0] bits_nxt, mask_nxt;
  logic              close;

  assign bits_nxt = bits | (wr_en ? bitmask : '0);
  assign mask_nxt = valid_mask | bitmask;
  assign close    = step && (buf_last || row_last);

  always_ff @(posedge clk) begin
    if (!rst_n || clear) begin
      bits       <= '0;
      valid_mask <= '0;
    end else if (step) begin
      bits       <= close ? '0 : bits_nxt;
      valid_mask <= close ? '0 : mask_nxt;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n || clear) begin
      wb_valid <= 1'b0;
      wb_bits  <= '0;
      wb_mask  <= '0;
      wb_index <= '0;
      wb_last  <= 1'b0;
    end else if (close) begin
      wb_valid <= 1'b1;
      wb_bits  <= bits_nxt;
      wb_mask  <= mask_nxt;
      wb_index <= buf_index;
      wb_last  <= row_last;
    end else if (wb_valid && wb_ready) begin
      wb_valid <= 1'b0;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n || clear)                      overflow <= 1'b0;
    else if (close && wb_valid && !wb_ready)  overflow <= 1'b1;
  end

endmodule
