// jafar_page_offset_counter: row offset tracking for the output bitset.
//
// Counts the rows filtered since the start of a call (offset) and maps each
// to its row number in the column, row = (offset << shift) | phase. Without
// interleaving (shift = 0, phase = 0) the two are equal. When the column is
// interleaved 64-bit-wise over 2**shift modules, this module holds only every
// 2**shift-th row, starting at row phase. The low bits of the row number
// select one bit of the N_BITS-wide output buffer and are presented as a
// one-hot "page offset bitmask"; the high bits number the bitset words that
// are written back. buf_last marks the last row of this module that falls
// into the current bitset word, which is then complete as far as this module
// is concerned; the write-back mask leaves the other modules' bits alone.
// Tracking the row offset, turning it into a bitmask and writing only the
// bits of the rows a module has filtered under interleaving follow the design
// description; the counter width, the power-of-two buffer size and stride,
// the stride/phase encoding and the split into bitmask/word index are this
// implementation's choices. phase must be below 2**shift; its bits at or
// above shift are ignored.
// Timing: outputs describe the row being filtered in the current cycle; the
// count advances on each clock with step set. clear restarts it at row 0.
module jafar_page_offset_counter #(
  parameter int unsigned N_BITS  = 64,  // output buffer size, a power of two
  parameter int unsigned CNT_W   = 32,
  parameter int unsigned SHIFT_W = 2,   // stride up to 2**(2**SHIFT_W - 1)
  parameter int unsigned PHASE_W = 3
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      clear,
  input  logic                      step,
  input  logic [SHIFT_W-1:0]        shift,   // log2 of the interleave stride
  input  logic [PHASE_W-1:0]        phase,   // first row of this module
  output logic [CNT_W-1:0]          offset,
  output logic [N_BITS-1:0]         bitmask,
  output logic                      buf_last,
  output logic [CNT_W-1:0]          buf_index
);

  localparam int unsigned SEL_W = (N_BITS > 1) ? $clog2(N_BITS) : 1;

  logic [SEL_W-1:0] sel, low_ones;
  logic [CNT_W-1:0] row, phase_m;

  always_ff @(posedge clk) begin
    if (!rst_n || clear) offset <= '0;
    else if (step)       offset <= offset + 1'b1;
  end

  // row number in the column; low_ones has the bits below the stride set
  assign phase_m   = CNT_W'(phase) & ((CNT_W'(1) << shift) - 1'b1);
  assign row       = (offset << shift) | phase_m;
  assign low_ones  = SEL_W'((CNT_W'(1) << shift) - 1'b1);
  assign sel       = row[SEL_W-1:0];
  assign buf_last  = ((sel | low_ones) == SEL_W'(N_BITS - 1));
  assign buf_index = row >> SEL_W;

  always_comb begin
    bitmask      = '0;
    bitmask[sel] = 1'b1;
  end

endmodule
