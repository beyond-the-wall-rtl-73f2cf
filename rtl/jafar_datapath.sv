// jafar_datapath: the filter pipeline of the select accelerator.
//
// Structure (one 64-bit row per JAFAR clock):
//   IO-buffer word -> data latch -> left ALU  \
//                                -> right ALU  > both true -> output bitset
//   page offset counter -> one-hot page offset bitmask ---/
// Stage 0 registers the incoming word in the data latch. In stage 1 both ALUs
// compare the latched value with their operands; a row passes when both
// predicates hold (a range filter range_low <= v <= range_high uses GE on the
// left and LE on the right). The page offset counter supplies the bit position
// of the row, and the output buffer sets that bit when the row passes. A full
// bitset (or the one holding the final row) moves to the write-back register
// at the end of stage 1, so a row's bit is visible there two clocks after the
// word entered the latch.
// The blocks and their connections follow the block diagram of the design;
// requiring both ALU results to be true follows from the inclusive two-sided
// range filter. Bitset size N_BITS = 64 is this implementation's choice (the
// design leaves n open).
module jafar_datapath
  import jafar_pkg::*;
#(
  parameter int unsigned N_BITS = 64,
  parameter int unsigned CNT_W  = 32
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              clear,
  // rows from the IO buffer
  input  logic              in_valid,
  input  logic              in_last,
  input  logic [DATA_W-1:0] in_data,
  // predicate configuration
  input  logic [DATA_W-1:0] left_val,
  input  cmp_op_e           left_op,
  input  logic [DATA_W-1:0] right_val,
  input  cmp_op_e           right_op,
  // interleaving of the column over modules (0/0: not interleaved)
  input  logic [ILV_SHIFT_W-1:0] ilv_shift,
  input  logic [ILV_PHASE_W-1:0] ilv_phase,
  // write-back register of the output bitset
  output logic              wb_valid,
  input  logic              wb_ready,
  output logic [N_BITS-1:0] wb_bits,
  output logic [N_BITS-1:0] wb_mask,
  output logic [CNT_W-1:0]  wb_index,
  output logic              wb_last,
  output logic              overflow
);

  logic              lat_valid, lat_last;
  logic [DATA_W-1:0] lat_data;
  logic              left_true, right_true, pass;
  logic [CNT_W-1:0]  buf_index;
  logic [N_BITS-1:0] bitmask;
  logic              buf_last;

  jafar_data_latch u_latch (
    .clk, .rst_n,
    .in_valid, .in_last, .in_data,
    .out_valid(lat_valid), .out_last(lat_last), .out_data(lat_data)
  );

  jafar_alu u_alu_left (
    .value(lat_data), .operand(left_val), .op(left_op), .result(left_true)
  );

  jafar_alu u_alu_right (
    .value(lat_data), .operand(right_val), .op(right_op), .result(right_true)
  );

  assign pass = left_true && right_true;

  jafar_page_offset_counter #(.N_BITS(N_BITS), .CNT_W(CNT_W),
                              .SHIFT_W(ILV_SHIFT_W), .PHASE_W(ILV_PHASE_W)) u_offset (
    .clk, .rst_n, .clear,
    .step(lat_valid), .shift(ilv_shift), .phase(ilv_phase),
    .offset(), .bitmask, .buf_last, .buf_index
  );

  jafar_output_buffer #(.N_BITS(N_BITS), .IDX_W(CNT_W)) u_outbuf (
    .clk, .rst_n, .clear,
    .step(lat_valid), .wr_en(pass), .bitmask, .buf_last,
    .row_last(lat_last), .buf_index,
    .wb_valid, .wb_ready, .wb_bits, .wb_mask, .wb_index, .wb_last, .overflow
  );

endmodule
