// jafar_pkg: types and constants shared by the near-memory select accelerator.
//
// The accelerator filters a column of 64-bit integers stored in a DDR3 rank
// and writes back a bitset of the rows that pass. Widths that come from the
// DDR3 organisation (64-bit words, 512-bit 8n-prefetch bursts, 8 KB rows) and
// the 2 GB memory of the evaluated system follow the description of the
// design; the register map, opcode encoding, request struct and bank count
// are this implementation's own choices.
package jafar_pkg;

  // Data word and burst geometry (DDR3 8n prefetch: 8 x 64 bit = 512 bit).
  localparam int unsigned DATA_W      = 64;
  localparam int unsigned BURST_WORDS = 8;
  localparam int unsigned BURST_BITS  = DATA_W * BURST_WORDS;

  // Byte address width: 2 GB of DRAM.
  localparam int unsigned ADDR_W = 31;

  // Address map of one rank: 8 KB rows = 1024 words per row, 8 banks.
  localparam int unsigned COL_W  = 10;                        // word column in a row
  localparam int unsigned BANK_W = 3;
  localparam int unsigned ROW_W  = ADDR_W - 3 - COL_W - BANK_W;

  // Predicate of one ALU. OP_ANY lets a single-sided filter leave the second
  // ALU unused (it always reports true).
  typedef enum logic [2:0] {
    OP_EQ  = 3'd0,
    OP_LT  = 3'd1,
    OP_GT  = 3'd2,
    OP_LE  = 3'd3,
    OP_GE  = 3'd4,
    OP_ANY = 3'd5
  } cmp_op_e;

  // A memory request as it travels from a requester (CPU or accelerator) to
  // the memory access arbiter. Reads fetch one aligned 64-byte burst; writes
  // store one 64-bit word and touch only the bits set in wmask.
  typedef struct packed {
    logic              we;
    logic [ADDR_W-1:0] addr;
    logic [DATA_W-1:0] wdata;
    logic [DATA_W-1:0] wmask;
  } mem_req_t;

  // DRAM commands issued by the arbiter (RAS = ACT, CAS = RD/WR).
  typedef enum logic [2:0] {
    CMD_NOP = 3'd0,
    CMD_ACT = 3'd1,
    CMD_PRE = 3'd2,
    CMD_RD  = 3'd3,
    CMD_WR  = 3'd4
  } dram_cmd_e;

  // Interleaving across modules: with 2**ILV_SHIFT_W-way (up to 8-way) 64-bit
  // interleaving, local row k of this module is row (k << shift) | phase of
  // the column.
  localparam int unsigned ILV_SHIFT_W = 2;
  localparam int unsigned ILV_PHASE_W = 3;

  // Configuration held in the control registers for one select call.
  typedef struct packed {
    logic [ADDR_W-1:0] col_addr;    // byte address of the first row (64-byte aligned)
    logic [31:0]       num_rows;    // rows (64-bit words) to filter
    logic [DATA_W-1:0] left_val;    // operand of the left ALU (range_low)
    logic [DATA_W-1:0] right_val;   // operand of the right ALU (range_high)
    cmp_op_e           left_op;
    cmp_op_e           right_op;
    logic [ADDR_W-1:0] out_addr;    // byte address of the output bitset
    logic [ADDR_W-1:0] done_addr;   // byte address of the completion flag word
    logic [ILV_SHIFT_W-1:0] ilv_shift;  // log2 of the interleave stride (0: none)
    logic [ILV_PHASE_W-1:0] ilv_phase;  // this module's position in the stride
  } jafar_cfg_t;

  // Register map, as 64-bit word index on the register bus.
  localparam logic [3:0] REG_CTRL      = 4'd0;  // write bit0 = 1: start
  localparam logic [3:0] REG_STATUS    = 4'd1;  // bit0 busy, bit1 done, bit2 overflow
  localparam logic [3:0] REG_COL_ADDR  = 4'd2;
  localparam logic [3:0] REG_NUM_ROWS  = 4'd3;
  localparam logic [3:0] REG_LEFT_VAL  = 4'd4;
  localparam logic [3:0] REG_RIGHT_VAL = 4'd5;
  localparam logic [3:0] REG_OPCODES   = 4'd6;  // [2:0] left op, [10:8] right op
  localparam logic [3:0] REG_OUT_ADDR  = 4'd7;
  localparam logic [3:0] REG_DONE_ADDR = 4'd8;
  localparam logic [3:0] REG_INTERLEAVE = 4'd9; // [1:0] log2 stride, [6:4] phase

  // Value written to the completion flag word when a call finishes.
  localparam logic [DATA_W-1:0] DONE_FLAG = 64'h1;

endpackage
