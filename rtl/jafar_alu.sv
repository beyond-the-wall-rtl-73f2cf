// jafar_alu: one predicate comparator of the filter datapath.
//
// Compares a 64-bit column value against a programmed operand with one of the
// predicates =, <, >, <=, >= and reports whether the row satisfies it. Two of
// these work side by side for a range filter (left: value >= range_low,
// right: value <= range_high). The five predicates and the 64-bit integer
// width follow the design description. Treating the values as signed two's
// complement integers and the extra OP_ANY code (always true, so a one-sided
// filter can leave one ALU idle) are choices of this implementation.
// Purely combinational: the result is valid in the same cycle as its inputs.
module jafar_alu
  import jafar_pkg::*;
#(
  parameter int unsigned W = DATA_W
) (
  input  logic [W-1:0] value,    // column value from the data latch
  input  logic [W-1:0] operand,  // programmed comparison operand
  input  cmp_op_e      op,
  output logic         result
);

  logic lt, eq;

  always_comb begin
    eq = (value == operand);
    lt = ($signed(value) < $signed(operand));
    unique case (op)
      OP_EQ:   result = eq;
      OP_LT:   result = lt;
      OP_GT:   result = !lt && !eq;
      OP_LE:   result = lt || eq;
      OP_GE:   result = !lt;
      OP_ANY:  result = 1'b1;
      default: result = 1'b0;
    endcase
  end

endmodule
