// tb_jafar_alu: self-checking test of the predicate comparator.
// Applies corner values (equal, off by one, sign boundary) and random pairs
// with every opcode and compares the result with a reference computed on
// signed 64-bit integers in the testbench.
module tb_jafar_alu;
  import jafar_pkg::*;

  logic [63:0] value, operand;
  cmp_op_e     op;
  logic        result;
  int checks = 0, failures = 0;

  jafar_alu dut (.value, .operand, .op, .result);

  function automatic logic ref_cmp(longint v, longint o, cmp_op_e p);
    case (p)
      OP_EQ:  return v == o;
      OP_LT:  return v <  o;
      OP_GT:  return v >  o;
      OP_LE:  return v <= o;
      OP_GE:  return v >= o;
      OP_ANY: return 1'b1;
      default: return 1'b0;
    endcase
  endfunction

  task automatic try(longint v, longint o);
    for (int k = 0; k <= 5; k++) begin
      value = v; operand = o; op = cmp_op_e'(k);
      #1;
      checks++;
      if (result !== ref_cmp(v, o, op)) begin
        failures++;
        $display("FAIL op=%0d v=%0d o=%0d got=%0b", k, v, o, result);
      end
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    try(5, 5); try(4, 5); try(6, 5); try(-1, 0); try(0, -1);
    try(64'sh7fffffffffffffff, 64'sh8000000000000000);
    try(64'sh8000000000000000, 64'sh7fffffffffffffff);
    for (int i = 0; i < 2000; i++) begin
      longint a, b;
      a = {$urandom, $urandom};
      b = (i % 4 == 0) ? a : ((i % 4 == 1) ? a + 1 : {$urandom, $urandom});
      if (i % 8 == 7) begin a = $urandom_range(0, 1000000); b = $urandom_range(0, 1000000); end
      try(a, b);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
