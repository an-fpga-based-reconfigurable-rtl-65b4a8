// tb_truth_table: self-checking test of the expected-response table.
//
// Builds one table per gate function and compares each, for all four input
// vectors, with the function written as a logic expression.
module tb_truth_table;
  import tester_pkg::*;
  logic a, b;
  logic c_or, c_nand, c_nor, c_and, c_xor;
  int checks = 0, failures = 0;

  truth_table #(.FN(FN_OR))   u_or   (.a, .b, .c(c_or));
  truth_table #(.FN(FN_NAND)) u_nand (.a, .b, .c(c_nand));
  truth_table #(.FN(FN_NOR))  u_nor  (.a, .b, .c(c_nor));
  truth_table #(.FN(FN_AND))  u_and  (.a, .b, .c(c_and));
  truth_table #(.FN(FN_XOR))  u_xor  (.a, .b, .c(c_xor));

  task automatic check(string fn, logic got, logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s a=%0b b=%0b: c=%0b expected %0b", fn, a, b, got, exp);
    end
  endtask

  initial begin
    for (int v = 0; v < 4; v++) begin
      a = v[0]; b = v[1];
      #1;
      check("OR",   c_or,   a | b);
      check("NAND", c_nand, ~(a & b));
      check("NOR",  c_nor,  ~(a | b));
      check("AND",  c_and,  a & b);
      check("XOR",  c_xor,  a ^ b);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
