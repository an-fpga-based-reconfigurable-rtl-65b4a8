// tb_compare_cell: self-checking test of the pass/fail compare.
//
// All four combinations of expected value and chip output: pass must be 1
// exactly when they agree, and fail must always be its opposite.
module tb_compare_cell;
  logic c, op, pass, fail;
  int checks = 0, failures = 0;

  compare_cell dut (.c, .op, .pass, .fail);

  initial begin
    for (int v = 0; v < 4; v++) begin
      c = v[0]; op = v[1];
      #1;
      checks++;
      if (pass !== (c == op) || fail !== (c != op)) begin
        failures++;
        $display("FAIL c=%0b op=%0b: pass=%0b fail=%0b", c, op, pass, fail);
      end
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
