// tb_jkffe: self-checking test of the JK flip-flop.
//
// Applies random J, K, enable, clear and preset values over many clock
// edges and compares q with a reference model of the JK rule kept in the
// testbench. Also checks that clear and preset act without a clock.
module tb_jkffe;
  logic clk = 0, j = 0, k = 0, ena = 0, clrn = 1, prn = 1, q;
  logic ref_q;
  int checks = 0, failures = 0;

  jkffe dut (.clk, .j, .k, .ena, .clrn, .prn, .q);

  task automatic check(string what);
    checks++;
    if (q !== ref_q) begin
      failures++;
      $display("FAIL %s: q=%0b expected %0b (j=%0b k=%0b ena=%0b)", what, q, ref_q, j, k, ena);
    end
  endtask

  initial begin
    #1 clrn = 0;
    #1 ref_q = 0; check("async clear");
    clrn = 1;
    #1 prn = 0;
    #1 ref_q = 1; check("async preset");
    prn = 1; #1;
    repeat (400) begin
      j = 1'($urandom); k = 1'($urandom); ena = ($urandom % 4) != 0;
      #4 clk = 1;
      if (ena) case ({j, k})
        2'b01: ref_q = 0;
        2'b10: ref_q = 1;
        2'b11: ref_q = !ref_q;
        default: ;
      endcase
      #1 check("clocked");
      #4 clk = 0;
      #1;
      if ($urandom % 20 == 0) begin
        clrn = 0; #1 ref_q = 0; check("clear between edges"); clrn = 1; #1;
      end else if ($urandom % 20 == 0) begin
        prn = 0; #1 ref_q = 1; check("preset between edges"); prn = 1; #1;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
