// tb_stimulus_counter: self-checking test of the 2-bit stimulus counter.
//
// Checks that after a clear the vector {db, da} steps 00, 01, 10, 11, 00 ...
// one step per clock period on the falling clock edge, that a full sweep
// takes four periods, that it holds while ena is low, and that aclrn clears
// it at once.
module tb_stimulus_counter;
  logic clk = 0, ena = 0, aclrn = 1, da, db;
  int checks = 0, failures = 0;
  logic [1:0] ref_v;
  int steps, sweep_start, period_count;

  stimulus_counter dut (.clk, .ena, .aclrn, .da, .db);

  always #5 clk = !clk;   // 10-unit period, falling edges at 10, 20, ...

  task automatic check(string what);
    checks++;
    if ({db, da} !== ref_v) begin
      failures++;
      $display("FAIL %s at %0t: {db,da}=%b expected %b", what, $time, {db, da}, ref_v);
    end
  endtask

  initial begin
    #1 aclrn = 0;
    #1 ref_v = 2'b00; check("cleared");
    aclrn = 1; ena = 1;
    // rising edges must not move it
    @(posedge clk); #1 check("rising edge holds");
    steps = 0; sweep_start = 0;
    repeat (40) begin
      @(negedge clk); #1;
      ref_v = ref_v + 2'd1;
      steps++;
      check("step");
      if (ref_v == 2'b00) begin
        checks++;
        if (steps != 4 && sweep_start != 0) begin
          failures++;
          $display("FAIL sweep took %0d periods, expected 4", steps);
        end
        sweep_start = 1; steps = 0;
      end
    end
    // hold while disabled
    ena = 0;
    repeat (6) begin @(negedge clk); #1 check("hold with ena low"); end
    ena = 1;
    @(negedge clk); #1 ref_v = ref_v + 2'd1; check("resume");
    // asynchronous clear in mid period
    @(posedge clk); #2 aclrn = 0; #1 ref_v = 2'b00; check("async clear");
    @(negedge clk); #1 check("held in clear");
    aclrn = 1;
    @(negedge clk); #1 ref_v = 2'b01; check("first step after clear");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #5000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
