// tb_chip_tester_full: the tester as built by default (74LS32, quad OR).
//
// Runs the default tester with an OR-chip model in the socket through a
// complete test, a sweep of all four vectors, twice: once with a good chip,
// where all four green LEDs must stay on, and once with the fourth gate
// stuck at 0, where gate 4's red LED must light on the three vectors whose
// OR is 1 and gates 1 to 3 must pass throughout. Checks that a sweep takes
// four clock periods.
module tb_chip_tester_full;
  logic clk = 0, ena = 0, aclrn = 1;
  logic [14:0] po, poe, pin;
  logic [3:0]  pass_led, fail_led;
  logic [7:0]  fault = '0;
  int checks = 0, failures = 0;
  logic [1:0] v;
  int fail4_count, start_t;

  always #5 clk = !clk;

  chip_tester_top u_tester (
    .clk, .ena, .aclrn,
    .sock_pin_o(po), .sock_pin_oe(poe), .sock_pin_i(pin),
    .pass_led, .fail_led);

  quad_gate_chip_model #(.DEV(3)) u_chip (.drv_o(po), .drv_oe(poe), .fault, .pin);

  task automatic expect_leds(logic [3:0] exp_pass);
    checks++;
    if (pass_led !== exp_pass || fail_led !== ~exp_pass) begin
      failures++;
      $display("FAIL vector %b: pass=%b fail=%b expected pass=%b", v, pass_led, fail_led, exp_pass);
    end
  endtask

  initial begin
    #1 aclrn = 0;
    #1 aclrn = 1; ena = 1;
    v = 2'b00;
    // good chip
    expect_leds(4'b1111);
    start_t = $time;
    repeat (4) begin
      @(negedge clk); #1 v = v + 2'd1;
      expect_leds(4'b1111);
    end
    checks++;
    if (v != 2'b00 || ($time - start_t) > 41 || ($time - start_t) < 39) begin
      failures++; $display("FAIL sweep did not take four periods");
    end
    // fourth gate stuck at 0
    fault = 8'b01_00_00_00;
    fail4_count = 0;
    repeat (4) begin
      #1 expect_leds((v == 2'b00) ? 4'b1111 : 4'b0111);
      if (fail_led[3]) fail4_count++;
      @(negedge clk); #1 v = v + 2'd1;
    end
    checks++;
    if (fail4_count != 3) begin
      failures++; $display("FAIL gate 4 failed on %0d vectors, expected 3", fail4_count);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
