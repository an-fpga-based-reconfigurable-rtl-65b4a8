// tb_chip_tester_top: end-to-end test of the chip tester, every device.
//
// Builds one tester per supported chip, each with a model of that chip in
// its socket, and runs them from the same clock and buttons. For each chip
// it runs a good part, then a part with gate faults (stuck at 0, stuck at 1,
// inverted), and checks the pass/fail LEDs of every gate on every vector
// against the expected result computed here from the fault it set. It also
// checks the vector sequence 00, 10, 01, 11 (A, B), its four-period sweep,
// the hold while ena is low and the clear from aclrn, and that exactly the
// chip's input pins are driven, with the right vector bit. Each of these
// mechanisms is counted and must occur at least once.
module tb_chip_tester_top;
  import tester_pkg::*;
  localparam int NDEV = 6;

  logic clk = 0, ena = 0, aclrn = 1;
  logic [14:0] po[NDEV], poe[NDEV], pin[NDEV];
  logic [3:0]  pass_led[NDEV], fail_led[NDEV];
  logic [7:0]  fault[NDEV];

  int checks = 0, failures = 0;
  int n_vec[4], n_pass, n_fail, n_hold, n_clear, n_sweep, n_flt[4];

  always #5 clk = !clk;

  for (genvar d = 0; d < NDEV; d++) begin : g_dev
    chip_tester_top #(.DEVICE(device_e'(d))) u_tester (
      .clk, .ena, .aclrn,
      .sock_pin_o(po[d]), .sock_pin_oe(poe[d]), .sock_pin_i(pin[d]),
      .pass_led(pass_led[d]), .fail_led(fail_led[d]));
    quad_gate_chip_model #(.DEV(d)) u_chip (
      .drv_o(po[d]), .drv_oe(poe[d]), .fault(fault[d]), .pin(pin[d]));
  end

  // the vector the tester should be applying: low bit A, high bit B
  logic [1:0] ref_v;

  // A good gate of chip d fails a vector only if its fault changes the output.
  function automatic logic gate_fails(int d, logic [1:0] f, logic [1:0] v);
    logic good;
    case (d)
      0:       good = !(v[0] && v[1]);
      1:       good = !(v[0] || v[1]);
      2:       good = v[0] && v[1];
      4, 5:    good = v[0] ^ v[1];
      default: good = v[0] || v[1];
    endcase
    case (f)
      2'd1:    return good != 1'b0;
      2'd2:    return good != 1'b1;
      2'd3:    return 1'b1;
      default: return 1'b0;
    endcase
  endfunction

  // pins of A, B per gate, as printed on each chip's connection diagram
  function automatic int exp_pin(int d, int which, int g);
    int std_p[2][4] = '{'{1, 4, 9, 12}, '{2, 5, 10, 13}};
    int nor_p[2][4] = '{'{2, 5, 8, 11}, '{3, 6, 9, 12}};
    int x38_p[2][4] = '{'{1, 5, 8, 12}, '{2, 6, 9, 13}};
    if (d == 1) return nor_p[which][g];
    if (d == 5) return x38_p[which][g];
    return std_p[which][g];
  endfunction

  // exactly the chip's input pins are driven, A pins with A, B pins with B
  task automatic check_pins();
    for (int d = 0; d < NDEV; d++) begin
      logic [14:0] exp_oe, exp_o;
      exp_oe = '0; exp_o = '0;
      for (int g = 0; g < 4; g++) begin
        exp_oe[exp_pin(d, 0, g)] = 1; exp_o[exp_pin(d, 0, g)] = ref_v[0];
        exp_oe[exp_pin(d, 1, g)] = 1; exp_o[exp_pin(d, 1, g)] = ref_v[1];
      end
      checks++;
      if (poe[d] !== exp_oe || (po[d] & poe[d]) !== exp_o || poe[d][7] || poe[d][14]) begin
        failures++;
        $display("FAIL device %0d pins: oe=%b o=%b expected oe=%b o=%b", d, poe[d], po[d], exp_oe, exp_o);
      end
    end
  endtask

  task automatic check_leds();
    for (int d = 0; d < NDEV; d++)
      for (int g = 0; g < 4; g++) begin
        logic f;
        f = gate_fails(d, fault[d][2*g +: 2], ref_v);
        checks++;
        if (pass_led[d][g] !== !f || fail_led[d][g] !== f) begin
          failures++;
          $display("FAIL %0t device %0d gate %0d vector %b fault %0d: pass=%0b fail=%0b",
                   $time, d, g, ref_v, fault[d][2*g +: 2], pass_led[d][g], fail_led[d][g]);
        end
        if (f) n_fail++; else n_pass++;
        if (f) n_flt[fault[d][2*g +: 2]]++;
      end
  endtask

  // run n clock periods, checking after each falling edge
  task automatic run(int n);
    repeat (n) begin
      @(negedge clk); #1;
      ref_v = ref_v + 2'd1;
      n_vec[ref_v]++;
      if (ref_v == 2'b00) n_sweep++;
      checks++;
      if (g_dev[0].u_tester.da !== ref_v[0] || g_dev[0].u_tester.db !== ref_v[1]) begin
        failures++;
        $display("FAIL vector %b expected %b", {g_dev[0].u_tester.db, g_dev[0].u_tester.da}, ref_v);
      end
      check_leds();
      check_pins();
    end
  endtask

  initial begin
    for (int d = 0; d < NDEV; d++) fault[d] = '0;
    ref_v = 2'b00;
    #1 aclrn = 0;
    #1 check_leds(); n_clear++;
    aclrn = 1; ena = 1;
    // good chips: two full sweeps
    run(8);
    // faulty chips: a different fault pattern per device, then random ones
    for (int d = 0; d < NDEV; d++) fault[d] = 8'(d * 8'h27 + 8'h1b);
    #1 check_leds();
    run(8);
    repeat (6) begin
      for (int d = 0; d < NDEV; d++) fault[d] = 8'($urandom);
      #1 check_leds();
      run(4);
    end
    // hold: vector and LEDs stay put while ena is low
    ena = 0;
    repeat (3) begin
      @(negedge clk); #1; n_hold++;
      checks++;
      if ({g_dev[0].u_tester.db, g_dev[0].u_tester.da} !== ref_v) begin
        failures++; $display("FAIL vector moved while ena low");
      end
      check_leds();
    end
    ena = 1;
    run(3);
    // clear in mid period
    @(posedge clk); #2 aclrn = 0; #1 ref_v = 2'b00; n_clear++;
    checks++;
    if ({g_dev[0].u_tester.db, g_dev[0].u_tester.da} !== 2'b00) begin
      failures++; $display("FAIL clear did not reset the vector");
    end
    check_leds();
    aclrn = 1;
    run(4);

    // every mechanism must have happened
    for (int v = 0; v < 4; v++) begin
      checks++; if (n_vec[v] == 0) begin failures++; $display("FAIL vector %0d never applied", v); end
    end
    for (int f = 1; f < 4; f++) begin
      checks++; if (n_flt[f] == 0) begin failures++; $display("FAIL fault kind %0d never detected", f); end
    end
    checks++; if (n_pass == 0)  begin failures++; $display("FAIL no pass seen"); end
    checks++; if (n_fail == 0)  begin failures++; $display("FAIL no fail seen"); end
    checks++; if (n_hold == 0)  begin failures++; $display("FAIL hold never exercised"); end
    checks++; if (n_clear < 2)  begin failures++; $display("FAIL clear never exercised"); end
    checks++; if (n_sweep == 0) begin failures++; $display("FAIL no complete sweep"); end
    $display("vectors %0d/%0d/%0d/%0d sweeps %0d pass %0d fail %0d (sa0 %0d sa1 %0d inv %0d) holds %0d clears %0d",
             n_vec[0], n_vec[1], n_vec[2], n_vec[3], n_sweep, n_pass, n_fail,
             n_flt[1], n_flt[2], n_flt[3], n_hold, n_clear);
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
