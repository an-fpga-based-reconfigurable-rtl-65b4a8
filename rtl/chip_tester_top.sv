// chip_tester_top: FPGA test design of the reconfigurable digital chip tester.
//
// A chip in the 14-pin socket is tested by applying every input combination
// to its gates and comparing each gate's output with the expected value.
// A 2-bit counter steps the vector (A, B) through 00, 10, 01, 11 (A is the
// low bit), the same vector goes to both inputs of every gate through the
// device's pin assignment (the pin numbers are in tester_pkg), and one
// compare per gate lights that gate's green (pass) or red (fail) LED. The chip type is the parameter DEVICE: testing
// another chip means rebuilding the design with another value.
//
// Interface: clk is the board clock; ena (high = run) and aclrn (low =
// clear the counter) come from push buttons. The socket is seen as pins
// 1..14, each with a driven value, an output enable and a sensed level.
// pass_led[g] / fail_led[g] are the LEDs of gate g+1, active high.
// Timing: the vector changes after each falling edge of clk and the LEDs
// follow the vector and the chip's outputs combinationally, so a full test
// of the four vectors takes four clock periods and is repeated while ena is
// high. A gate that fails only some vectors shows fail only while those
// vectors are applied.
// The blocks and their wiring follow the tester's schematic. There the pin
// assignment is made in the FPGA tools, one fixed pin per signal for each
// device; here the socket is seen as 14 bidirectional pins and the
// assignment is written into the design, which is this design's choice.
module chip_tester_top
  import tester_pkg::*;
#(
  parameter device_e     DEVICE = DEV_74LS32,
  parameter int unsigned GATES  = NUM_GATES
) (
  input  logic              clk,
  input  logic              ena,
  input  logic              aclrn,
  output logic [DIP_PINS:0] sock_pin_o,
  output logic [DIP_PINS:0] sock_pin_oe,
  input  logic [DIP_PINS:0] sock_pin_i,
  output logic [GATES-1:0]  pass_led,
  output logic [GATES-1:0]  fail_led
);

  logic             da, db;      // test vector
  logic [GATES-1:0] dut_op;      // gate outputs read from the socket

  stimulus_counter u_counter (
    .clk   (clk),
    .ena   (ena),
    .aclrn (aclrn),
    .da    (da),
    .db    (db)
  );

  // Pin assignment: the vector goes to both inputs of every gate, on the
  // pins the chip's pinout gives them, and each gate's output is read back
  // from its own pin. Only the chip's input pins are driven; its outputs,
  // GND (pin 7) and VCC (pin 14) are left alone. For a given DEVICE every
  // enable is a constant and the rest is wiring.
  always_comb begin
    sock_pin_o  = '0;
    sock_pin_oe = '0;
    for (int unsigned g = 0; g < GATES; g++) begin
      sock_pin_o[pin_a(DEVICE, g)]  = da;
      sock_pin_oe[pin_a(DEVICE, g)] = 1'b1;
      sock_pin_o[pin_b(DEVICE, g)]  = db;
      sock_pin_oe[pin_b(DEVICE, g)] = 1'b1;
    end
  end

  always_comb begin
    for (int unsigned g = 0; g < GATES; g++)
      dut_op[g] = sock_pin_i[pin_y(DEVICE, g)];
  end

  gate_test_block #(.DEVICE(DEVICE), .GATES(GATES)) u_test (
    .a    (da),
    .b    (db),
    .op   (dut_op),
    .pass (pass_led),
    .fail (fail_led)
  );

endmodule
