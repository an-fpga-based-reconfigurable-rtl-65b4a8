// compare_cell: pass/fail decision for one output of the device under test.
//
// It compares op, the output read from one gate of the chip, with c, the
// expected value from the truth table. When they agree pass is 1 and fail
// 0 (green LED on); when they differ fail is 1 and pass 0 (red LED on).
// Exactly one of the two is high at any time. This follows the tester's
// compare function.
// Timing: purely combinational; the outputs follow the current vector.
module compare_cell (
  input  logic c,     // expected value
  input  logic op,    // value read from the chip
  output logic pass,  // drives the green LED
  output logic fail   // drives the red LED
);

  always_comb begin
    pass = (op == c);
    fail = !pass;
  end

endmodule
