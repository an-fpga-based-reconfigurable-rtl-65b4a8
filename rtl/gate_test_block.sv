// gate_test_block: test design of one chip, checking each gate separately.
//
// One truth table turns the shared test vector (a, b) into the expected
// output c, and one compare cell per gate checks that gate's output op[i]
// against c, giving pass[i] and fail[i]. Testing every gate on its own is
// the tester's main feature: a chip with one bad gate still shows which
// gates can be used. The structure (one truth table, GATES compare blocks,
// the same vector to every gate) follows the tester's top-level test
// module; the device is chosen by the parameter DEVICE.
// Timing: purely combinational from (a, b, op) to pass/fail.
module gate_test_block
  import tester_pkg::*;
#(
  parameter device_e     DEVICE = DEV_74LS32,
  parameter int unsigned GATES  = NUM_GATES
) (
  input  logic             a,
  input  logic             b,
  input  logic [GATES-1:0] op,    // outputs read from the chip, gate 1 is bit 0
  output logic [GATES-1:0] pass,
  output logic [GATES-1:0] fail
);

  logic c;  // expected output, the same for every gate

  truth_table #(.FN(device_fn(DEVICE))) u_truth_table (
    .a (a),
    .b (b),
    .c (c)
  );

  for (genvar g = 0; g < GATES; g++) begin : g_cmp
    compare_cell u_compare (
      .c    (c),
      .op   (op[g]),
      .pass (pass[g]),
      .fail (fail[g])
    );
  end

endmodule
