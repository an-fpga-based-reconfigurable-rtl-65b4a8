// truth_table: expected response of one gate of the device under test.
//
// Given the test vector (a, b) it returns c, the value a good gate of the
// chosen function must produce. The function is fixed when the design is
// built (parameter FN), which is how the tester is retargeted to another
// chip. The function is held as its 4-row truth table, looked up by {b, a}
// (see tester_pkg::fn_table). Functions OR, NAND, NOR, AND and XOR follow
// the devices the tester supports; storing them as a packed table is this
// design's choice.
// Timing: purely combinational.
module truth_table
  import tester_pkg::*;
#(
  parameter gate_fn_e FN = FN_OR
) (
  input  logic a,
  input  logic b,
  output logic c   // expected output of a good gate
);

  localparam logic [3:0] TABLE = fn_table(FN);

  always_comb c = TABLE[{b, a}];

endmodule
