// stimulus_counter: 2-bit ripple counter that makes the test vector.
//
// Functional testing applies every input combination of a 2-input gate to
// the chip. The vector comes from a 2-bit counter built from two JK
// flip-flops with J and K tied high, so each toggles on its clock. The first
// flip-flop is clocked by the inverted board clock and gives da, the
// low bit; the second is clocked by the inverse of da and gives db, the
// high bit, so it toggles each time da falls. {db, da} therefore runs
// 00, 01, 10, 11 and repeats, one step per clock period, changing on the
// falling edge of clk. da drives input A and db input B of every gate.
// ena (high = count) and aclrn (low = clear both bits to 0, at once) go to
// both flip-flops. This structure follows the counter schematic of the
// tester; leaving the preset inputs inactive is this design's choice.
// Timing: da settles after each falling clk edge; db settles one flip-flop
// delay after da falls (a ripple counter), so a full sweep of the four
// vectors takes four clock periods.
module stimulus_counter (
  input  logic clk,    // board clock
  input  logic ena,    // count enable, active high
  input  logic aclrn,  // asynchronous clear, active low
  output logic da,     // vector bit A (low bit)
  output logic db      // vector bit B (high bit)
);

  logic clk_n;   // clock of the first stage
  logic da_n;    // clock of the second stage

  assign clk_n = ~clk;
  assign da_n  = ~da;

  jkffe u_ff_a (
    .clk  (clk_n),
    .j    (1'b1),
    .k    (1'b1),
    .ena  (ena),
    .clrn (aclrn),
    .prn  (1'b1),
    .q    (da)
  );

  jkffe u_ff_b (
    .clk  (da_n),
    .j    (1'b1),
    .k    (1'b1),
    .ena  (ena),
    .clrn (aclrn),
    .prn  (1'b1),
    .q    (db)
  );

endmodule
