// jkffe: JK flip-flop with clock enable, asynchronous clear and preset.
//
// This is the flip-flop the stimulus counter is built from. On a rising edge
// of clk, with ena high, q follows the JK rule: J=0,K=0 holds, J=0,K=1 clears,
// J=1,K=0 sets, J=1,K=1 toggles. With ena low q holds. clrn and prn are
// active low and act at once, without a clock; clrn wins if both are low.
// The ports and their names follow the JKFFE primitive the counter schematic
// uses; the priority of clear over preset is this design's choice. Clear and
// preset share one asynchronous load so that the flip-flop maps onto a
// single register with one asynchronous input; a side effect is that clrn
// falling while prn is already low is only seen at the next clock edge or
// release. The tester ties prn high, so this never arises there.
// Timing: q changes right after the rising clk edge, or right after clrn/prn
// fall.
module jkffe (
  input  logic clk,   // clock, rising edge
  input  logic j,
  input  logic k,
  input  logic ena,   // clock enable, active high
  input  logic clrn,  // asynchronous clear, active low
  input  logic prn,   // asynchronous preset, active low
  output logic q
);

  // Clear and preset are merged into one asynchronous load: while either is
  // low, q is loaded with clrn (0 when clearing, 1 when only presetting).
  logic async_n;
  assign async_n = clrn & prn;

  always_ff @(posedge clk or negedge async_n) begin
    if (!async_n)   q <= clrn;
    else if (ena) begin
      unique case ({j, k})
        2'b00: q <= q;
        2'b01: q <= 1'b0;
        2'b10: q <= 1'b1;
        2'b11: q <= ~q;
      endcase
    end
  end

endmodule
