// quad_gate_chip_model: behavioural model of a 14-pin quad 2-input gate chip.
//
// Stands in for the chip in the tester's socket. It reads the levels on the
// socket pins, computes each gate's output and drives it onto that gate's
// output pin. Its pinouts and functions are written out here on their own,
// from the chips' connection diagrams, so that they check the tester's
// tables rather than repeat them. Each gate can be made faulty through
// fault[g]: FLT_NONE (good), FLT_SA0 / FLT_SA1 (output stuck at 0 / 1) or
// FLT_INV (output inverted). Pins it does not drive read back what the
// tester drives; the model is not synthesizable logic.
module quad_gate_chip_model #(
  parameter int DEV = 3   // tester_pkg::device_e value of the chip
) (
  input  logic [14:0] drv_o,   // value the tester drives, per pin
  input  logic [14:0] drv_oe,  // 1 where the tester drives the pin
  input  logic [7:0]  fault,   // 2 bits per gate, gate 0 in bits 1:0
  output logic [14:0] pin      // resolved level on each pin
);

  localparam logic [1:0] FLT_NONE = 2'd0, FLT_SA0 = 2'd1, FLT_SA1 = 2'd2, FLT_INV = 2'd3;

  // Pin tables, gate 0..3. 74LS00/08/32/86 share one layout.
  localparam int STD_A[4]  = '{1, 4, 9, 12};
  localparam int STD_B[4]  = '{2, 5, 10, 13};
  localparam int STD_Y[4]  = '{3, 6, 8, 11};
  localparam int NOR_A[4]  = '{2, 5, 8, 11};
  localparam int NOR_B[4]  = '{3, 6, 9, 12};
  localparam int NOR_Y[4]  = '{1, 4, 10, 13};
  localparam int X386_A[4] = '{1, 5, 8, 12};
  localparam int X386_B[4] = '{2, 6, 9, 13};
  localparam int X386_Y[4] = '{3, 4, 10, 11};

  function automatic int pa(int g);
    return (DEV == 1) ? NOR_A[g] : (DEV == 5) ? X386_A[g] : STD_A[g];
  endfunction
  function automatic int pb(int g);
    return (DEV == 1) ? NOR_B[g] : (DEV == 5) ? X386_B[g] : STD_B[g];
  endfunction
  function automatic int py(int g);
    return (DEV == 1) ? NOR_Y[g] : (DEV == 5) ? X386_Y[g] : STD_Y[g];
  endfunction

  function automatic logic good_out(logic a, logic b);
    case (DEV)
      0:       return !(a && b);   // 74LS00 NAND
      1:       return !(a || b);   // 74LS02 NOR
      2:       return a && b;      // 74LS08 AND
      4, 5:    return a ^ b;       // 74LS86, 74LS386 XOR
      default: return a || b;      // 74LS32 OR
    endcase
  endfunction

  always_comb begin
    logic [14:0] lv;
    lv = drv_o & drv_oe;   // undriven pins read as 0
    pin = lv;
    for (int g = 0; g < 4; g++) begin
      logic y;
      y = good_out(lv[pa(g)], lv[pb(g)]);
      case (fault[2*g +: 2])
        FLT_SA0: y = 1'b0;
        FLT_SA1: y = 1'b1;
        FLT_INV: y = !y;
        default: ;
      endcase
      pin[py(g)] = y;
    end
  end

endmodule
