// tester_pkg: types and constants shared by the chip tester.
//
// The tester checks 14-pin DIP quad 2-input gate chips of the 74 series.
// Each supported chip is a value of device_e. For each device the package
// gives:
//   - the logic function of its gates (device_fn) and that function's truth
//     table (fn_table), which is the expected response the compare blocks use;
//   - the socket pin of input A, input B and output Y of each of its four
//     gates (pin_a, pin_b, pin_y), numbered 1..14 as on the chip's
//     connection diagram. Pin 7 is GND and pin 14 is VCC on all of them.
// Which chips are supported, and their functions, follow the tester's
// device list. The pinouts of the 74LS00, 74LS02, 74LS08 and 74LS86 follow
// their data sheets. The 74LS32 has the same pinout as the 74LS00 and the
// 74LS386 has its own layout (outputs on pins 3, 4, 10 and 11); these two
// are standard pinouts, not taken from a printed diagram.
// Everything here is constant: a device is chosen when the design is built,
// which is how the tester is reconfigured.
package tester_pkg;

  // Chips the tester supports.
  typedef enum logic [2:0] {
    DEV_74LS00  = 3'd0,  // quad 2-input NAND
    DEV_74LS02  = 3'd1,  // quad 2-input NOR
    DEV_74LS08  = 3'd2,  // quad 2-input AND
    DEV_74LS32  = 3'd3,  // quad 2-input OR
    DEV_74LS86  = 3'd4,  // quad 2-input XOR
    DEV_74LS386 = 3'd5   // quad 2-input XOR, different pinout
  } device_e;

  // Logic function of one gate.
  typedef enum logic [2:0] {
    FN_OR   = 3'd0,
    FN_NAND = 3'd1,
    FN_NOR  = 3'd2,
    FN_AND  = 3'd3,
    FN_XOR  = 3'd4
  } gate_fn_e;

  localparam int unsigned NUM_GATES = 4;   // gates per chip
  localparam int unsigned DIP_PINS  = 14;  // pins of the DIP package

  // Socket pin number, 1..14.
  typedef logic [3:0] pin_num_t;

  function automatic gate_fn_e device_fn(device_e dev);
    case (dev)
      DEV_74LS00:  return FN_NAND;
      DEV_74LS02:  return FN_NOR;
      DEV_74LS08:  return FN_AND;
      DEV_74LS86:  return FN_XOR;
      DEV_74LS386: return FN_XOR;
      default:     return FN_OR;
    endcase
  endfunction

  // Truth table of a function, indexed by {B, A}: bit 0 is A=0,B=0,
  // bit 1 is A=1,B=0, bit 2 is A=0,B=1, bit 3 is A=1,B=1.
  function automatic logic [3:0] fn_table(gate_fn_e fn);
    case (fn)
      FN_NAND: return 4'b0111;
      FN_NOR:  return 4'b0001;
      FN_AND:  return 4'b1000;
      FN_XOR:  return 4'b0110;
      default: return 4'b1110;  // FN_OR
    endcase
  endfunction

  // Pin of input A of gate g (0..3).
  function automatic pin_num_t pin_a(device_e dev, int unsigned g);
    case (dev)
      DEV_74LS02: case (g)
        0: return 4'd2;  1: return 4'd5;  2: return 4'd8;  default: return 4'd11;
      endcase
      DEV_74LS386: case (g)
        0: return 4'd1;  1: return 4'd5;  2: return 4'd8;  default: return 4'd12;
      endcase
      default: case (g)
        0: return 4'd1;  1: return 4'd4;  2: return 4'd9;  default: return 4'd12;
      endcase
    endcase
  endfunction

  // Pin of input B of gate g.
  function automatic pin_num_t pin_b(device_e dev, int unsigned g);
    case (dev)
      DEV_74LS02: case (g)
        0: return 4'd3;  1: return 4'd6;  2: return 4'd9;  default: return 4'd12;
      endcase
      DEV_74LS386: case (g)
        0: return 4'd2;  1: return 4'd6;  2: return 4'd9;  default: return 4'd13;
      endcase
      default: case (g)
        0: return 4'd2;  1: return 4'd5;  2: return 4'd10; default: return 4'd13;
      endcase
    endcase
  endfunction

  // Pin of output Y of gate g.
  function automatic pin_num_t pin_y(device_e dev, int unsigned g);
    case (dev)
      DEV_74LS02: case (g)
        0: return 4'd1;  1: return 4'd4;  2: return 4'd10; default: return 4'd13;
      endcase
      DEV_74LS386: case (g)
        0: return 4'd3;  1: return 4'd4;  2: return 4'd10; default: return 4'd11;
      endcase
      default: case (g)
        0: return 4'd3;  1: return 4'd6;  2: return 4'd8;  default: return 4'd11;
      endcase
    endcase
  endfunction

endpackage
