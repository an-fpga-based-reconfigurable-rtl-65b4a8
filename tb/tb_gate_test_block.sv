// tb_gate_test_block: self-checking test of the per-chip test block.
//
// First replays the four-vector OR-gate simulation of the tester, in which
// the four chip outputs are fixed patterns (op1 follows B, op2 follows A, op3
// is always 0, op4 always 1), and checks every pass/fail value of that
// run. Then, for every supported device, applies random vectors and random
// chip outputs and checks each gate's pass/fail against the gate function
// written as an expression.
module tb_gate_test_block;
  import tester_pkg::*;
  int checks = 0, failures = 0;

  // ---- part 1: the OR-gate simulation, 74LS32 ----
  logic       a, b;
  logic [3:0] op, pass, fail;

  gate_test_block #(.DEVICE(DEV_74LS32)) u_or (.a, .b, .op, .pass, .fail);

  // Expected pass bits per vector, gate 1 in bit 0, vectors in the order
  // (A,B) = 00, 10, 01, 11.
  localparam logic [3:0] EXP_PASS[4] = '{4'b0111, 4'b1010, 4'b1001, 4'b1011};

  // ---- part 2: every device ----
  localparam int NDEV = 6;
  logic [NDEV-1:0]      ra, rb;
  logic [3:0]           rop  [NDEV];
  logic [3:0]           rpass[NDEV];
  logic [3:0]           rfail[NDEV];

  for (genvar d = 0; d < NDEV; d++) begin : g_dev
    gate_test_block #(.DEVICE(device_e'(d))) u_blk (
      .a(ra[d]), .b(rb[d]), .op(rop[d]), .pass(rpass[d]), .fail(rfail[d]));
  end

  function automatic logic ref_fn(int d, logic x, logic y);
    case (d)
      0:       return !(x && y);
      1:       return !(x || y);
      2:       return x && y;
      4, 5:    return x ^ y;
      default: return x || y;
    endcase
  endfunction

  initial begin
    for (int v = 0; v < 4; v++) begin
      a = v[0]; b = v[1];
      op = {1'b1, 1'b0, a, b};   // op4, op3, op2, op1
      #1;
      checks++;
      if (pass !== EXP_PASS[v] || fail !== ~EXP_PASS[v]) begin
        failures++;
        $display("FAIL OR run vector %0d: pass=%b fail=%b expected pass=%b", v, pass, fail, EXP_PASS[v]);
      end
    end
    repeat (200) begin
      for (int d = 0; d < NDEV; d++) begin
        ra[d] = 1'($urandom); rb[d] = 1'($urandom); rop[d] = 4'($urandom);
      end
      #1;
      for (int d = 0; d < NDEV; d++)
        for (int g = 0; g < 4; g++) begin
          logic e;
          e = ref_fn(d, ra[d], rb[d]);
          checks++;
          if (rpass[d][g] !== (rop[d][g] == e) || rfail[d][g] !== (rop[d][g] != e)) begin
            failures++;
            $display("FAIL device %0d gate %0d: a=%0b b=%0b op=%0b pass=%0b fail=%0b",
                     d, g, ra[d], rb[d], rop[d][g], rpass[d][g], rfail[d][g]);
          end
        end
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
