// sat_rcg: redundant carry-generator tile (RCG0, RCG1, RCG2a-d, RCG3, RCG4).
//
// Adds two ternary digits of equal weight and re-expresses the sum as a
// binary carry c of twice the weight plus a ternary digit t: 2c + t <= x1 + x2.
// The carry depends only on the inputs, never on a neighbour, so a row of
// these tiles adds without carry propagation.
//   RCG0, RCG4: both inputs and t are offset-coded (b^0/b^2).
//     c = g1 + g2 (a 2 is present); t.g = e1.e2 + g1.g2; t.e = e1 XOR e2.
//   RCG2c: x1 is b^0, x2 is b^2, carry keyed on x2.
//     c = g2 + e2.(g1 + e1); t.g = g1.e2'; t.e = e1 XOR e2.
//   RCG2d: x1 is b^0, x2 is b^2, carry keyed on x1.
//     c = g1 + e1.(g2 + e2); t.g = g2.e1'; t.e = e1 XOR e2.
//   RCG1: x1 is b^0, x2 and t are b^1.
//     c = g1 + e1.[x2 = +1]; t.e = e1 XOR e2; t.g = g2.e1'.
//   RCG3: x1 is b^2, x2 and t are b^1.
//     c = g1 + [x2 = +1]; t.e = e1 XOR e2; t.g = g1.g2 + g1'.e1'.
//   RCG2a, RCG2b: x1 and x2 are b^1, t is b^0/b^2.
//     c = [x1 = +1] + [x2 = +1].[x1 = 0]; t.e = e1 XOR e2.
// The carry rules are the published ones; the residual-digit equations are
// derived in this design so that every set-equation holds exactly.
// With these carry rules the eight operators use six different circuits.
// Purely combinational, two to three gate levels.
module sat_rcg
  import sat_pkg::*;
#(
  parameter rcg_op_e OP = RCG0
) (
  input  tern_t x1,
  input  tern_t x2,
  output logic  c,
  output tern_t t
);

  always_comb begin
    unique case (OP)
      RCG1: begin
        c   = x1.g | (x1.e & x2.e & ~x2.g);
        t.e = x2.e ^ x1.e;
        t.g = x2.g & ~x1.e;
      end
      RCG3: begin
        c   = x1.g | (x2.e & ~x2.g);
        t.e = x2.e ^ x1.e;
        t.g = (x1.g & x2.g) | (~x1.g & ~x1.e);
      end
      RCG2C: begin
        c   = x2.g | (x2.e & (x1.g | x1.e));
        t.g = x1.g & ~x2.e;
        t.e = x1.e ^ x2.e;
      end
      RCG2D: begin
        c   = x1.g | (x1.e & (x2.g | x2.e));
        t.g = x2.g & ~x1.e;
        t.e = x1.e ^ x2.e;
      end
      RCG2A, RCG2B: begin
        c   = (x1.e & ~x1.g) | (x2.e & ~x2.g & ~x1.e);
        t.e = x1.e ^ x2.e;
        t.g = (~x1.e & ~x2.e) | (x1.e & x2.e & ~x2.g);
      end
      default: begin
        c   = x1.g | x2.g;
        t.g = (x1.e & x2.e) | (x1.g & x2.g);
        t.e = x1.e ^ x2.e;
      end
    endcase
  end

endmodule
