// sat_carry_gen: carry-generator tile (CG0, CG1a, CG1b, CG2a, CG2b, CG3).
//
// Adds a ternary digit b and a binary digit a of the same weight and
// re-expresses the sum as a carry c of twice the weight plus a binary digit
// s: 2c + s <= b + a. This is where information is lost: three input wires
// become two. CG0, CG1a, CG2b and CG3 work on offset codes only and share
// c = g + e.a, s = e XOR a, as published. CG1b and CG2a take a b^1 digit;
// their carry c = e.g' + e'.a follows the published equation, the sum bit
// is an XNOR so that the set-equation holds with this design's b^1 code.
// Purely combinational, two gate levels.
module sat_carry_gen
  import sat_pkg::*;
#(
  parameter cg_op_e OP = CG0
) (
  input  tern_t b,
  input  logic  a,
  output logic  c,
  output logic  s
);

  always_comb begin
    if (OP == CG1B || OP == CG2A) begin
      c = (b.e & ~b.g) | (~b.e & a);
      s = ~(b.e ^ a);
    end else begin
      c = b.g | (b.e & a);
      s = b.e ^ a;
    end
  end

endmodule
