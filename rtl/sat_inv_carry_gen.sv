// sat_inv_carry_gen: inverse carry-generator (ICG0 ... ICG3).
//
// Undoes a carry-generator: a carry c of weight 2 and a binary digit s of
// weight 1 become a ternary digit b and a binary digit a, both of weight 1:
// b + a <= 2c + s. The binary digit passes straight through and the carry
// becomes the ternary digit: b = (g = c, e = 0) for an offset-coded b^0/b^2
// output (as published), b = (g = NOT c, e = 1), i.e. +1 or -1, for the b^1
// output of ICG1b and ICG2a (the inversion is this design's reading).
// No gates beyond one inverter: the tile is mostly wiring.
module sat_inv_carry_gen
  import sat_pkg::*;
#(
  parameter icg_op_e OP = ICG0
) (
  input  logic  c,
  input  logic  s,
  output tern_t b,
  output logic  a
);

  always_comb begin
    a = s;
    if (OP == ICG1B || OP == ICG2A) b = '{g: ~c, e: 1'b1};
    else                            b = '{g: c, e: 1'b0};
  end

endmodule
