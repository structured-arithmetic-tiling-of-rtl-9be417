// sat_half_adder: generalized half-adder tile (HA0, HA1, HA2).
//
// Adds two binary digits of equal weight into one ternary digit of that
// weight, losing no information: b <= a1 + a2. HA0 (a^0 + a^0 -> b^0) and
// HA2 (a^1 + a^1 -> b^2) are the same circuit, g = AND, e = XOR, as in the
// published tables. HA1 (a^1 + a^0 -> b^1) produces the b^1 code of this
// design (see sat_pkg): e = XNOR (digit is nonzero when both bits agree) and
// g = NOT a^1 (the sign); the inversions are this design's reading.
// For HA1, a1 is the a^1 digit and a2 the a^0 digit.
// Purely combinational, one gate level.
module sat_half_adder
  import sat_pkg::*;
#(
  parameter ha_op_e OP = HA0
) (
  input  logic  a1,
  input  logic  a2,
  output tern_t b
);

  always_comb begin
    if (OP == HA1) begin
      b.g = ~a1;
      b.e = ~(a1 ^ a2);
    end else begin
      b.g = a1 & a2;
      b.e = a1 ^ a2;
    end
  end

endmodule
