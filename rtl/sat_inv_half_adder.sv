// sat_inv_half_adder: inverse half-adder, or converter (IHA0, IHA1, IHA2).
//
// Splits one ternary digit into two binary digits of the same weight:
// a1 + a2 <= b. IHA0 and IHA2 share a1 = g, a2 = g + e, as published. IHA1
// splits a b^1 digit into a^1 (a1 = NOT g) and a^0 (a2 = g XOR e); the
// inversion on a1 matches this design's b^1 code (see sat_pkg).
// Purely combinational, one gate level.
module sat_inv_half_adder
  import sat_pkg::*;
#(
  parameter iha_op_e OP = IHA0
) (
  input  tern_t b,
  output logic  a1,
  output logic  a2
);

  always_comb begin
    if (OP == IHA1) begin
      a1 = ~b.g;
      a2 = b.g ^ b.e;
    end else begin
      a1 = b.g;
      a2 = b.g | b.e;
    end
  end

endmodule
