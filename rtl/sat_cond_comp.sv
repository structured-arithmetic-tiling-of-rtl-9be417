// sat_cond_comp: conditional complementer (CC2, CC4).
//
// Negates a symmetric digit when sigma = 1, so that subtraction can be done
// by adding the complement. CC2 negates a b^1 digit by flipping its sign bit
// (z.g = g XOR sigma); the xc/zc pair is passed through untouched. CC4
// negates the radix-4 digit d^2 = 2a^1 + b^0 (values -2..+2): the 2a^1 bit
// is flipped and the b^0 code k becomes 2 - k (z.g = e'.(g XOR sigma),
// z.e = e). Both follow the published equations; the inverted e in CC4 is
// this design's reading.
// Purely combinational, one or two gate levels.
module sat_cond_comp
  import sat_pkg::*;
#(
  parameter cc_op_e OP = CC2
) (
  input  logic  sigma,
  input  logic  xc,
  input  tern_t x,
  output logic  zc,
  output tern_t z
);

  always_comb begin
    if (OP == CC4) begin
      zc  = xc ^ sigma;
      z.g = ~x.e & (x.g ^ sigma);
      z.e = x.e;
    end else begin
      zc  = xc;
      z.g = x.g ^ sigma;
      z.e = x.e;
    end
  end

endmodule
