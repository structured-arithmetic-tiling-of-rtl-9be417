// sat_mpy_tern: elementary ternary-by-binary multipliers (MPY2.x).
//
// Multiplies a ternary digit x by a binary digit a (or, for MPY2.1c, by a
// second b^1 digit y) into one ternary digit z. No carry is needed because
// the product always fits one ternary digit.
//   MPY2.0a  b^0 <= b^0 * a^0 : gate both bits with a
//   MPY2.0b  b^0 <= b^2 * a^1 : a = 0 (-1) negates x into b^0, a = 1 gives 0
//   MPY2.1a  b^1 <= b^1 * a^0 : e gated by a, sign kept
//   MPY2.1b  b^1 <= b^1 * a^1 : e gated by a', sign inverted
//   MPY2.1c  b^1 <= b^1 * b^1 : e = e1.e2, g = g1 XOR g2
//   MPY2.2a  b^2 <= b^2 * a^0 : a = 0 forces the code of 0 (g = 1)
//   MPY2.2b  b^2 <= b^0 * a^1 : a = 0 negates x into b^2, a = 1 gives 0
// MPY2.0a, 2.1a and 2.1c are as published; the inverters of the others
// follow from the offset codes of this design.
// Purely combinational, one or two gate levels.
module sat_mpy_tern
  import sat_pkg::*;
#(
  parameter mpy2_op_e OP = MPY2_0A
) (
  input  tern_t x,
  input  logic  a,
  input  tern_t y,
  output tern_t z
);

  always_comb begin
    unique case (OP)
      MPY2_0B: z = '{g: ~a & ~x.g & ~x.e, e: ~a & x.e};
      MPY2_1A: z = '{g: x.g, e: a & x.e};
      MPY2_1B: z = '{g: ~x.g, e: ~a & x.e};
      MPY2_1C: z = '{g: x.g ^ y.g, e: x.e & y.e};
      MPY2_2A: z = '{g: ~a | x.g, e: a & x.e};
      MPY2_2B: z = '{g: a | (~x.g & ~x.e), e: ~a & x.e};
      default: z = '{g: a & x.g, e: a & x.e};
    endcase
  end

endmodule
