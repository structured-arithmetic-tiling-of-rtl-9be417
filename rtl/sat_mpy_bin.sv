// sat_mpy_bin: elementary binary multipliers (MPY1.0a, MPY1.0b, MPY1.1).
//
// Multiplies two binary digits into one binary digit.
//   MPY1.0a  a^0 <= a^0 * a^0 : z = x AND y
//   MPY1.0b  a^0 <= a^1 * a^1 : (-1)(-1) = 1, so z = x' AND y'
//   MPY1.1   a^1 <= a^1 * a^0 : product -1 only for x = 0, y = 1, z = x + y'
// x is the first factor of the set-equation, y the second. The inverters in
// MPY1.0b and MPY1.1 follow from the a^1 offset code of this design.
// Purely combinational, one gate level.
module sat_mpy_bin
  import sat_pkg::*;
#(
  parameter mpy1_op_e OP = MPY1_0A
) (
  input  logic x,
  input  logic y,
  output logic z
);

  always_comb begin
    unique case (OP)
      MPY1_0B: z = ~x & ~y;
      MPY1_1:  z = x | ~y;
      default: z = x & y;
    endcase
  end

endmodule
