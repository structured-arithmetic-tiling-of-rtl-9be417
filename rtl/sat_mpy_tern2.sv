// sat_mpy_tern2: elementary ternary-by-ternary multipliers (MPY4.x).
//
// Multiplies two ternary digits (or a b^1 digit by the radix-4 digit
// d^2 = 2a^1 + b^0) and writes the product as a binary carry c of weight 2
// plus a ternary digit z.
//   MPY4.0a  2a^0 + b^0 <= b^0 * b^0 : magnitudes 0..4; c = g1.(g2 + e2)
//   MPY4.0b  2a^0 + b^0 <= b^2 * b^2 : same circuit on the mirrored codes
//   MPY4.4a  2a^1 + b^2 <= b^0 * b^2 : same circuit, result mirrored
//   MPY4.2a  2a^1 + b^0 <= b^1 * (2a^1 + b^0) : the b^1-by-d^2 multiplier,
//            a conditional complementer gated by the b^1 digit y
//   MPY4.2b  2a^1 + b^0 <= b^0 * b^1
//   MPY4.2c  2a^1 + b^0 <= b^2 * b^1
// x is the b^0/b^2 (or d^2, with xc) factor, y the other factor. A product
// of 2 goes to the carry when x is 2 in magnitude (published carry
// equation); a zero product of the b^1 multipliers is coded as c = 1, z = 0.
// Purely combinational, two to three gate levels.
module sat_mpy_tern2
  import sat_pkg::*;
#(
  parameter mpy4_op_e OP = MPY4_0A
) (
  input  logic  xc,
  input  tern_t x,
  input  tern_t y,
  output logic  c,
  output tern_t z
);

  // Unsigned product of two offset codes 0..2 as 2*pc + pt.
  function automatic logic [2:0] mag_mul(tern_t p, tern_t q);
    logic  pc;
    tern_t pt;
    pc   = p.g & (q.g | q.e);
    pt.g = (p.g & q.g) | (p.e & q.g);
    pt.e = p.e & q.e;
    return {pc, pt};
  endfunction

  logic [2:0] prod;
  tern_t      xm;

  always_comb begin
    xm   = code_mirror(x);
    prod = '0;
    unique case (OP)
      MPY4_0B: begin
        prod = mag_mul(xm, code_mirror(y));
        {c, z} = prod;
      end
      MPY4_4A: begin
        prod = mag_mul(x, code_mirror(y));
        c    = ~prod[2];
        z    = code_mirror(prod[1:0]);
      end
      MPY4_2A: begin
        c   = y.e ? (xc ^ y.g) : 1'b1;
        z.g = y.e & ~x.e & (x.g ^ y.g);
        z.e = y.e & x.e;
      end
      MPY4_2B: begin
        c   = ~(y.e & y.g & (x.g | x.e));
        z.g = y.e & ~y.g & x.g;
        z.e = y.e & x.e;
      end
      MPY4_2C: begin
        c   = ~(y.e & ~y.g & (xm.g | xm.e));
        z.g = y.e & y.g & xm.g;
        z.e = y.e & xm.e;
      end
      default: begin
        prod = mag_mul(x, y);
        {c, z} = prod;
      end
    endcase
  end

endmodule
