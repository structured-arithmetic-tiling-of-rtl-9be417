// sat_inv_rcg: inverse redundant carry-generator (IRCG0 ... IRCG4).
//
// Undoes a redundant carry-generator: a carry c of weight 2 and a ternary
// digit t become two ternary digits b1 and b2 of weight 1: b1 + b2 <= 2c + t.
// b1 carries the old digit, converted between the b^1 code and the offset
// code where the set-equation asks for it; b2 carries the carry, as 0 or 2
// in offset code (IRCG0, 2c, 2d, 4) or as -1/+1 in b^1 code (IRCG1, 2a, 2b, 3).
// Robertson used such a tile to turn a d^2 digit into two b^1 digits.
// Purely combinational, one gate level.
module sat_inv_rcg
  import sat_pkg::*;
#(
  parameter ircg_op_e OP = IRCG0
) (
  input  logic  c,
  input  tern_t t,
  output tern_t b1,
  output tern_t b2
);

  always_comb begin
    unique case (OP)
      IRCG1, IRCG3: begin  // b^1 in; b^0/b^2 + b^1 out
        b1 = b1_to_code(t);
        b2 = '{g: ~c, e: 1'b1};
      end
      IRCG2A, IRCG2B: begin  // b^0/b^2 in; b^1 + b^1 out
        b1 = code_to_b1(t);
        b2 = '{g: ~c, e: 1'b1};
      end
      default: begin
        b1 = t;
        b2 = '{g: c, e: 1'b0};
      end
    endcase
  end

endmodule
