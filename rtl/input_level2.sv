// input_level2: Input-Level-2 of a radix-16 variable-precision digit slice.
//
// Adds two radix-16 digits x and y, each written 8a^1 + 4b^0 + 2a^1 + b^0
// (value -10..+10), and a b^1 digit m4 of weight 4 (zero for addition and
// subtraction, used for multiplication), giving
//   16b^1 + 8a^1 + 4a^0 + 2a^0 + b^0   (value -24..+24).
// Both sides have diminished cardinality 48 and offset 24, so the sum is
// exact and needs no carry-in or carry-out. Nine operator tiles in five
// levels lose the surplus information:
//   level 1  HA2 (weight 8), RCG1 (weight 4, x.b4 + m4), HA2 (weight 2),
//            RCG0 (weight 1)
//   level 2  CG2b (weight 8), RCG1 (weight 4, y.b4), CG2b (weight 2)
//   level 3  HA0 (weight 8), CG2a (weight 4)
//   level 4  CG1a (weight 8)
//   level 5  HA1 (weight 16)
// The tiles and their wiring follow the published block diagram and
// information-loss chart; which operand's 4b^0 digit enters the first RCG1
// is this design's choice (the operands are interchangeable).
// An assertion flags the unused b^0 code on an operand digit.
// Purely combinational; the longest path crosses five tiles (weight 1
// to 16, through RCG0, CG2b, CG2a, CG1a, HA1).
module input_level2
  import sat_pkg::*;
(
  input  il2_operand_t x,
  input  il2_operand_t y,
  input  tern_t        m4,
  output il2_result_t  r
);

  // The unused b^0 code g = e = 1 must never reach an operand digit; the
  // tiles would read it as a wrong value. Checked once the inputs settle.
  always_comb begin
    assert final (!(x.b4.g && x.b4.e) && !(x.b1.g && x.b1.e) &&
                  !(y.b4.g && y.b4.e) && !(y.b1.g && y.b1.e))
      else $error("input_level2: unused b^0 code on an operand digit");
  end

  // Level 1
  tern_t l1_b8;   // 8b^2
  logic  l1_c8;   // 8a^0
  tern_t l1_b4;   // 4b^1
  tern_t l1_b2;   // 2b^2
  logic  l1_c2;   // 2a^0

  sat_half_adder #(.OP(HA2))  u_ha2_w8  (.a1(x.a8), .a2(y.a8), .b(l1_b8));
  sat_rcg        #(.OP(RCG1)) u_rcg1_w4 (.x1(x.b4), .x2(m4), .c(l1_c8), .t(l1_b4));
  sat_half_adder #(.OP(HA2))  u_ha2_w2  (.a1(x.a2), .a2(y.a2), .b(l1_b2));
  sat_rcg        #(.OP(RCG0)) u_rcg0_w1 (.x1(x.b1), .x2(y.b1), .c(l1_c2), .t(r.b1));

  // Level 2
  logic  l2_c16;  // 16a^1
  logic  l2_s8;   // 8a^0
  logic  l2_c8;   // 8a^0
  tern_t l2_b4;   // 4b^1
  logic  l2_c4;   // 4a^1

  sat_carry_gen  #(.OP(CG2B)) u_cg2b_w8 (.b(l1_b8), .a(l1_c8), .c(l2_c16), .s(l2_s8));
  sat_rcg        #(.OP(RCG1)) u_rcg1_w4b(.x1(y.b4), .x2(l1_b4), .c(l2_c8), .t(l2_b4));
  sat_carry_gen  #(.OP(CG2B)) u_cg2b_w2 (.b(l1_b2), .a(l1_c2), .c(l2_c4), .s(r.a2));

  // Level 3
  tern_t l3_b8;   // 8b^0
  logic  l3_c8;   // 8a^1

  sat_half_adder #(.OP(HA0))  u_ha0_w8  (.a1(l2_s8), .a2(l2_c8), .b(l3_b8));
  sat_carry_gen  #(.OP(CG2A)) u_cg2a_w4 (.b(l2_b4), .a(l2_c4), .c(l3_c8), .s(r.a4));

  // Level 4
  logic  l4_c16;  // 16a^0

  sat_carry_gen  #(.OP(CG1A)) u_cg1a_w8 (.b(l3_b8), .a(l3_c8), .c(l4_c16), .s(r.a8));

  // Level 5
  sat_half_adder #(.OP(HA1))  u_ha1_w16 (.a1(l2_c16), .a2(l4_c16), .b(r.b16));

endmodule
