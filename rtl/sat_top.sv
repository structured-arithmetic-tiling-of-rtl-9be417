// sat_top: the Input-Level-2 adder and the three-bit example adder next to
// one tile of every other operator family of the structured-arithmetic
// library.
//
// Input-Level-2 (see input_level2) and the three-bit adder (see sat_add3)
// are the complete modules the operator set is wired into here; between
// them they use half-adders, carry-generators and redundant
// carry-generators. The two stand side by side, each with its own ports. The remaining families (inverse operators,
// conditional complementers and the elementary multipliers) are building
// blocks of larger arithmetic arrays that are not specified in full, so each
// is brought out as a stand-alone tile slot with its own ports; a parameter
// picks which named operator the slot is. All paths are combinational.
module sat_top
  import sat_pkg::*;
#(
  parameter iha_op_e  IHA_OP  = IHA0,
  parameter icg_op_e  ICG_OP  = ICG0,
  parameter ircg_op_e IRCG_OP = IRCG0,
  parameter cc_op_e   CC_OP   = CC4,
  parameter mpy1_op_e MPY1_OP = MPY1_0A,
  parameter mpy2_op_e MPY2_OP = MPY2_0A,
  parameter mpy4_op_e MPY4_OP = MPY4_2A
) (
  // Input-Level-2
  input  il2_operand_t il2_x,
  input  il2_operand_t il2_y,
  input  tern_t        il2_m4,
  output il2_result_t  il2_r,
  // three-bit example adder
  input  logic [2:0]   add3_a,
  input  logic [2:0]   add3_b,
  input  logic         add3_cin,
  output logic [3:0]   add3_sum,
  // inverse half-adder slot
  input  tern_t        iha_b,
  output logic         iha_a1,
  output logic         iha_a2,
  // inverse carry-generator slot
  input  logic         icg_c,
  input  logic         icg_s,
  output tern_t        icg_b,
  output logic         icg_a,
  // inverse redundant carry-generator slot
  input  logic         ircg_c,
  input  tern_t        ircg_t,
  output tern_t        ircg_b1,
  output tern_t        ircg_b2,
  // conditional complementer slot
  input  logic         cc_sigma,
  input  logic         cc_xc,
  input  tern_t        cc_x,
  output logic         cc_zc,
  output tern_t        cc_z,
  // binary multiplier slot
  input  logic         mpy1_x,
  input  logic         mpy1_y,
  output logic         mpy1_z,
  // ternary-by-binary multiplier slot
  input  tern_t        mpy2_x,
  input  logic         mpy2_a,
  input  tern_t        mpy2_y,
  output tern_t        mpy2_z,
  // ternary-by-ternary multiplier slot
  input  logic         mpy4_xc,
  input  tern_t        mpy4_x,
  input  tern_t        mpy4_y,
  output logic         mpy4_c,
  output tern_t        mpy4_z
);

  input_level2 u_il2 (.x(il2_x), .y(il2_y), .m4(il2_m4), .r(il2_r));
  sat_add3     u_add3 (.a(add3_a), .b(add3_b), .cin(add3_cin), .sum(add3_sum));

  sat_inv_half_adder #(.OP(IHA_OP))  u_iha  (.b(iha_b), .a1(iha_a1), .a2(iha_a2));
  sat_inv_carry_gen  #(.OP(ICG_OP))  u_icg  (.c(icg_c), .s(icg_s), .b(icg_b), .a(icg_a));
  sat_inv_rcg        #(.OP(IRCG_OP)) u_ircg (.c(ircg_c), .t(ircg_t), .b1(ircg_b1), .b2(ircg_b2));
  sat_cond_comp      #(.OP(CC_OP))   u_cc   (.sigma(cc_sigma), .xc(cc_xc), .x(cc_x), .zc(cc_zc), .z(cc_z));
  sat_mpy_bin        #(.OP(MPY1_OP)) u_mpy1 (.x(mpy1_x), .y(mpy1_y), .z(mpy1_z));
  sat_mpy_tern       #(.OP(MPY2_OP)) u_mpy2 (.x(mpy2_x), .a(mpy2_a), .y(mpy2_y), .z(mpy2_z));
  sat_mpy_tern2      #(.OP(MPY4_OP)) u_mpy4 (.xc(mpy4_xc), .x(mpy4_x), .y(mpy4_y), .c(mpy4_c), .z(mpy4_z));

endmodule
