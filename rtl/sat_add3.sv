// sat_add3: unsigned adder decomposed into half-adder and carry-generator
// tiles, the introductory example of the structured-arithmetic method.
//
// Adding two N-bit unsigned numbers, (sum of 2^i a^0) + (sum of 2^i a^0),
// gives an (N+1)-bit result whose diminished cardinality exceeds that of
// the inputs by one. A weight-1 a^0 input, cin, restores the balance; tie
// it to 0 (a "mythical" input) for plain addition or use it as a carry-in.
// At each weight an HA0 tile merges the two operand bits into a b^0 digit
// and a CG0 tile adds the incoming carry, producing the sum bit and the
// carry of the next weight; the top carry is the weight-2^N sum bit.
// The operand width and the carry-in follow the published example (N = 3);
// the choice of HA0 + CG0 per weight, a ripple structure, is this design's
// (the example stops at the balanced set-equation).
// Purely combinational; the carry path crosses N carry-generators.
module sat_add3
  import sat_pkg::*;
#(
  parameter int unsigned N = 3
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic         cin,
  output logic [N:0]   sum
);

  logic  [N:0]   carry;
  tern_t [N-1:0] merged;

  assign carry[0] = cin;

  for (genvar i = 0; i < N; i++) begin : g_weight
    sat_half_adder #(.OP(HA0)) u_ha (.a1(a[i]), .a2(b[i]), .b(merged[i]));
    sat_carry_gen  #(.OP(CG0)) u_cg (.b(merged[i]), .a(carry[i]), .c(carry[i+1]), .s(sum[i]));
  end

  assign sum[N] = carry[N];

endmodule
