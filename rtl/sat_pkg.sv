// sat_pkg: shared types for the structured-arithmetic operator tiles.
//
// A ternary digit is carried on two wires, g (the "Greek" bit) and e (the
// "English" bit). Binary digits are single wires. The digit-set offset fixes
// what a code means:
//   a^0 : bit v stands for v            a^1 : bit v stands for v - 1
//   b^0 : code 2g+e stands for 0..2     b^2 : code 2g+e stands for -2..0
//         (g = e = 1 is never produced)
//   b^1 : e = 0 stands for 0; e = 1 stands for -1 when g = 1, +1 when g = 0
// With this choice every operator on a^0/a^1/b^0/b^2 digits works on the
// same offset codes, so several named operators share one circuit. Only b^1
// is coded differently (zero has two codes), and the functions below convert
// a b^1 digit to and from its offset code (value + 1). The operator names
// and their logic come from Robertson's theory of decomposition; the exact
// code assignment is this design's reading of the published equations.
package sat_pkg;

  typedef struct packed {
    logic g;  // Greek bit
    logic e;  // English bit
  } tern_t;

  typedef enum logic [1:0] {HA0, HA1, HA2} ha_op_e;
  typedef enum logic [2:0] {CG0, CG1A, CG1B, CG2A, CG2B, CG3} cg_op_e;
  typedef enum logic [2:0] {RCG0, RCG1, RCG2A, RCG2B, RCG2C, RCG2D, RCG3, RCG4} rcg_op_e;
  typedef enum logic [1:0] {IHA0, IHA1, IHA2} iha_op_e;
  typedef enum logic [2:0] {ICG0, ICG1A, ICG1B, ICG2A, ICG2B, ICG3} icg_op_e;
  typedef enum logic [2:0] {IRCG0, IRCG1, IRCG2A, IRCG2B, IRCG2C, IRCG2D, IRCG3, IRCG4} ircg_op_e;
  typedef enum logic [0:0] {CC2, CC4} cc_op_e;
  typedef enum logic [1:0] {MPY1_0A, MPY1_0B, MPY1_1} mpy1_op_e;
  typedef enum logic [2:0] {MPY2_0A, MPY2_0B, MPY2_1A, MPY2_1B, MPY2_1C, MPY2_2A, MPY2_2B} mpy2_op_e;
  typedef enum logic [2:0] {MPY4_0A, MPY4_0B, MPY4_4A, MPY4_2A, MPY4_2B, MPY4_2C} mpy4_op_e;

  // Input-Level-2 operand: 8a^1 + 4b^0 + 2a^1 + b^0 (a radix-16 digit whose
  // value runs from -10 to +10).
  typedef struct packed {
    logic  a8;  // weight 8, a^1
    tern_t b4;  // weight 4, b^0
    logic  a2;  // weight 2, a^1
    tern_t b1;  // weight 1, b^0
  } il2_operand_t;

  // Input-Level-2 result: 16b^1 + 8a^1 + 4a^0 + 2a^0 + b^0.
  typedef struct packed {
    tern_t b16;  // weight 16, b^1
    logic  a8;   // weight 8, a^1
    logic  a4;   // weight 4, a^0
    logic  a2;   // weight 2, a^0
    tern_t b1;   // weight 1, b^0
  } il2_result_t;

  // b^1 digit -> offset code (value + 1): +1 -> 2, 0 -> 1, -1 -> 0.
  function automatic tern_t b1_to_code(tern_t d);
    return '{g: d.e & ~d.g, e: ~d.e};
  endfunction

  // Offset code 0..2 -> b^1 digit (value - 1).
  function automatic tern_t code_to_b1(tern_t k);
    return '{g: ~k.g, e: ~k.e};
  endfunction

  // Mirror an offset code about 1 (code k -> 2 - k), i.e. negate the value
  // of a b^0/b^2 digit while moving it to the opposite offset.
  function automatic tern_t code_mirror(tern_t k);
    return '{g: ~k.g & ~k.e, e: k.e};
  endfunction

endpackage
