// tb_sat_pkg: reference decoding of digit codes, shared by the testbenches.
//
// The functions turn a digit code into the integer it stands for, written
// directly from the digit-set definitions (offset w, see sat_pkg) rather
// than from any tile's logic, so that a testbench can check each operator
// by value: the weighted sum of the outputs must equal that of the inputs.
package tb_sat_pkg;
  import sat_pkg::*;

  // Binary digit of offset w (0: {0,1}, 1: {-1,0}).
  function automatic int aval(logic b, int w);
    return int'(b) - w;
  endfunction

  // Ternary digit of offset w (0: {0,1,2}, 1: {-1,0,1}, 2: {-2,-1,0}).
  function automatic int bval(tern_t d, int w);
    if (w == 1) return d.e ? (d.g ? -1 : 1) : 0;
    return 2 * int'(d.g) + int'(d.e) - w;
  endfunction

  // Codes that may appear: g = e = 1 is unused for offsets 0 and 2.
  function automatic bit blegal(tern_t d, int w);
    return (w == 1) || !(d.g && d.e);
  endfunction

endpackage
