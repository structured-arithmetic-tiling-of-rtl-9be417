// tb_sat_top: end-to-end test of sat_top at its default parameters.
// Runs Input-Level-2 over every legal operand pair and
// 4b^1 input, and exercises each tile slot (IHA0, ICG0, IRCG0, CC4, MPY1.0a,
// MPY2.0a and the b^1-by-d^2 multiplier MPY4.2a) over all its inputs, checking
// every output by value. It counts the mechanisms that must occur at least
// once: addition and multiplication input to Input-Level-2, a negative and a
// positive weight-16 digit, complementing (sigma = 1) and passing (sigma = 0)
// in the complementer, and a negative, zero and positive multiplier digit.
// The three-bit example adder is checked over all operands and carry-ins,
// counting carry-outs and carry-ins.
module tb_sat_top;
  import sat_pkg::*;
  import tb_sat_pkg::*;

  int checks = 0, failures = 0;
  int n_add = 0, n_mpy = 0, n_pos16 = 0, n_neg16 = 0;
  int n_cout = 0, n_cin = 0;
  int n_comp = 0, n_pass = 0, n_mneg = 0, n_mzero = 0, n_mpos = 0;

  il2_operand_t il2_x, il2_y;
  tern_t        il2_m4;
  il2_result_t  il2_r;
  logic [2:0]   add3_a, add3_b;
  logic         add3_cin;
  logic [3:0]   add3_sum;
  tern_t        iha_b;
  logic         iha_a1, iha_a2;
  logic         icg_c, icg_s, icg_a;
  tern_t        icg_b;
  logic         ircg_c;
  tern_t        ircg_t, ircg_b1, ircg_b2;
  logic         cc_sigma, cc_xc, cc_zc;
  tern_t        cc_x, cc_z;
  logic         mpy1_x, mpy1_y, mpy1_z;
  tern_t        mpy2_x, mpy2_y, mpy2_z;
  logic         mpy2_a;
  logic         mpy4_xc, mpy4_c;
  tern_t        mpy4_x, mpy4_y, mpy4_z;

  sat_top dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  function automatic int opval(il2_operand_t o);
    return 8 * aval(o.a8, 1) + 4 * bval(o.b4, 0) + 2 * aval(o.a2, 1) + bval(o.b1, 0);
  endfunction

  function automatic int resval(il2_result_t q);
    return 16 * bval(q.b16, 1) + 8 * aval(q.a8, 1) + 4 * aval(q.a4, 0) + 2 * aval(q.a2, 0)
           + bval(q.b1, 0);
  endfunction

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    {iha_b, icg_c, icg_s, ircg_c, ircg_t, cc_sigma, cc_xc, cc_x} = '0;
    {add3_a, add3_b, add3_cin} = '0;
    {mpy1_x, mpy1_y, mpy2_x, mpy2_y, mpy2_a, mpy4_xc, mpy4_x, mpy4_y} = '0;

    // Input-Level-2
    for (int v = 0; v < 1 << 14; v++) begin
      {il2_x, il2_y, il2_m4} = 14'(v);
      if (!blegal(il2_x.b4, 0) || !blegal(il2_x.b1, 0) ||
          !blegal(il2_y.b4, 0) || !blegal(il2_y.b1, 0)) continue;
      #1;
      check(blegal(il2_r.b1, 0) &&
            resval(il2_r) == opval(il2_x) + opval(il2_y) + 4 * bval(il2_m4, 1),
            $sformatf("input_level2 x=%b y=%b m4=%b", il2_x, il2_y, il2_m4));
      if (bval(il2_m4, 1) == 0) n_add++; else n_mpy++;
      if (bval(il2_r.b16, 1) > 0) n_pos16++;
      if (bval(il2_r.b16, 1) < 0) n_neg16++;
    end

    {il2_x, il2_y} = '0;  // leave legal operand codes behind
    #1;

    // three-bit adder, with the mythical input at 0 and used as carry-in
    for (int v = 0; v < 128; v++) begin
      {add3_cin, add3_a, add3_b} = 7'(v);
      #1;
      check(int'(add3_sum) == int'(add3_a) + int'(add3_b) + int'(add3_cin),
            $sformatf("add3 %0d + %0d + %0d", add3_a, add3_b, add3_cin));
      if (add3_sum[3]) n_cout++;
      if (add3_cin) n_cin++;
    end

    // tile slots
    for (int v = 0; v < 32; v++) begin
      {iha_b, icg_c, icg_s} = 4'(v);
      {ircg_c, ircg_t} = 3'(v);
      {cc_sigma, cc_xc, cc_x} = 4'(v);
      {mpy1_x, mpy1_y} = 2'(v);
      {mpy2_x, mpy2_a} = 3'(v);
      {mpy4_xc, mpy4_x, mpy4_y} = 5'(v);
      #1;
      if (blegal(iha_b, 0))
        check(aval(iha_a1, 0) + aval(iha_a2, 0) == bval(iha_b, 0), "IHA0");
      check(bval(icg_b, 0) + aval(icg_a, 0) == 2 * aval(icg_c, 0) + aval(icg_s, 0), "ICG0");
      if (blegal(ircg_t, 0))
        check(bval(ircg_b1, 0) + bval(ircg_b2, 0) == 2 * aval(ircg_c, 0) + bval(ircg_t, 0),
              "IRCG0");
      if (blegal(cc_x, 0)) begin
        int d;
        d = 2 * aval(cc_xc, 1) + bval(cc_x, 0);
        check(blegal(cc_z, 0) && 2 * aval(cc_zc, 1) + bval(cc_z, 0) == (cc_sigma ? -d : d), "CC4");
        if (cc_sigma) n_comp++; else n_pass++;
      end
      check(aval(mpy1_z, 0) == aval(mpy1_x, 0) * aval(mpy1_y, 0), "MPY1.0a");
      if (blegal(mpy2_x, 0))
        check(blegal(mpy2_z, 0) && bval(mpy2_z, 0) == bval(mpy2_x, 0) * aval(mpy2_a, 0), "MPY2.0a");
      if (blegal(mpy4_x, 0)) begin
        int d;
        d = 2 * aval(mpy4_xc, 1) + bval(mpy4_x, 0);
        check(blegal(mpy4_z, 0) &&
              2 * aval(mpy4_c, 1) + bval(mpy4_z, 0) == d * bval(mpy4_y, 1), "MPY4.2a");
        if (bval(mpy4_y, 1) < 0) n_mneg++;
        else if (bval(mpy4_y, 1) > 0) n_mpos++;
        else n_mzero++;
      end
    end

    $display("il2: addition=%0d multiplication-input=%0d b16+=%0d b16-=%0d", n_add, n_mpy,
             n_pos16, n_neg16);
    $display("cc: complement=%0d pass=%0d; mpy4.2a: neg=%0d zero=%0d pos=%0d", n_comp, n_pass,
             n_mneg, n_mzero, n_mpos);
    check(n_add > 0 && n_mpy > 0 && n_pos16 > 0 && n_neg16 > 0, "Input-Level-2 mechanism missed");
    $display("add3: carry-out=%0d carry-in=%0d", n_cout, n_cin);
    check(n_cout > 0 && n_cin > 0, "three-bit adder mechanism missed");
    check(n_comp > 0 && n_pass > 0 && n_mneg > 0 && n_mzero > 0 && n_mpos > 0,
          "tile-slot mechanism missed");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
