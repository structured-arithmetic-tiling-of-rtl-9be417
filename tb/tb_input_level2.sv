// tb_input_level2: exhaustive check of the Input-Level-2 adder.
// Every legal pair of operands (36 codes each) is applied with each of the
// four codes of the 4b^1 input; the result digits, read at their offsets,
// must equal x + y + 4*m4 and be legal codes. The test counts the cases that
// exercise the module's mechanisms: plain addition (m4 = 0), the
// multiplication input (m4 = +/-1), both codes of a zero b^1 digit, and a
// positive and a negative weight-16 output digit; each must occur.
module tb_input_level2;
  import sat_pkg::*;
  import tb_sat_pkg::*;

  int checks = 0, failures = 0;
  int n_add = 0, n_mpy = 0, n_zero_alt = 0, n_pos16 = 0, n_neg16 = 0;
  int vmin = 0, vmax = 0;
  il2_operand_t x, y;
  tern_t m4;
  il2_result_t r;

  input_level2 dut (.x(x), .y(y), .m4(m4), .r(r));

  function automatic int opval(il2_operand_t o);
    return 8 * aval(o.a8, 1) + 4 * bval(o.b4, 0) + 2 * aval(o.a2, 1) + bval(o.b1, 0);
  endfunction

  function automatic bit oplegal(il2_operand_t o);
    return blegal(o.b4, 0) && blegal(o.b1, 0);
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
    for (int vx = 0; vx < 64; vx++) begin
      for (int vy = 0; vy < 64; vy++) begin
        for (int vm = 0; vm < 4; vm++) begin
          int want, got;
          x  = 6'(vx);
          y  = 6'(vy);
          m4 = 2'(vm);
          if (!oplegal(x) || !oplegal(y)) continue;
          #1;
          want = opval(x) + opval(y) + 4 * bval(m4, 1);
          got  = resval(r);
          checks++;
          if (!blegal(r.b1, 0) || got != want) begin
            failures++;
            if (failures < 10)
              $display("FAIL x=%b y=%b m4=%b: got %0d want %0d", x, y, m4, got, want);
          end
          if (bval(m4, 1) == 0) n_add++; else n_mpy++;
          if (m4 == '{g: 1'b1, e: 1'b0}) n_zero_alt++;
          if (bval(r.b16, 1) > 0) n_pos16++;
          if (bval(r.b16, 1) < 0) n_neg16++;
          if (want < vmin) vmin = want;
          if (want > vmax) vmax = want;
        end
      end
    end
    x = '0;  // leave legal operand codes behind
    y = '0;
    #1;
    $display("addition=%0d multiplication-input=%0d alt-zero=%0d b16+=%0d b16-=%0d range %0d..%0d",
             n_add, n_mpy, n_zero_alt, n_pos16, n_neg16, vmin, vmax);
    checks++;
    if (n_add == 0 || n_mpy == 0 || n_zero_alt == 0 || n_pos16 == 0 || n_neg16 == 0) begin
      failures++;
      $display("FAIL a mechanism was never exercised");
    end
    // the full output range -24..+24 must have been reached
    checks++;
    if (vmin != -24 || vmax != 24) begin
      failures++;
      $display("FAIL range %0d..%0d", vmin, vmax);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
