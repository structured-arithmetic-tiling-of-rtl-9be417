// tb_sat_cond_comp: exhaustive check of CC2 and CC4.
// CC2: the b^1 output must equal the input, negated when sigma = 1.
// CC4: the d^2 digit 2zc + z (offsets 1 and 0) must equal +/- 2xc + x.
module tb_sat_cond_comp;
  import sat_pkg::*;
  import tb_sat_pkg::*;

  int checks = 0, failures = 0;
  logic sigma, xc;
  tern_t x;
  logic zc[2];
  tern_t z[2];

  for (genvar i = 0; i < 2; i++) begin : g_op
    sat_cond_comp #(.OP(cc_op_e'(i))) dut (.sigma(sigma), .xc(xc), .x(x), .zc(zc[i]), .z(z[i]));
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      int want, got;
      {sigma, xc, x} = 4'(v);
      #1;
      // CC2 on b^1
      want = sigma ? -bval(x, 1) : bval(x, 1);
      got  = bval(z[0], 1);
      checks++;
      if (got != want || zc[0] != xc) begin
        failures++;
        $display("FAIL CC2 sigma=%b x=%b: got %0d want %0d", sigma, x, got, want);
      end
      // CC4 on 2a^1 + b^0
      if (blegal(x, 0)) begin
        want = 2 * aval(xc, 1) + bval(x, 0);
        if (sigma) want = -want;
        got = 2 * aval(zc[1], 1) + bval(z[1], 0);
        checks++;
        if (!blegal(z[1], 0) || got != want) begin
          failures++;
          $display("FAIL CC4 sigma=%b xc=%b x=%b: got %0d want %0d", sigma, xc, x, got, want);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
