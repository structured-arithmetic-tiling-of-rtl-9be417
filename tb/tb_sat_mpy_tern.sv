// tb_sat_mpy_tern: exhaustive check of the seven MPY2 multipliers by value.
// The second factor is the binary digit a, except for MPY2.1c, whose second
// factor is the b^1 digit y.
module tb_sat_mpy_tern;
  import sat_pkg::*;
  import tb_sat_pkg::*;

  localparam int N = 7;
  // offsets per variant: {x, second factor, z}
  localparam int W[N][3] = '{'{0, 0, 0}, '{2, 1, 0}, '{1, 0, 1}, '{1, 1, 1},
                              '{1, 1, 1}, '{2, 0, 2}, '{0, 1, 2}};

  int checks = 0, failures = 0;
  tern_t x, y;
  logic a;
  tern_t z[N];

  for (genvar i = 0; i < N; i++) begin : g_op
    sat_mpy_tern #(.OP(mpy2_op_e'(i))) dut (.x(x), .a(a), .y(y), .z(z[i]));
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 32; v++) begin
      {x, y, a} = 5'(v);
      #1;
      for (int i = 0; i < N; i++) begin
        int want, got, f2;
        if (!blegal(x, W[i][0])) continue;
        f2   = (mpy2_op_e'(i) == MPY2_1C) ? bval(y, 1) : aval(a, W[i][1]);
        want = bval(x, W[i][0]) * f2;
        got  = bval(z[i], W[i][2]);
        checks++;
        if (!blegal(z[i], W[i][2]) || got != want) begin
          failures++;
          $display("FAIL %s x=%b a=%b y=%b: got %0d want %0d", mpy2_op_e'(i), x, a, y, got, want);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
