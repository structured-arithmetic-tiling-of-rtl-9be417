// tb_sat_mpy_tern2: exhaustive check of the six MPY4 multipliers by value.
// 2c + z must equal x * y, each digit read at its own offset; for MPY4.2a
// the first factor is the d^2 digit 2xc + x (offsets 1 and 0).
module tb_sat_mpy_tern2;
  import sat_pkg::*;
  import tb_sat_pkg::*;

  localparam int N = 6;
  // offsets per variant: {x, y, c, z}; x offset -1 marks the d^2 factor
  localparam int W[N][4] = '{'{0, 0, 0, 0}, '{2, 2, 0, 0}, '{0, 2, 1, 2},
                              '{-1, 1, 1, 0}, '{0, 1, 1, 0}, '{2, 1, 1, 0}};

  int checks = 0, failures = 0;
  logic xc;
  tern_t x, y;
  logic c[N];
  tern_t z[N];

  for (genvar i = 0; i < N; i++) begin : g_op
    sat_mpy_tern2 #(.OP(mpy4_op_e'(i))) dut (.xc(xc), .x(x), .y(y), .c(c[i]), .z(z[i]));
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
      {xc, x, y} = 5'(v);
      #1;
      for (int i = 0; i < N; i++) begin
        int want, got, fx;
        if (W[i][0] < 0) begin
          if (!blegal(x, 0)) continue;
          fx = 2 * aval(xc, 1) + bval(x, 0);
        end else begin
          if (!blegal(x, W[i][0])) continue;
          fx = bval(x, W[i][0]);
        end
        if (!blegal(y, W[i][1])) continue;
        want = fx * bval(y, W[i][1]);
        got  = 2 * aval(c[i], W[i][2]) + bval(z[i], W[i][3]);
        checks++;
        if (!blegal(z[i], W[i][3]) || got != want) begin
          failures++;
          $display("FAIL %s xc=%b x=%b y=%b: got %0d want %0d", mpy4_op_e'(i), xc, x, y, got, want);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
