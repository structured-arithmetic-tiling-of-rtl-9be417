// tb_sat_rcg: exhaustive check of the eight redundant carry-generators.
// Every legal pair of ternary inputs is applied; 2c + t must equal x1 + x2
// and t must be a legal code. The test also checks the property that makes
// these tiles useful: every variant produces a carry for some inputs.
module tb_sat_rcg;
  import sat_pkg::*;
  import tb_sat_pkg::*;

  localparam int N = 8;
  // offsets per variant: {x1, x2, c, t}
  localparam int W[N][4] = '{'{0, 0, 0, 0}, '{0, 1, 0, 1}, '{1, 1, 1, 0}, '{1, 1, 0, 2},
                              '{0, 2, 1, 0}, '{0, 2, 0, 2}, '{2, 1, 1, 1}, '{2, 2, 1, 2}};

  int checks = 0, failures = 0;
  int carries[N];
  tern_t x1, x2;
  logic c[N];
  tern_t t[N];

  for (genvar i = 0; i < N; i++) begin : g_op
    sat_rcg #(.OP(rcg_op_e'(i))) dut (.x1(x1), .x2(x2), .c(c[i]), .t(t[i]));
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (carries[i]) carries[i] = 0;
    for (int v = 0; v < 16; v++) begin
      {x1, x2} = 4'(v);
      #1;
      for (int i = 0; i < N; i++) begin
        int want, got;
        if (!blegal(x1, W[i][0]) || !blegal(x2, W[i][1])) continue;
        want = bval(x1, W[i][0]) + bval(x2, W[i][1]);
        got  = 2 * aval(c[i], W[i][2]) + bval(t[i], W[i][3]);
        checks++;
        if (!blegal(t[i], W[i][3]) || got != want) begin
          failures++;
          $display("FAIL %s x1=%b x2=%b: got %0d want %0d", rcg_op_e'(i), x1, x2, got, want);
        end
        if (c[i] != 1'(W[i][2])) carries[i]++;
      end
    end
    for (int i = 0; i < N; i++) begin
      checks++;
      if (carries[i] == 0) begin
        failures++;
        $display("FAIL %s never changed its carry", rcg_op_e'(i));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
