// tb_sat_inv_rcg: exhaustive check of the eight inverse redundant
// carry-generators. For every carry and legal ternary input, b1 + b2 must
// equal 2c + t and both outputs must be legal codes.
module tb_sat_inv_rcg;
  import sat_pkg::*;
  import tb_sat_pkg::*;

  localparam int N = 8;
  // offsets per variant: {c, t, b1, b2}
  localparam int W[N][4] = '{'{0, 0, 0, 0}, '{0, 1, 0, 1}, '{1, 0, 1, 1}, '{0, 2, 1, 1},
                              '{1, 0, 0, 2}, '{0, 2, 2, 0}, '{1, 1, 2, 1}, '{1, 2, 2, 2}};

  int checks = 0, failures = 0;
  logic c;
  tern_t t;
  tern_t b1[N], b2[N];

  for (genvar i = 0; i < N; i++) begin : g_op
    sat_inv_rcg #(.OP(ircg_op_e'(i))) dut (.c(c), .t(t), .b1(b1[i]), .b2(b2[i]));
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      {c, t} = 3'(v);
      #1;
      for (int i = 0; i < N; i++) begin
        int want, got;
        if (!blegal(t, W[i][1])) continue;
        want = 2 * aval(c, W[i][0]) + bval(t, W[i][1]);
        got  = bval(b1[i], W[i][2]) + bval(b2[i], W[i][3]);
        checks++;
        if (!blegal(b1[i], W[i][2]) || !blegal(b2[i], W[i][3]) || got != want) begin
          failures++;
          $display("FAIL %s c=%b t=%b: got %0d want %0d", ircg_op_e'(i), c, t, got, want);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
