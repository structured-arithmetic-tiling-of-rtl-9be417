// tb_sat_inv_carry_gen: exhaustive check of the six inverse carry-generators.
// For every carry and binary input, b + a must equal 2c + s and b must be a
// legal code.
module tb_sat_inv_carry_gen;
  import sat_pkg::*;
  import tb_sat_pkg::*;

  localparam int N = 6;
  // offsets per variant: {c, s, b, a}
  localparam int W[N][4] = '{'{0, 0, 0, 0}, '{0, 1, 0, 1}, '{0, 1, 1, 0},
                              '{1, 0, 1, 1}, '{1, 0, 2, 0}, '{1, 1, 2, 1}};

  int checks = 0, failures = 0;
  logic c, s;
  tern_t b[N];
  logic a[N];

  for (genvar i = 0; i < N; i++) begin : g_op
    sat_inv_carry_gen #(.OP(icg_op_e'(i))) dut (.c(c), .s(s), .b(b[i]), .a(a[i]));
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 4; v++) begin
      {c, s} = 2'(v);
      #1;
      for (int i = 0; i < N; i++) begin
        int want, got;
        want = 2 * aval(c, W[i][0]) + aval(s, W[i][1]);
        got  = bval(b[i], W[i][2]) + aval(a[i], W[i][3]);
        checks++;
        if (!blegal(b[i], W[i][2]) || got != want) begin
          failures++;
          $display("FAIL %s c=%b s=%b: got %0d want %0d", icg_op_e'(i), c, s, got, want);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
