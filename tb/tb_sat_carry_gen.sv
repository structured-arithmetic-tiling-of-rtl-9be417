// tb_sat_carry_gen: exhaustive check of CG0, CG1a, CG1b, CG2a, CG2b, CG3.
// Every legal (ternary, binary) input is applied to all six variants; the
// value 2c + s must equal b + a, each digit read at its own offset.
module tb_sat_carry_gen;
  import sat_pkg::*;
  import tb_sat_pkg::*;

  localparam int N = 6;
  // offsets per variant: {b, a, c, s}
  localparam int W[N][4] = '{'{0, 0, 0, 0}, '{0, 1, 0, 1}, '{1, 0, 0, 1},
                              '{1, 1, 1, 0}, '{2, 0, 1, 0}, '{2, 1, 1, 1}};

  int checks = 0, failures = 0;
  tern_t b;
  logic a;
  logic c[N], s[N];

  for (genvar i = 0; i < N; i++) begin : g_op
    sat_carry_gen #(.OP(cg_op_e'(i))) dut (.b(b), .a(a), .c(c[i]), .s(s[i]));
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
      {b, a} = 3'(v);
      #1;
      for (int i = 0; i < N; i++) begin
        int want, got;
        if (!blegal(b, W[i][0])) continue;
        want = bval(b, W[i][0]) + aval(a, W[i][1]);
        got  = 2 * aval(c[i], W[i][2]) + aval(s[i], W[i][3]);
        checks++;
        if (got != want) begin
          failures++;
          $display("FAIL %s b=%b a=%b: got %0d want %0d", cg_op_e'(i), b, a, got, want);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
