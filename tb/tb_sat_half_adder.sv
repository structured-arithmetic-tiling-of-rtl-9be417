// tb_sat_half_adder: exhaustive check of HA0, HA1, HA2.
// All three variants are instantiated and driven with every input pair; the
// ternary output must be a legal code whose value equals the sum of the two
// binary inputs, each read at its own offset.
module tb_sat_half_adder;
  import sat_pkg::*;
  import tb_sat_pkg::*;

  localparam int N = 3;
  // offsets per variant: {a1, a2, b}
  localparam int W[N][3] = '{'{0, 0, 0}, '{1, 0, 1}, '{1, 1, 2}};

  int checks = 0, failures = 0;
  logic a1, a2;
  tern_t b[N];

  for (genvar i = 0; i < N; i++) begin : g_op
    sat_half_adder #(.OP(ha_op_e'(i))) dut (.a1(a1), .a2(a2), .b(b[i]));
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
      {a1, a2} = 2'(v);
      #1;
      for (int i = 0; i < N; i++) begin
        int want, got;
        want = aval(a1, W[i][0]) + aval(a2, W[i][1]);
        got  = bval(b[i], W[i][2]);
        checks++;
        if (!blegal(b[i], W[i][2]) || got != want) begin
          failures++;
          $display("FAIL %s a1=%b a2=%b: got %0d want %0d", ha_op_e'(i), a1, a2, got, want);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
