// tb_sat_inv_half_adder: exhaustive check of IHA0, IHA1, IHA2.
// Every legal ternary code is split; a1 + a2 must equal its value.
module tb_sat_inv_half_adder;
  import sat_pkg::*;
  import tb_sat_pkg::*;

  localparam int N = 3;
  // offsets per variant: {b, a1, a2}
  localparam int W[N][3] = '{'{0, 0, 0}, '{1, 1, 0}, '{2, 1, 1}};

  int checks = 0, failures = 0;
  tern_t b;
  logic a1[N], a2[N];

  for (genvar i = 0; i < N; i++) begin : g_op
    sat_inv_half_adder #(.OP(iha_op_e'(i))) dut (.b(b), .a1(a1[i]), .a2(a2[i]));
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
      b = 2'(v);
      #1;
      for (int i = 0; i < N; i++) begin
        int want, got;
        if (!blegal(b, W[i][0])) continue;
        want = bval(b, W[i][0]);
        got  = aval(a1[i], W[i][1]) + aval(a2[i], W[i][2]);
        checks++;
        if (got != want) begin
          failures++;
          $display("FAIL %s b=%b: got %0d want %0d", iha_op_e'(i), b, got, want);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
