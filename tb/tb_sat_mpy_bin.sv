// tb_sat_mpy_bin: exhaustive check of MPY1.0a, MPY1.0b, MPY1.1 by value.
module tb_sat_mpy_bin;
  import sat_pkg::*;
  import tb_sat_pkg::*;

  localparam int N = 3;
  // offsets per variant: {x, y, z}
  localparam int W[N][3] = '{'{0, 0, 0}, '{1, 1, 0}, '{1, 0, 1}};

  int checks = 0, failures = 0;
  logic x, y;
  logic z[N];

  for (genvar i = 0; i < N; i++) begin : g_op
    sat_mpy_bin #(.OP(mpy1_op_e'(i))) dut (.x(x), .y(y), .z(z[i]));
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
      {x, y} = 2'(v);
      #1;
      for (int i = 0; i < N; i++) begin
        int want, got;
        want = aval(x, W[i][0]) * aval(y, W[i][1]);
        got  = aval(z[i], W[i][2]);
        checks++;
        if (got != want) begin
          failures++;
          $display("FAIL %s x=%b y=%b: got %0d want %0d", mpy1_op_e'(i), x, y, got, want);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
