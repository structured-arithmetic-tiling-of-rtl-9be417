// tb_sat_add3: exhaustive check of the three-bit tile adder.
// Every pair of operands is added with cin = 0 (mythical input) and with
// cin = 1 (carry-in); the result must equal a + b + cin. The test counts
// results that use the weight-8 carry-out and both cin settings.
module tb_sat_add3;
  localparam int unsigned N = 3;

  int checks = 0, failures = 0;
  int n_cout = 0, n_cin = 0, n_myth = 0;
  logic [N-1:0] a, b;
  logic cin;
  logic [N:0] sum;

  sat_add3 #(.N(N)) dut (.a(a), .b(b), .cin(cin), .sum(sum));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 1 << (2 * N + 1); v++) begin
      {cin, a, b} = (2 * N + 1)'(v);
      #1;
      checks++;
      if (int'(sum) != int'(a) + int'(b) + int'(cin)) begin
        failures++;
        $display("FAIL %0d + %0d + %0d gave %0d", a, b, cin, sum);
      end
      if (sum[N]) n_cout++;
      if (cin) n_cin++; else n_myth++;
    end
    $display("carry-out=%0d carry-in=%0d mythical=%0d", n_cout, n_cin, n_myth);
    checks++;
    if (n_cout == 0 || n_cin == 0 || n_myth == 0) begin
      failures++;
      $display("FAIL a mechanism was never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
