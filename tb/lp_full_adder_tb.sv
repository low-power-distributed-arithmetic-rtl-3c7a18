// Exhaustive test of the low-power full-adder cell: all eight input
// combinations, sum and carry compared with the integer sum a + b + cin.
module lp_full_adder_tb;
  logic a, b, cin, sum, cout;
  int checks = 0, failures = 0;

  lp_full_adder dut (.a, .b, .cin, .sum, .cout);

  initial begin
    for (int v = 0; v < 8; v++) begin
      {a, b, cin} = 3'(v);
      #1;
      checks++;
      if ({cout, sum} !== 2'(int'(a) + int'(b) + int'(cin))) begin
        failures++;
        $display("FAIL a=%b b=%b cin=%b -> cout=%b sum=%b", a, b, cin, cout, sum);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Watchdog.
  initial begin
    #1000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
