// Exhaustive test of the 8-bit low-power ripple carry adder: every pair of
// operands with both carry-in values, {cout, sum} compared with a + b + cin.
module lp_rca_tb;
  localparam int unsigned W = 8;
  logic [W-1:0] a, b, sum;
  logic cin, cout;
  int checks = 0, failures = 0;

  lp_rca dut (.a, .b, .cin, .sum, .cout);

  initial begin
    for (int i = 0; i < (1 << W); i++) begin
      for (int k = 0; k < (1 << W); k++) begin
        for (int c = 0; c < 2; c++) begin
          a = W'(i); b = W'(k); cin = 1'(c);
          #1;
          checks++;
          if ({cout, sum} !== (W+1)'(i + k + c)) begin
            failures++;
            if (failures < 10)
              $display("FAIL %0d + %0d + %0d -> cout=%b sum=%0d", i, k, c, cout, sum);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Watchdog.
  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
