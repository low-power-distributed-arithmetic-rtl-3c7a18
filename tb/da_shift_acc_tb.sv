// Test of the shift-accumulator. Each output is a run of four bit cycles
// (first on cycle 0, last on cycle 3) with random table words, random
// negate flags and a random p_initial word. The expected output is
//   floor((sum_j (negate_j ? -word_j : word_j) * 2^j + pinit) / 2),
// worked out with integers. Runs are issued back to back and with idle
// cycles between them; y must change exactly on the edge of the last bit
// cycle and must hold during idle cycles.
module da_shift_acc_tb;
  localparam int unsigned DW = 11, XW = 4, YW = 14;
  logic clk = 0, rst_n, step, first, last, negate;
  logic signed [DW-1:0] lut_data, pinit;
  logic signed [YW-1:0] y;
  int checks = 0, failures = 0, cycles = 0;

  da_shift_acc dut (.clk, .rst_n, .step, .first, .last, .negate,
                    .lut_data, .pinit, .y);

  always #5 clk = ~clk;

  initial begin
    int full, want, prev_y;
    rst_n = 0; step = 0; first = 0; last = 0; negate = 0;
    lut_data = '0; pinit = '0;
    @(posedge clk); #1;
    rst_n = 1;
    for (int run = 0; run < 400; run++) begin
      pinit = DW'($urandom);
      full  = int'(pinit);
      prev_y = int'(y);
      for (int j = 0; j < XW; j++) begin
        step = 1; first = (j == 0); last = (j == XW - 1);
        negate   = 1'($urandom);
        lut_data = DW'($urandom);
        if (run == 0) lut_data = (j % 2 == 1) ? -DW'(1024) : DW'(1023);
        full += (negate ? -int'(lut_data) : int'(lut_data)) * (1 << j);
        if (j == 1) pinit = DW'($urandom);  // pinit only matters on cycle 0
        @(posedge clk); #1;
        if (j < XW - 1) begin
          checks++;
          if (int'(y) != prev_y) begin
            failures++;
            $display("FAIL run %0d: y changed before the last bit cycle", run);
          end
        end
      end
      want = full >>> 1;
      checks++;
      if (int'(y) != want) begin
        failures++;
        $display("FAIL run %0d: y=%0d want %0d", run, y, want);
      end
      step = 0; first = 0; last = 0;
      if ($urandom_range(0, 1) == 1) begin
        lut_data = DW'($urandom);
        repeat ($urandom_range(1, 3)) @(posedge clk);
        #1;
        checks++;
        if (int'(y) != want) begin
          failures++;
          $display("FAIL run %0d: y not held while idle", run);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Watchdog.
  always @(posedge clk) begin
    cycles++;
    if (cycles > 20000) begin
      failures++;
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end
endmodule
