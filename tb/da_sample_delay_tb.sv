// Test of the tapped delay line: random samples are loaded with random gaps;
// a reference array of the last four samples is kept, and after every edge
// all four bit positions of a_bits are compared with it. Also checks that
// reset clears the line and that no shift happens without load.
module da_sample_delay_tb;
  localparam int unsigned TAPS = 4, XW = 4;
  logic clk = 0, rst_n, load;
  logic [XW-1:0] x_in;
  logic [1:0] bit_sel;
  logic [TAPS-1:0] a_bits;
  logic [XW-1:0] ref_x [TAPS];
  int checks = 0, failures = 0, cycles = 0;

  da_sample_delay dut (.clk, .rst_n, .load, .x_in, .bit_sel, .a_bits);

  always #5 clk = ~clk;

  task automatic compare_all();
    for (int j = 0; j < XW; j++) begin
      bit_sel = 2'(j);
      #1;
      for (int k = 0; k < TAPS; k++) begin
        checks++;
        if (a_bits[k] !== ref_x[k][j]) begin
          failures++;
          $display("FAIL tap %0d bit %0d: got %b want %b", k, j, a_bits[k], ref_x[k][j]);
        end
      end
    end
  endtask

  initial begin
    rst_n = 0; load = 0; x_in = '0; bit_sel = '0;
    for (int k = 0; k < TAPS; k++) ref_x[k] = '0;
    @(posedge clk); #1;
    rst_n = 1;
    compare_all();
    for (int n = 0; n < 300; n++) begin
      load = 1'($urandom_range(0, 2) != 0);
      x_in = XW'($urandom);
      @(posedge clk); #1;
      if (load) begin
        for (int k = TAPS - 1; k > 0; k--) ref_x[k] = ref_x[k-1];
        ref_x[0] = x_in;
      end
      compare_all();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Watchdog.
  always @(posedge clk) begin
    cycles++;
    if (cycles > 10000) begin
      failures++;
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end
endmodule
