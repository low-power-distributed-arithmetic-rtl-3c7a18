// Test of the bit-serial sequencer against a cycle-by-cycle reference:
// samples are offered with random gaps. The reference tracks when a sample
// is accepted and expects, in the four cycles after that edge, step high
// with bit_sel = 0, 1, 2, 3, s1 only at 0, s0 only at 3, in_ready only
// while idle or at 3, and a y_valid pulse in the cycle after j = 3. It also
// checks that a continuous stream yields one output every four cycles.
module da_control_tb;
  localparam int unsigned XW = 4;
  logic clk = 0, rst_n, in_valid, in_ready, load, step, s0, s1, y_valid;
  logic [1:0] bit_sel;
  int checks = 0, failures = 0, cycles = 0;
  int ref_j;          // -1 idle, else bit cycle expected now
  bit ref_yv;
  int outputs, stream_start, stream_outputs;

  da_control dut (.clk, .rst_n, .in_valid, .in_ready, .load, .bit_sel,
                  .step, .s0, .s1, .y_valid);

  always #5 clk = ~clk;

  task automatic expect_bit(string what, logic got, logic want);
    checks++;
    if (got !== want) begin
      failures++;
      $display("FAIL cycle %0d: %s=%b want %b (ref_j=%0d)", cycles, what, got, want, ref_j);
    end
  endtask

  initial begin
    rst_n = 0; in_valid = 0;
    ref_j = -1; ref_yv = 0; outputs = 0;
    @(posedge clk); #1;
    rst_n = 1;
    for (int n = 0; n < 600; n++) begin
      bit exp_ready;
      in_valid = (n >= 400 && n < 480) ? 1'b1 : 1'($urandom_range(0, 2) == 0);
      if (n == 400) stream_start = outputs;
      #1;
      exp_ready = (ref_j < 0) || (ref_j == XW - 1);
      expect_bit("in_ready", in_ready, exp_ready);
      expect_bit("load", load, in_valid && exp_ready);
      expect_bit("step", step, ref_j >= 0);
      expect_bit("s1", s1, ref_j == 0);
      expect_bit("s0", s0, ref_j == XW - 1);
      expect_bit("y_valid", y_valid, ref_yv);
      if (ref_j >= 0) begin
        checks++;
        if (int'(bit_sel) != ref_j) begin
          failures++;
          $display("FAIL cycle %0d: bit_sel=%0d want %0d", cycles, bit_sel, ref_j);
        end
      end
      @(posedge clk);
      if (ref_yv) outputs++;
      ref_yv = (ref_j == XW - 1);
      if (in_valid && exp_ready) ref_j = 0;
      else if (ref_j == XW - 1) ref_j = -1;
      else if (ref_j >= 0) ref_j++;
      if (n == 480) stream_outputs = outputs - stream_start;
      #1;
    end
    // 80 cycles of continuous input: 20 outputs, give or take the edges.
    checks++;
    if (stream_outputs < 19 || stream_outputs > 21) begin
      failures++;
      $display("FAIL streaming rate: %0d outputs in 80 cycles", stream_outputs);
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
