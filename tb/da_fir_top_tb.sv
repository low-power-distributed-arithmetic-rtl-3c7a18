// End-to-end test of the OBC distributed-arithmetic FIR filter at its
// default size (4 taps, 4-bit samples, 8-bit weights).
//
// For each of a series of weight sets (random ones plus the extreme sets
// that give the largest positive and negative outputs) the testbench works
// out the table words and p_initial from the weights, writes them through
// the set-up ports, then streams random samples with random idle gaps and
// back-to-back bursts. Every output is compared with the direct convolution
// y(n) = sum_k w_k x(n-k) over the samples accepted so far, and must appear
// exactly XW cycles after the edge that accepted its sample.
// The mechanisms of the filter are counted from the accepted samples (the
// outputs being right shows that they ran) and each must occur: the
// p_initial start (S1), the sign-bit cycle (S0), a negation caused by a 0
// in the newest sample's bit, a negation caused by the sign bit, the two
// cancelling each other, samples accepted back to back in the last bit
// cycle, samples accepted while idle, and table reloads.
module da_fir_top_tb;
  localparam int unsigned TAPS = 4, XW = 4, WW = 8;
  localparam int unsigned DW = WW + $clog2(TAPS) + 1;
  localparam int unsigned YW = WW + XW + $clog2(TAPS);
  localparam int NSETS = 40, NSAMP = 150;

  logic clk = 0, rst_n, in_valid, in_ready, lut_we, pinit_we, y_valid;
  logic [XW-1:0] x_in;
  logic [TAPS-2:0] lut_waddr;
  logic signed [DW-1:0] lut_wdata, pinit_wdata;
  logic signed [YW-1:0] y;

  int checks = 0, failures = 0, cycle = 0;
  int w [TAPS];
  int hist [TAPS];
  int exp_y [$];
  int exp_cycle [$];
  int n_s1 = 0, n_s0 = 0, n_neg_a0 = 0, n_neg_sign = 0, n_cancel = 0;
  int n_back_to_back = 0, n_idle_accept = 0, n_reload = 0, n_outputs = 0;

  da_fir_top dut (.clk, .rst_n, .in_valid, .in_ready, .x_in, .lut_we,
                  .lut_waddr, .lut_wdata, .pinit_we, .pinit_wdata,
                  .y_valid, .y);

  always #5 clk = ~clk;

  // Doubled OBC table word for address a (address MSB is tap 1).
  function automatic int table_word(int a);
    int s = w[0];
    for (int k = 1; k < TAPS; k++)
      s += (((a >> (TAPS - 1 - k)) & 1) == 1) ? w[k] : -w[k];
    return s;
  endfunction

  task automatic check(string what, int got, int want);
    checks++;
    if (got != want) begin
      failures++;
      if (failures < 20) $display("FAIL cycle %0d: %s got %0d want %0d", cycle, what, got, want);
    end
  endtask

  // One clock cycle: outputs are checked and strobes counted in the second
  // half of the cycle, after the inputs for this cycle have been applied.
  task automatic tick();
    #1;
    if (y_valid) begin
      n_outputs++;
      if (exp_y.size() == 0) begin
        failures++;
        $display("FAIL cycle %0d: unexpected output %0d", cycle, y);
      end else begin
        check("y", int'(y), exp_y.pop_front());
        check("latency", cycle - exp_cycle.pop_front(), XW + 1);
      end
    end
    if (in_valid && in_ready) begin
      int acc = 0;
      // An accept while an output is still pending happens in the last bit
      // cycle of the previous sample.
      if (exp_y.size() != 0) n_back_to_back++; else n_idle_accept++;
      // Strobes the new sample causes, from its own bits: S1 and S0 once
      // each; a 0 in a non-sign bit of the newest sample negates the word;
      // the sign bit negates it when 1, and cancels that negation when 0.
      n_s1++;
      n_s0++;
      for (int j = 0; j < XW - 1; j++) if (!x_in[j]) n_neg_a0++;
      if (x_in[XW-1]) n_neg_sign++; else n_cancel++;
      for (int k = TAPS - 1; k > 0; k--) hist[k] = hist[k-1];
      hist[0] = int'($signed(x_in));
      for (int k = 0; k < TAPS; k++) acc += w[k] * hist[k];
      exp_y.push_back(acc);
      exp_cycle.push_back(cycle);
    end
    @(posedge clk);
    cycle++;
    #1;
  endtask

  task automatic load_weights();
    in_valid = 0;
    while (exp_y.size() != 0 || !in_ready) tick();
    for (int a = 0; a < (1 << (TAPS - 1)); a++) begin
      lut_we = 1; lut_waddr = (TAPS-1)'(a); lut_wdata = DW'(table_word(a));
      tick();
    end
    lut_we = 0;
    pinit_we = 1;
    pinit_wdata = DW'(-(w[0] + w[1] + w[2] + w[3]));
    tick();
    pinit_we = 0;
    n_reload++;
  endtask

  initial begin
    rst_n = 0; in_valid = 0; x_in = '0; lut_we = 0; pinit_we = 0;
    lut_waddr = '0; lut_wdata = '0; pinit_wdata = '0;
    for (int k = 0; k < TAPS; k++) hist[k] = 0;
    @(posedge clk); #1;
    @(posedge clk); #1;
    rst_n = 1;
    for (int set = 0; set < NSETS; set++) begin
      automatic bit burst = 0;
      for (int k = 0; k < TAPS; k++) begin
        case (set)
          0: w[k] = -128;
          1: w[k] = 127;
          2: w[k] = (k % 2 == 1) ? -128 : 127;
          default: w[k] = int'($signed(WW'($urandom)));
        endcase
      end
      load_weights();
      for (int n = 0; n < NSAMP; ) begin
        if ($urandom_range(0, 15) == 0) burst = ~burst;
        in_valid = burst || ($urandom_range(0, 2) == 0);
        x_in = (set < 3 && n % 5 != 4) ? XW'(8) : XW'($urandom);  // -8 is the extreme sample
        if (in_valid && in_ready) n++;
        tick();
      end
      in_valid = 0;
    end
    while (exp_y.size() != 0 && cycle < 200000) tick();
    check("outputs", n_outputs, NSETS * NSAMP);
    check("no missing outputs", exp_y.size(), 0);
    $display("mechanisms: s1=%0d s0=%0d negate_a0=%0d negate_sign=%0d cancel=%0d back_to_back=%0d idle_accept=%0d reloads=%0d",
             n_s1, n_s0, n_neg_a0, n_neg_sign, n_cancel, n_back_to_back, n_idle_accept, n_reload);
    if (n_s1 == 0 || n_s0 == 0 || n_neg_a0 == 0 || n_neg_sign == 0 || n_cancel == 0 ||
        n_back_to_back == 0 || n_idle_accept == 0 || n_reload < 2) begin
      failures++;
      $display("FAIL a mechanism never occurred");
    end
    checks++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Watchdog.
  always @(posedge clk) begin
    if (cycle > 300000) begin
      failures++;
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end
endmodule
