// Test of the offset-binary address generator against the arithmetic it
// must implement. For random 8-bit weights and every combination of the
// four sample bits and s0, the wanted contribution is
//   (s0 ? -1 : 1) * sum_k w_k (2 b_k - 1)
// (the doubled OBC partial sum, with the sign bit's negative weight). The
// table word the generator selects, taken from the table formula
//   word[a] = w0 + sum_{k>=1} (bit (TAPS-1-k) of a ? +wk : -wk),
// negated when negate is high, must equal it.
module obc_addr_gen_tb;
  localparam int unsigned TAPS = 4;
  logic [TAPS-1:0] a_bits;
  logic s0, negate;
  logic [TAPS-2:0] lut_addr;
  int checks = 0, failures = 0;
  int w [TAPS];

  obc_addr_gen dut (.a_bits, .s0, .lut_addr, .negate);

  function automatic int table_word(int addr);
    int s = w[0];
    for (int k = 1; k < TAPS; k++)
      s += (((addr >> (TAPS - 1 - k)) & 1) == 1) ? w[k] : -w[k];
    return s;
  endfunction

  initial begin
    for (int trial = 0; trial < 50; trial++) begin
      for (int k = 0; k < TAPS; k++) w[k] = int'($signed(8'($urandom)));
      for (int v = 0; v < (1 << (TAPS + 1)); v++) begin
        int want, got;
        {s0, a_bits} = (TAPS+1)'(v);
        #1;
        want = 0;
        for (int k = 0; k < TAPS; k++) want += w[k] * (a_bits[k] ? 1 : -1);
        if (s0) want = -want;
        got = table_word(int'(lut_addr));
        if (negate) got = -got;
        checks++;
        if (got !== want) begin
          failures++;
          $display("FAIL bits=%b s0=%b addr=%b neg=%b got %0d want %0d",
                   a_bits, s0, lut_addr, negate, got, want);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Watchdog.
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
