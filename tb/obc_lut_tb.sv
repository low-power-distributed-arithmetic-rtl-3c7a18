// Test of the partial-sum table: after reset every word reads zero; random
// writes to random addresses are mirrored in a reference array and every
// address is read back and compared after each write. A cycle with we low
// must change nothing.
module obc_lut_tb;
  localparam int unsigned TAPS = 4, DW = 11, DEPTH = 8;
  logic clk = 0, rst_n, we;
  logic [TAPS-2:0] waddr, raddr;
  logic signed [DW-1:0] wdata, rdata;
  logic signed [DW-1:0] ref_mem [DEPTH];
  int checks = 0, failures = 0, cycles = 0;

  obc_lut dut (.clk, .rst_n, .we, .waddr, .wdata, .raddr, .rdata);

  always #5 clk = ~clk;

  task automatic read_all();
    for (int a = 0; a < DEPTH; a++) begin
      raddr = (TAPS-1)'(a);
      #1;
      checks++;
      if (rdata !== ref_mem[a]) begin
        failures++;
        $display("FAIL addr %0d: got %0d want %0d", a, rdata, ref_mem[a]);
      end
    end
  endtask

  initial begin
    rst_n = 0; we = 0; waddr = '0; wdata = '0; raddr = '0;
    for (int a = 0; a < DEPTH; a++) ref_mem[a] = '0;
    @(posedge clk); #1;
    rst_n = 1;
    read_all();
    for (int n = 0; n < 200; n++) begin
      we    = 1'($urandom_range(0, 3) != 0);
      waddr = (TAPS-1)'($urandom);
      wdata = DW'($urandom);
      @(posedge clk); #1;
      if (we) ref_mem[waddr] = wdata;
      we = 0;
      read_all();
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
