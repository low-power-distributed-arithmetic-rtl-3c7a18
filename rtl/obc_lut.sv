// Offset-binary-coded partial-sum table, 2^(TAPS-1) words.
//
// Word a holds twice the OBC partial sum for digit pattern a:
//   word[a] = w0 + sum_{k=1..TAPS-1} (bit (TAPS-1-k) of a ? +wk : -wk)
// so address 0 holds w0 - w1 - w2 - w3 and the all-ones address holds
// w0 + w1 + w2 + w3 (the published table stores half of these values; the
// doubling keeps every word an integer). The words depend only on the
// weights and are computed ahead of time by whoever sets the weights, then
// written one per cycle through the write port (we/waddr/wdata, taking
// effect at the clock edge). The read port is combinational. The table is a
// register file cleared by the synchronous active-low reset.
module obc_lut #(
  parameter int unsigned TAPS = da_fir_pkg::TAPS,
  parameter int unsigned DW   = da_fir_pkg::LUT_DW
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   we,
  input  logic [TAPS-2:0]        waddr,
  input  logic signed [DW-1:0]   wdata,
  input  logic [TAPS-2:0]        raddr,
  output logic signed [DW-1:0]   rdata
);
  localparam int unsigned DEPTH = 2 ** (TAPS - 1);

  logic signed [DW-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < DEPTH; i++) mem[i] <= '0;
    end else if (we) begin
      mem[waddr] <= wdata;
    end
  end

  assign rdata = mem[raddr];
endmodule
