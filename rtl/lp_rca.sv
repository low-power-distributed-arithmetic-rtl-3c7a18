// Ripple carry adder built from the low-power full-adder cells.
//
// WIDTH cells are chained: the carry out of bit i is the carry in of bit
// i+1, starting from cin at bit 0, and the carry out of the top bit is cout.
// The result is sum = a + b + cin modulo 2^WIDTH, valid for both unsigned
// and two's complement operands. Purely combinational; the delay grows
// linearly with WIDTH. The default of 8 bits is the stand-alone adder size
// of the reference design; the filter uses a wider instance.
module lp_rca #(
  parameter int unsigned WIDTH = 8
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);
  logic [WIDTH:0] c;

  assign c[0] = cin;

  for (genvar i = 0; i < WIDTH; i++) begin : g_bit
    lp_full_adder u_fa (
      .a   (a[i]),
      .b   (b[i]),
      .cin (c[i]),
      .sum (sum[i]),
      .cout(c[i+1])
    );
  end

  assign cout = c[WIDTH];
endmodule
