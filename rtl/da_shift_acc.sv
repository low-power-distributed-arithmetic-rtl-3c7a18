// Shift-accumulator of the distributed-arithmetic FIR filter.
//
// One output takes XW bit cycles, j = 0 (sample LSBs) to j = XW-1 (sample
// sign bits). In every cycle with step high the accumulator becomes
//   acc <= base + (negate ? -lut_data : lut_data)
// where base is pinit on the first cycle (first, the S1 select) and the
// previous accumulator shifted right by one (times 2^-1) otherwise. The
// negation is the inverted LUT word plus a carry-in of 1 into the adder,
// which is the low-power ripple carry adder (lp_rca).
//
// A plain right shift would drop the accumulator's LSB each cycle. Here the
// dropped bits are caught in an (XW-1)-bit register below the accumulator,
// so {acc, low} after the last cycle is exactly
//   sum_j (+/-word_j) 2^j + pinit  =  2 * y.
// With last high the step also latches y = {acc, low} / 2 into the output
// register, visible from the next cycle on and held until the next output.
// The catch register, the integer scaling and the doubled LUT words are
// choices of this design; the select, inversion, adder and 2^-1 feedback
// follow the published filter. Synchronous active-low reset clears all.
module da_shift_acc #(
  parameter int unsigned DW    = da_fir_pkg::LUT_DW,
  parameter int unsigned ACC_W = da_fir_pkg::ACC_W,
  parameter int unsigned XW    = da_fir_pkg::XW,
  parameter int unsigned YW    = da_fir_pkg::Y_W
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  step,
  input  logic                  first,
  input  logic                  last,
  input  logic                  negate,
  input  logic signed [DW-1:0]  lut_data,
  input  logic signed [DW-1:0]  pinit,
  output logic signed [YW-1:0]  y
);
  localparam int unsigned FW = ACC_W + XW - 1;  // {acc, low}

  logic signed [ACC_W-1:0] acc_q, base, addend, sum;
  logic        [XW-2:0]    low_q, low_next;
  logic signed [FW-1:0]    full_next;
  logic                    unused_cout;

  always_comb begin
    base      = first ? ACC_W'(pinit) : (acc_q >>> 1);
    addend    = negate ? ~ACC_W'(lut_data) : ACC_W'(lut_data);
    low_next  = first ? '0 : (XW-1)'({acc_q[0], low_q} >> 1);
    full_next = {sum, low_next};
  end

  lp_rca #(.WIDTH(ACC_W)) u_add (
    .a   (base),
    .b   (addend),
    .cin (negate),
    .sum (sum),
    .cout(unused_cout)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      acc_q <= '0;
      low_q <= '0;
      y     <= '0;
    end else if (step) begin
      acc_q <= sum;
      low_q <= low_next;
      if (last) y <= YW'(full_next >>> 1);
    end
  end
endmodule
