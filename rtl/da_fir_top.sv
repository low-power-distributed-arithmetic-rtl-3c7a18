// Low-power offset-binary-coded distributed-arithmetic (OBC-DA) FIR filter.
//
// Computes y(n) = sum_{k=0..TAPS-1} w_k x(n-k) without multipliers. The
// samples are processed one bit position j at a time, LSB first: bit j of
// the TAPS stored samples forms an address into a table of pre-computed
// weight sums, and a shift-accumulator adds each word at weight 2^j. Offset
// binary coding halves the table to 2^(TAPS-1) words; the missing half is
// the negation of the stored half, and a constant p_initial corrects the
// offset. The accumulator's adder is a ripple carry adder made of low-power
// complex-cell full adders. Default configuration: 4 taps, 4-bit two's
// complement samples, 8-bit two's complement weights.
//
// Set-up: write the 2^(TAPS-1) table words through lut_we/lut_waddr/
// lut_wdata, word[a] = w0 + sum_{k>=1} (bit (TAPS-1-k) of a ? +wk : -wk),
// and pinit_wdata = -(w0 + ... + w(TAPS-1)) through pinit_we.
// Streaming: offer samples with in_valid/in_ready. A sample accepted at an
// edge produces y (held in a register) with a one-cycle y_valid pulse XW
// cycles later; samples can be accepted every XW cycles. The structure
// (delay line, XOR addressing, half-size table, sign select, adder,
// accumulator with 2^-1 feedback, p_initial select) follows the published
// filter; the handshake, the write ports, the reset and the exact-result
// accumulator extension are this design's own. Synchronous active-low reset.
module da_fir_top #(
  parameter int unsigned TAPS = da_fir_pkg::TAPS,
  parameter int unsigned XW   = da_fir_pkg::XW,
  parameter int unsigned WW   = da_fir_pkg::WW,
  localparam int unsigned DW  = WW + $clog2(TAPS) + 1,
  localparam int unsigned YW  = WW + XW + $clog2(TAPS)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  in_valid,
  output logic                  in_ready,
  input  logic [XW-1:0]         x_in,
  input  logic                  lut_we,
  input  logic [TAPS-2:0]       lut_waddr,
  input  logic signed [DW-1:0]  lut_wdata,
  input  logic                  pinit_we,
  input  logic signed [DW-1:0]  pinit_wdata,
  output logic                  y_valid,
  output logic signed [YW-1:0]  y
);
  logic                  load, step, s0, s1, negate;
  logic [$clog2(XW)-1:0] bit_sel;
  logic [TAPS-1:0]       a_bits;
  logic [TAPS-2:0]       lut_raddr;
  logic signed [DW-1:0]  lut_rdata;
  logic signed [DW-1:0]  pinit_q;

  da_control #(.XW(XW)) u_ctrl (
    .clk, .rst_n, .in_valid, .in_ready, .load, .bit_sel, .step,
    .s0, .s1, .y_valid
  );

  da_sample_delay #(.TAPS(TAPS), .XW(XW)) u_delay (
    .clk, .rst_n, .load, .x_in, .bit_sel, .a_bits
  );

  obc_addr_gen #(.TAPS(TAPS)) u_addr (
    .a_bits, .s0, .lut_addr(lut_raddr), .negate
  );

  obc_lut #(.TAPS(TAPS), .DW(DW)) u_lut (
    .clk, .rst_n, .we(lut_we), .waddr(lut_waddr), .wdata(lut_wdata),
    .raddr(lut_raddr), .rdata(lut_rdata)
  );

  // p_initial register: the offset-binary correction term, doubled.
  always_ff @(posedge clk) begin
    if (!rst_n)        pinit_q <= '0;
    else if (pinit_we) pinit_q <= pinit_wdata;
  end

  da_shift_acc #(.DW(DW), .ACC_W(DW + 1), .XW(XW), .YW(YW)) u_acc (
    .clk, .rst_n, .step, .first(s1), .last(s0), .negate,
    .lut_data(lut_rdata), .pinit(pinit_q), .y
  );
endmodule
