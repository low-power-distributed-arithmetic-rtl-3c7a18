// Tapped delay line of the distributed-arithmetic FIR filter.
//
// Holds the TAPS newest input samples x[n], x[n-1], ..., x[n-TAPS+1]. When
// load is high at a clock edge every sample moves one place down the line
// and x_in becomes x[n]. For the bit-serial table look-up the module
// presents bit bit_sel (j) of every stored sample on a_bits, with
// a_bits[k] taken from x[n-k] (A0..A3 in the usual drawing of the filter).
// a_bits is combinational from the registers, so during the load edge the
// old samples are still visible. The line clears to zero on a synchronous
// active-low reset (a choice of this design).
module da_sample_delay #(
  parameter int unsigned TAPS = da_fir_pkg::TAPS,
  parameter int unsigned XW   = da_fir_pkg::XW
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  load,
  input  logic [XW-1:0]         x_in,
  input  logic [$clog2(XW)-1:0] bit_sel,
  output logic [TAPS-1:0]       a_bits
);
  logic [XW-1:0] x_q [TAPS];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int k = 0; k < TAPS; k++) x_q[k] <= '0;
    end else if (load) begin
      x_q[0] <= x_in;
      for (int k = 1; k < TAPS; k++) x_q[k] <= x_q[k-1];
    end
  end

  always_comb begin
    for (int k = 0; k < TAPS; k++) a_bits[k] = x_q[k][bit_sel];
  end
endmodule
