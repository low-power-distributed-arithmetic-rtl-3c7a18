// Offset-binary-coding address generator.
//
// With offset binary coding each sample bit b is used as the digit
// d = 2b - 1 (+1 or -1), and the table only stores the half of the 2^TAPS
// digit patterns in which the newest sample's digit is +1. For the other
// half the pattern is the negation of a stored one, so
//   lut_addr[TAPS-2-(k-1)] (= A'k) = a_bits[k] XNOR a_bits[0],  k = 1..TAPS-1
// (A'1 is the address MSB) and the looked-up word must be negated when
// a_bits[0] (A0) is 0. The sign bit of a two's complement sample (j = B-1,
// flagged by s0) carries negative weight, which flips the sign once more:
//   negate = ~a_bits[0] XOR s0.
// Purely combinational. The XOR structure follows the published filter; the
// polarities are derived from the offset-binary equations.
module obc_addr_gen #(
  parameter int unsigned TAPS = da_fir_pkg::TAPS
) (
  input  logic [TAPS-1:0] a_bits,
  input  logic            s0,
  output logic [TAPS-2:0] lut_addr,
  output logic            negate
);
  always_comb begin
    for (int k = 1; k < TAPS; k++) begin
      lut_addr[TAPS-1-k] = ~(a_bits[k] ^ a_bits[0]);
    end
    negate = ~a_bits[0] ^ s0;
  end
endmodule
