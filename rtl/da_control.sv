// Bit-serial sequencer of the distributed-arithmetic FIR filter.
//
// A sample is accepted (load) when in_valid and in_ready are both high.
// in_ready is high while idle and in the last bit cycle of the current
// output, so a steady stream of samples is taken one every XW cycles. After
// the accepting edge the sequencer runs XW bit cycles (step high) with the
// bit counter bit_sel = j counting 0..XW-1; s1 is high for j = 0 (start from
// p_initial) and s0 for j = XW-1 (sign bit). y_valid pulses for one cycle
// after the last bit cycle, when the new output is in the output register:
// XW cycles after the sample was accepted. The handshake and this timing are
// this design's own; the meaning of S0 and S1 follows the published filter.
// Synchronous active-low reset returns to idle.
module da_control #(
  parameter int unsigned XW = da_fir_pkg::XW
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  in_valid,
  output logic                  in_ready,
  output logic                  load,
  output logic [$clog2(XW)-1:0] bit_sel,
  output logic                  step,
  output logic                  s0,
  output logic                  s1,
  output logic                  y_valid
);
  localparam logic [$clog2(XW)-1:0] JLAST = $clog2(XW)'(XW - 1);

  logic busy_q;
  logic [$clog2(XW)-1:0] j_q;

  always_comb begin
    step     = busy_q;
    bit_sel  = j_q;
    s1       = busy_q && (j_q == '0);
    s0       = busy_q && (j_q == JLAST);
    in_ready = !busy_q || s0;
    load     = in_valid && in_ready;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy_q  <= 1'b0;
      j_q     <= '0;
      y_valid <= 1'b0;
    end else begin
      y_valid <= s0;
      if (load) begin
        busy_q <= 1'b1;
        j_q    <= '0;
      end else if (s0) begin
        busy_q <= 1'b0;
        j_q    <= '0;
      end else if (busy_q) begin
        j_q    <= j_q + 1'b1;
      end
    end
  end

  // The bit counter never leaves 0..XW-1.
  a_j_range: assert property (@(posedge clk) disable iff (!rst_n) j_q <= JLAST);
  // A sample is only taken when the sequencer can start on it.
  a_load_ready: assert property (@(posedge clk) disable iff (!rst_n) load |-> in_ready);
endmodule
