// One-bit full adder cell of the low-power ripple carry adder.
//
// The cell avoids a chain of separate small gates and stand-alone inverters
// and is written as a few complex (compound) cells instead:
//   h    = (a | b) & ~(a & b)          OR-AND term: half-sum (a xor b)
//   sum  = (h | cin) & ~(h & cin)      OR-AND term: h xor cin
//   cout = (a & b) | (h & cin)         AND-AND-OR term: carry
// Using complex cells of this kind (AND-AND-OR, OR-AND) follows the low-power
// adder this filter is built around; the exact Boolean grouping above is this
// design's own. Purely combinational; a, b, cin in, sum and cout out.
module lp_full_adder (
  input  logic a,
  input  logic b,
  input  logic cin,
  output logic sum,
  output logic cout
);
  logic h;

  always_comb begin
    h    = (a | b) & ~(a & b);
    sum  = (h | cin) & ~(h & cin);
    cout = (a & b) | (h & cin);
  end
endmodule
