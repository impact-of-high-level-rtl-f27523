// Three-way step of a Sigma-Delta estimator: y = r + delta, where
// delta = +1 when r < x, -1 when r > x and 0 when they are equal.
// The two comparisons are evaluated in parallel and only choose the
// value of delta, which is added once at the end ("delta" form of the
// double if-then-else); this is the form that gave the lowest energy
// at ii=1. Purely combinational. inc and dec expose the two comparisons.
// The caller must keep r below its maximum when r < x can hold there
// (x is as wide as r, so r < x already implies r < 2**W-1).
module inc_dec #(
  parameter int unsigned W = 8
) (
  input  logic [W-1:0] r,
  input  logic [W-1:0] x,
  output logic [W-1:0] y,
  output logic         inc,
  output logic         dec
);
  logic [W-1:0] delta;

  always_comb begin
    inc   = (r < x);
    dec   = (r > x);
    delta = '0;
    if (inc) delta = W'(1);
    if (dec) delta = '1;          // -1 in two's complement
    y = r + delta;
  end
endmodule
