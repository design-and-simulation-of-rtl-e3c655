// fredkin_gate: the 3x3 reversible Fredkin (controlled-swap) gate.
//
// P passes the control A through. While A is 0, Q = B and R = C; while A is 1
// the two data lines swap, Q = C and R = B. So Q = A'B + AC and R = AB + A'C,
// and Q alone is a 2:1 multiplexer selecting C when A is 1.
// Purely combinational, no clock. The function is the source design's.
module fredkin_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic p,
  output logic q,
  output logic r
);
  assign p = a;
  assign q = (~a & b) | (a & c);
  assign r = (a & b) | (~a & c);
endmodule
