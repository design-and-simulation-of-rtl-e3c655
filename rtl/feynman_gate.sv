// feynman_gate: the 2x2 reversible Feynman (controlled-NOT) gate.
//
// P passes A through and Q = A xor B. With B tied to 0 the gate copies A onto
// Q (fan-out without losing information); with B tied to 1 it inverts A.
// Purely combinational, no clock. The function is the source design's.
module feynman_gate (
  input  logic a,
  input  logic b,
  output logic p,
  output logic q
);
  assign p = a;
  assign q = a ^ b;
endmodule
