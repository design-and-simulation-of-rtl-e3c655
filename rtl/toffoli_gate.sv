// toffoli_gate: the 3x3 reversible Toffoli (controlled-controlled-NOT) gate.
//
// P and Q pass A and B through; R = (A and B) xor C. With C tied to 0 it is a
// reversible AND; the counters of this design use it to form carry chains.
// Purely combinational, no clock. The function is the source design's.
module toffoli_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic p,
  output logic q,
  output logic r
);
  assign p = a;
  assign q = b;
  assign r = (a & b) ^ c;
endmodule
