// rev_adder: WIDTH-bit ripple-carry adder (modulo 2**WIDTH) built from
// reversible gates.
//
// Each bit is a reversible full adder of two Feynman and two Toffoli gates:
//   t = a ^ b            (Feynman)
//   sum = t ^ cin        (Feynman)
//   g = a & b            (Toffoli, target 0)
//   cout = g ^ (t & cin) (Toffoli, target g)
// a & b and t & cin are never both 1, so the xor equals the usual or.
// The carry out of the top bit is dropped: the sum wraps. Combinational.
// A helper of this design for the phase ring of the wave generator.
module rev_adder #(
  parameter int unsigned WIDTH = 3
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  output logic [WIDTH-1:0] sum
);
  logic [WIDTH:0]   carry;
  logic [WIDTH-1:0] t, g;
  logic [WIDTH-1:0] pa, pt, ta, tb, tt, tc;  // pass-through (garbage) lines

  assign carry[0] = 1'b0;

  for (genvar i = 0; i < WIDTH; i++) begin : g_bit
    feynman_gate u_f1 (.a (a[i]), .b (b[i]), .p (pa[i]), .q (t[i]));
    feynman_gate u_f2 (.a (t[i]), .b (carry[i]), .p (pt[i]), .q (sum[i]));
    toffoli_gate u_t1 (.a (a[i]), .b (b[i]), .c (1'b0), .p (ta[i]), .q (tb[i]), .r (g[i]));
    toffoli_gate u_t2 (.a (t[i]), .b (carry[i]), .c (g[i]), .p (tt[i]), .q (tc[i]),
                       .r (carry[i+1]));
  end

  logic unused_garbage;
  assign unused_garbage = ^{pa, pt, ta, tb, tt, tc, carry[WIDTH]};
endmodule
