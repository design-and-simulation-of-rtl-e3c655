// toffoli_counter: WIDTH-bit binary up-counter whose increment logic is made
// of reversible gates.
//
// The incrementer is a ripple chain: carry[0] is the count enable; a Toffoli
// gate with its target tied to 0 forms carry[i+1] = carry[i] & q[i], and a
// Feynman gate forms the next bit q[i] ^ carry[i]. The register takes the
// incremented value on every rising clock edge, and wraps from all ones to 0.
// rst (asynchronous, active high) and clr (synchronous, active high) both
// return the count to 0; clr wins over en.
// Timing: count is the register output, valid one edge after en/clr.
// That the controller's wait counter is built from Toffoli gates is the source
// design's; the ripple structure, width and the clear input are this design's.
module toffoli_counter #(
  parameter int unsigned WIDTH = 3
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             clr,
  input  logic             en,
  output logic [WIDTH-1:0] count
);
  logic [WIDTH:0]   carry;
  logic [WIDTH-1:0] inc;
  logic [WIDTH-1:0] copy_t, copy_f, copy_c;  // pass-through (garbage) lines

  assign carry[0] = en;

  for (genvar i = 0; i < WIDTH; i++) begin : g_bit
    toffoli_gate u_carry (
      .a (carry[i]),
      .b (count[i]),
      .c (1'b0),
      .p (copy_t[i]),
      .q (copy_c[i]),
      .r (carry[i+1])
    );
    feynman_gate u_sum (
      .a (carry[i]),
      .b (count[i]),
      .p (copy_f[i]),
      .q (inc[i])
    );
  end

  always_ff @(posedge clk or posedge rst) begin
    if (rst)      count <= '0;
    else if (clr) count <= '0;
    else          count <= inc;
  end

  // Garbage outputs of the reversible gates and the final carry are unused.
  logic unused_garbage;
  assign unused_garbage = ^{copy_t, copy_f, copy_c, carry[WIDTH]};
endmodule
