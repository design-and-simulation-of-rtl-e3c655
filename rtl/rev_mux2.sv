// rev_mux2: a WIDTH-bit 2:1 multiplexer made of Fredkin gates.
//
// Each bit uses one Fredkin gate with the select on its control line:
// y = sel ? d1 : d0 comes out on the gate's Q output. The R outputs carry the
// unselected input and the P outputs copy the select; they are the garbage
// outputs a reversible circuit keeps, brought out here as 'garbage'.
// Purely combinational. That the design's multiplexers are reversible is the
// source design's; building them from Fredkin gates is this design's choice.
module rev_mux2 #(
  parameter int unsigned WIDTH = 1
) (
  input  logic             sel,
  input  logic [WIDTH-1:0] d0,
  input  logic [WIDTH-1:0] d1,
  output logic [WIDTH-1:0] y,
  output logic [WIDTH-1:0] garbage
);
  logic [WIDTH-1:0] sel_copy;

  for (genvar i = 0; i < WIDTH; i++) begin : g_bit
    fredkin_gate u_fg (
      .a (sel),
      .b (d0[i]),
      .c (d1[i]),
      .p (sel_copy[i]),
      .q (y[i]),
      .r (garbage[i])
    );
  end

  // The select copies are identical to sel; they carry no information.
  logic unused_sel_copy;
  assign unused_sel_copy = ^sel_copy;
endmodule
