// data_state_encoder: maps a 2-bit symbol onto a phase state of the ring.
//
// A combinational table lookup: STATE_TABLE[dibit] is the 3-bit ring state
// (angle = 45 degrees * state) whose phase the symbol selects. The lookup is
// a 4:1 tree of reversible (Fredkin) multiplexers with the table entries as
// data inputs, so the table can be changed by parameter alone.
// Default table, from the source design's phase column:
//   00 -> state 0 (0 deg), 01 -> state 2 (90 deg),
//   10 -> state 4 (180 deg), 11 -> state 6 (270 deg).
// With this table the logic reduces to state = {dibit, 0} after synthesis.
// The phase per symbol and the use of reversible multiplexers are the source
// design's; the state codes are read from its eight-state phase ring.
// Timing: purely combinational, no clock.
module data_state_encoder
  import qpsk_pkg::*;
#(
  parameter phase_state_t STATE_TABLE [4] = '{3'd0, 3'd2, 3'd4, 3'd6}
) (
  input  dibit_t       dibit,
  output phase_state_t state
);
  phase_state_t lo, hi;
  phase_state_t g_lo, g_hi, g_out;

  rev_mux2 #(.WIDTH(STATE_W)) u_mux_lo (
    .sel (dibit[0]), .d0 (STATE_TABLE[0]), .d1 (STATE_TABLE[1]), .y (lo), .garbage (g_lo));
  rev_mux2 #(.WIDTH(STATE_W)) u_mux_hi (
    .sel (dibit[0]), .d0 (STATE_TABLE[2]), .d1 (STATE_TABLE[3]), .y (hi), .garbage (g_hi));
  rev_mux2 #(.WIDTH(STATE_W)) u_mux_out (
    .sel (dibit[1]), .d0 (lo), .d1 (hi), .y (state), .garbage (g_out));

  logic unused_garbage;
  assign unused_garbage = ^{g_lo, g_hi, g_out};
endmodule
