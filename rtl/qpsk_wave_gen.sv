// qpsk_wave_gen: the eight-state phase ring of the modulator.
//
// A 3-bit ring register walks the eight 45-degree positions of the carrier
// phase, one position per clock while enable is high: to the next state
// (clockwise, +1) when gin is 1 and to the previous state (anticlockwise, -1)
// when gin is 0. Eight clocks make one carrier cycle. While enable is low the
// ring is cleared to state 0 and the angle output is 0. The symbol's phase
// state from the encoder is added to the ring position (mod 8), and the
// result is put out as its angle in degrees, 45 * position, a 10-bit signed
// number (0 to 315).
// Step selection (+1 or -1) is a reversible multiplexer, and both additions
// use a reversible ripple adder. gin is passed back out on gout through a
// Feynman gate, the garbage line that keeps the step direction recoverable.
//
// Interface: degree is combinational from the ring register and state; the
// ring advances on each rising clock edge with enable high. rst is
// asynchronous, active high.
// The eight states, their angles, the 10-bit signed degree and the gin
// direction rule are the source design's. Stepping the ring once per clock
// and adding the symbol state to it (carrier phase plus symbol phase) is this
// design's reading of how the ring and the encoder state combine.
module qpsk_wave_gen
  import qpsk_pkg::*;
(
  input  logic         clk,
  input  logic         rst,
  input  logic         enable,
  input  logic         gin,
  input  phase_state_t state,
  output degree_t      degree,
  output logic         gout
);
  phase_state_t ring_q, step, ring_next, phase_sum, phase;
  phase_state_t g_step, g_gate;
  logic         gin_copy;

  // gin fan-out: P goes back out as the garbage output, Q drives the mux.
  feynman_gate u_gin (.a (gin), .b (1'b0), .p (gout), .q (gin_copy));

  // +1 (3'b001) clockwise or -1 (3'b111) anticlockwise.
  rev_mux2 #(.WIDTH(STATE_W)) u_step (
    .sel (gin_copy), .d0 (3'b111), .d1 (3'b001), .y (step), .garbage (g_step));

  rev_adder #(.WIDTH(STATE_W)) u_ring_add  (.a (ring_q), .b (step),  .sum (ring_next));
  rev_adder #(.WIDTH(STATE_W)) u_phase_add (.a (ring_q), .b (state), .sum (phase_sum));

  // Outside a transfer the angle is 0, whatever the ring last held.
  rev_mux2 #(.WIDTH(STATE_W)) u_gate (
    .sel (enable), .d0 (3'b000), .d1 (phase_sum), .y (phase), .garbage (g_gate));

  always_ff @(posedge clk or posedge rst) begin
    if (rst)          ring_q <= '0;
    else if (!enable) ring_q <= '0;
    else              ring_q <= ring_next;
  end

  // 45 * phase = 32p + 8p + 4p + p.
  assign degree = degree_of(phase);

  logic unused_garbage;
  assign unused_garbage = ^{g_step, g_gate};
endmodule
