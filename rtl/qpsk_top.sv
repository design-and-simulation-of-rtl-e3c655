// qpsk_top: reversible-logic QPSK modulator sub-system.
//
// An 8-bit word is sent as four QPSK symbols of two bits each:
//   data_controller    -> captures the word on start, hands out one dibit per
//                         symbol period and frames the transfer with enable;
//   data_state_encoder -> maps the dibit to a phase state (0/90/180/270 deg);
//   qpsk_wave_gen      -> steps an eight-state carrier phase ring, offset by
//                         the symbol's phase state, and gives its angle;
//   wave_sample_gen    -> turns the angle into an 8-bit sine sample.
// With the default SYMBOL_CYCLES = 8 each symbol is one full carrier cycle of
// eight samples, and the word takes 32 clocks. Outside a transfer qpsk_wave
// is 0. gin sets the ring direction (1: clockwise, 0: anticlockwise, i.e. the
// conjugate carrier); gout returns gin, the reversible garbage line.
//
// Timing: qpsk_wave for symbol j, sample n (n = 0..SYMBOL_CYCLES-1) appears
// j*SYMBOL_CYCLES + n cycles after the rising edge that samples start high
// in the idle state; it is 127*sin(45 deg * ((2*dibit_j +/- n) mod 8)).
// rst is asynchronous and active high.
// The block chain, its signal widths and the port list are the source
// design's; the symbol period is this design's choice.
module qpsk_top
  import qpsk_pkg::*;
#(
  parameter int unsigned SYMBOL_CYCLES = 8
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              start,
  input  logic [WORD_W-1:0] data_in,
  input  logic              gin,
  output logic              gout,
  output sample_t           qpsk_wave
);
  dibit_t       data_out;
  logic         enable;
  phase_state_t state;
  degree_t      degree;

  data_controller #(.SYMBOL_CYCLES(SYMBOL_CYCLES)) u_data_controller (
    .clk      (clk),
    .rst      (rst),
    .start    (start),
    .data_in  (data_in),
    .data_out (data_out),
    .enable   (enable)
  );

  data_state_encoder u_data_state_encoder (
    .dibit (data_out),
    .state (state)
  );

  qpsk_wave_gen u_qpsk_wave_gen (
    .clk    (clk),
    .rst    (rst),
    .enable (enable),
    .gin    (gin),
    .state  (state),
    .degree (degree),
    .gout   (gout)
  );

  wave_sample_gen u_wave_sample_gen (
    .degree (degree),
    .sample (qpsk_wave)
  );

  // The output rests at zero outside a transfer.
  a_idle_zero: assert property (@(posedge clk) disable iff (rst)
    !enable |-> qpsk_wave == '0);
endmodule
