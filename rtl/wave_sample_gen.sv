// wave_sample_gen: turns a carrier angle into an 8-bit waveform sample.
//
// The 10-bit signed angle in degrees from the wave generator is matched
// against the eight ring angles 0, 45, ..., 315 and the sine of the angle,
// scaled to 127 and rounded, is put out as an 8-bit two's-complement sample:
// 0, 90, 127, 90, 0, -90, -127, -90. Negative angles -45 ... -315 are
// accepted as their positive equivalents. Any other angle, which the wave
// generator never produces, gives 0.
// Because sin(0) = 0, the idle angle 0 gives a zero output, so the
// modulator's output rests at 00000000 outside a transfer.
// Timing: purely combinational, no clock.
// The 10-bit angle input and 8-bit sample output are the source design's;
// the sine mapping, the amplitude and the number format are this design's.
module wave_sample_gen
  import qpsk_pkg::*;
(
  input  degree_t degree,
  output sample_t sample
);
  always_comb begin
    sample = '0;
    for (int k = 0; k < N_PHASES; k++) begin
      if (degree == degree_of(phase_state_t'(k)) ||
          (k != 0 && degree == degree_of(phase_state_t'(k)) - degree_t'(360)))
        sample = sine_of_state(phase_state_t'(k));
    end
  end
endmodule
