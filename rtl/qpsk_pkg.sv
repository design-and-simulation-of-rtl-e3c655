// qpsk_pkg: types and constants shared by the reversible-logic QPSK modulator.
//
// The modulator carries 2 bits per symbol on an eight-position phase ring
// (45 degrees per position). The ring positions are 3-bit phase states; the
// wave generator turns a state into its angle in whole degrees, as a 10-bit
// signed number, and the wave sample generator turns the angle into an 8-bit
// two's-complement sample. The widths (3-bit state, 10-bit degree, 8-bit
// sample, 8-bit input word) and the 45-degree ring are the source design's;
// the controller state encoding is this design's choice.
package qpsk_pkg;

  localparam int unsigned WORD_W    = 8;   // input word width
  localparam int unsigned DIBIT_W   = 2;   // bits per QPSK symbol
  localparam int unsigned STATE_W   = 3;   // phase-ring state width
  localparam int unsigned N_PHASES  = 8;   // ring positions
  localparam int unsigned DEG_STEP  = 45;  // degrees per ring position
  localparam int unsigned DEG_W     = 10;  // signed degree width
  localparam int unsigned SAMPLE_W  = 8;   // output sample width

  typedef logic [DIBIT_W-1:0]  dibit_t;
  typedef logic [STATE_W-1:0]  phase_state_t;
  typedef logic signed [DEG_W-1:0]    degree_t;
  typedef logic signed [SAMPLE_W-1:0] sample_t;

  // Data controller states (the four of its state diagram).
  typedef enum logic [1:0] {
    DC_INITIAL  = 2'd0,
    DC_DATA_OUT = 2'd1,
    DC_WAIT     = 2'd2,
    DC_HALT     = 2'd3
  } dc_state_e;

  // Angle of a ring state in degrees: 45 * state.
  function automatic degree_t degree_of(input phase_state_t s);
    return degree_t'(DEG_STEP * s);
  endfunction

  // Sine sample, amplitude 127, of one of the eight ring angles.
  // 127*sin(45 deg) = 89.8 rounds to 90.
  function automatic sample_t sine_of_state(input phase_state_t s);
    case (s)
      3'd0: return sample_t'(0);
      3'd1: return sample_t'(90);
      3'd2: return sample_t'(127);
      3'd3: return sample_t'(90);
      3'd4: return sample_t'(0);
      3'd5: return sample_t'(-90);
      3'd6: return sample_t'(-127);
      default: return sample_t'(-90);
    endcase
  endfunction

endpackage
