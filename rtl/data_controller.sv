// data_controller: splits an 8-bit word into four 2-bit QPSK symbols.
//
// A four-state machine (INITIAL, DATA_OUT, WAIT, HALT) runs the transfer.
// In INITIAL it waits for start; on start it captures data_in and goes to
// DATA_OUT, where the first dibit is put out and the wait counter is cleared.
// In WAIT a Toffoli-gate counter holds the dibit for the rest of the symbol
// period; after SYMBOL_CYCLES cycles in all it returns to DATA_OUT for the
// next dibit, or, after the fourth, goes to HALT. HALT returns to INITIAL
// once start is low, so a start held high sends the word only once.
// Dibits leave least significant pair first: data_in[1:0], [3:2], [5:4],
// [7:6]. The dibit is chosen from the captured word by a tree of reversible
// (Fredkin) 2:1 multiplexers, and a last reversible multiplexer forces
// data_out to 00 outside a transfer.
//
// Interface: enable is high for exactly 4*SYMBOL_CYCLES cycles, the whole
// transfer; data_out is valid while enable is high and 00 otherwise. Both
// follow the state register, so the first dibit appears on the clock edge
// that samples start high in INITIAL. rst is asynchronous and active high.
//
// The four states, the dibit grouping, the reversible multiplexers, the
// Toffoli wait counter and data_out = 0 under reset are the source design's.
// The transition order, LSB-first order, symbol period and start handling are
// this design's reading of it.
module data_controller
  import qpsk_pkg::*;
#(
  parameter int unsigned SYMBOL_CYCLES = 8   // clocks per symbol, >= 2
) (
  input  logic               clk,
  input  logic               rst,
  input  logic               start,
  input  logic [WORD_W-1:0]  data_in,
  output dibit_t             data_out,
  output logic               enable
);
  localparam int unsigned CNT_W   = (SYMBOL_CYCLES > 2) ? $clog2(SYMBOL_CYCLES) : 1;
  localparam int unsigned N_SYM   = WORD_W / DIBIT_W;
  localparam logic [CNT_W-1:0] WAIT_LAST = CNT_W'(SYMBOL_CYCLES - 2);

  dc_state_e         state_q, state_d;
  logic [WORD_W-1:0] word_q;
  logic [1:0]        idx_q;
  logic [CNT_W-1:0]  wait_cnt;
  logic              cnt_clr, cnt_en;

  // Wait-time counter.
  toffoli_counter #(.WIDTH(CNT_W)) u_wait (
    .clk   (clk),
    .rst   (rst),
    .clr   (cnt_clr),
    .en    (cnt_en),
    .count (wait_cnt)
  );

  assign cnt_clr = (state_q == DC_DATA_OUT);
  assign cnt_en  = (state_q == DC_WAIT);

  always_comb begin
    state_d = state_q;
    unique case (state_q)
      DC_INITIAL:  if (start) state_d = DC_DATA_OUT;
      DC_DATA_OUT: state_d = DC_WAIT;
      DC_WAIT:     if (wait_cnt == WAIT_LAST)
                     state_d = (idx_q == 2'(N_SYM - 1)) ? DC_HALT : DC_DATA_OUT;
      DC_HALT:     if (!start) state_d = DC_INITIAL;
      default:     state_d = DC_INITIAL;
    endcase
  end

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      state_q <= DC_INITIAL;
      word_q  <= '0;
      idx_q   <= '0;
    end else begin
      state_q <= state_d;
      if (state_q == DC_INITIAL && start) begin
        word_q <= data_in;
        idx_q  <= '0;
      end else if (state_q == DC_WAIT && state_d == DC_DATA_OUT) begin
        idx_q  <= idx_q + 2'd1;
      end
    end
  end

  // Dibit selection: 4:1 reversible multiplexer tree on idx_q.
  dibit_t lo_pair, hi_pair, sel_pair;
  dibit_t g_lo, g_hi, g_sel, g_out;

  rev_mux2 #(.WIDTH(DIBIT_W)) u_mux_lo (
    .sel (idx_q[0]), .d0 (word_q[1:0]), .d1 (word_q[3:2]), .y (lo_pair), .garbage (g_lo));
  rev_mux2 #(.WIDTH(DIBIT_W)) u_mux_hi (
    .sel (idx_q[0]), .d0 (word_q[5:4]), .d1 (word_q[7:6]), .y (hi_pair), .garbage (g_hi));
  rev_mux2 #(.WIDTH(DIBIT_W)) u_mux_sel (
    .sel (idx_q[1]), .d0 (lo_pair), .d1 (hi_pair), .y (sel_pair), .garbage (g_sel));

  assign enable = (state_q == DC_DATA_OUT) || (state_q == DC_WAIT);

  // Outside a transfer the selected data is 00.
  rev_mux2 #(.WIDTH(DIBIT_W)) u_mux_out (
    .sel (enable), .d0 ('0), .d1 (sel_pair), .y (data_out), .garbage (g_out));

  logic unused_garbage;
  assign unused_garbage = ^{g_lo, g_hi, g_sel, g_out};

  // A dibit is only presented while the transfer is enabled.
  a_out_zero_when_idle: assert property (@(posedge clk) disable iff (rst)
    !enable |-> data_out == '0);

  initial begin
    assert (SYMBOL_CYCLES >= 2) else $error("SYMBOL_CYCLES must be at least 2");
  end
endmodule
