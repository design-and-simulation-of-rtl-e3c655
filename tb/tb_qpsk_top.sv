// tb_qpsk_top: end-to-end test of the QPSK modulator at its default sizes.
//
// Sends the word 00100100 and then random words, with gin held at 1, held
// at 0 and toggled during a transfer, and compares qpsk_wave every cycle
// with a reference worked out from the QPSK definition: symbol j carries
// phase 90 deg * dibit_j (dibits LSB pair first), the carrier advances
// 45 deg per clock in the direction gin gives, and the sample is
// round(127*sin(carrier + symbol phase)); the output is 0 while idle.
// Also checks that each word takes exactly 4*8 = 32 clocks and that gout
// returns gin. Counts how often each mechanism happened (clockwise and
// anticlockwise steps, each of the four symbol phases, idle output, a start
// held past the end of the word) and fails if one never did.
module tb_qpsk_top;
  import qpsk_pkg::*;
  localparam int S = 8;               // the top's default symbol period
  localparam real PI = 3.14159265358979;

  logic       clk = 0, rst = 1, start = 0, gin = 1;
  logic [7:0] data_in = '0;
  logic       gout;
  sample_t    qpsk_wave;

  int checks = 0, failures = 0;
  int n_cw = 0, n_ccw = 0, n_idle = 0, n_held = 0, n_words = 0;
  int n_phase [4] = '{0, 0, 0, 0};

  qpsk_top dut (.clk(clk), .rst(rst), .start(start), .data_in(data_in), .gin(gin),
                .gout(gout), .qpsk_wave(qpsk_wave));

  always #5 clk = ~clk;

  function automatic int sine_ref(input int deg);
    return int'($rtoi($floor(127.0 * $sin(PI * real'(deg) / 180.0) + 0.5)));
  endfunction

  // Sends one word; gin_mode 0: gin=0, 1: gin=1, 2: random each cycle.
  task automatic send(input logic [7:0] w, input int gin_mode, input bit hold_start);
    int carrier, busy;
    @(negedge clk);
    start = 1; data_in = w;
    gin = (gin_mode == 2) ? 1'($urandom_range(0, 1)) : 1'(gin_mode);
    @(posedge clk);
    carrier = 0; busy = 0;
    for (int k = 0; k < 4 * S + 3; k++) begin
      int exp_s, dib;
      #1;
      if (!hold_start) start = 0;
      data_in = 8'($urandom);                        // captured word must not change
      dib = (k < 4 * S) ? int'(w[2 * (k / S) +: 2]) : 0;
      exp_s = (k < 4 * S) ? sine_ref(45 * ((carrier + 2 * dib) % 8)) : 0;
      if (k < 4 * S) begin
        n_phase[dib]++;
        if (qpsk_wave != 0 || exp_s == 0) busy++;
      end else if (qpsk_wave == 0) n_idle++;
      checks++;
      if (int'(qpsk_wave) != exp_s || gout !== gin) begin
        failures++;
        $display("FAIL word=%b k=%0d gin=%b wave=%0d exp %0d gout=%b", w, k, gin,
                 qpsk_wave, exp_s, gout);
      end
      @(negedge clk);
      if (gin_mode == 2) gin = 1'($urandom_range(0, 1));
      // the ring steps on the next edge in the direction gin has then
      if (gin) begin n_cw++;  carrier = (carrier + 1) % 8; end
      else     begin n_ccw++; carrier = (carrier + 7) % 8; end
      @(posedge clk);
    end
    checks++;
    if (busy != 4 * S) begin
      failures++;
      $display("FAIL word=%b active for %0d cycles, exp %0d", w, busy, 4 * S);
    end
    if (hold_start) begin
      n_held++;
      repeat (3) begin
        #1 checks++;
        if (qpsk_wave != 0) begin failures++; $display("FAIL held start resent the word"); end
        @(posedge clk);
      end
    end
    #1 start = 0;
    n_words++;
    @(posedge clk);
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1;
    checks++;
    if (qpsk_wave != 0) begin failures++; $display("FAIL output not zero in reset"); end
    rst = 0;
    send(8'b0010_0100, 1, 0);    // the reference word, clockwise carrier
    send(8'b0010_0100, 0, 0);    // same word, anticlockwise carrier
    send(8'b1110_0100, 1, 1);    // all four phases, start held high
    for (int i = 0; i < 30; i++)
      send(8'($urandom), i % 3, 1'(i % 4 == 0));

    // every mechanism must have happened
    checks++;
    if (n_cw == 0 || n_ccw == 0 || n_idle == 0 || n_held == 0 ||
        n_phase[0] == 0 || n_phase[1] == 0 || n_phase[2] == 0 || n_phase[3] == 0) begin
      failures++;
      $display("FAIL coverage cw=%0d ccw=%0d idle=%0d held=%0d phases=%0d/%0d/%0d/%0d",
               n_cw, n_ccw, n_idle, n_held, n_phase[0], n_phase[1], n_phase[2], n_phase[3]);
    end
    $display("coverage: words=%0d cw=%0d ccw=%0d idle=%0d held=%0d phases=%0d/%0d/%0d/%0d",
             n_words, n_cw, n_ccw, n_idle, n_held, n_phase[0], n_phase[1], n_phase[2], n_phase[3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
