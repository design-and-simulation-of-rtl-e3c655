// tb_qpsk_wave_gen: random enable, gin and symbol state each cycle, checked
// against a reference ring position: degree = 45 * ((ring + state) mod 8),
// angle 0 and ring cleared while enable is low and stepped +1 (gin=1) or -1 (gin=0)
// otherwise; gout must follow gin. Counts both directions and both wraps.
module tb_qpsk_wave_gen;
  import qpsk_pkg::*;
  logic         clk = 0, rst = 1, enable = 0, gin = 0;
  phase_state_t state = '0;
  degree_t      degree;
  logic         gout;
  int unsigned  ring = 0;
  int checks = 0, failures = 0;
  int n_cw = 0, n_ccw = 0, wrap_cw = 0, wrap_ccw = 0;

  qpsk_wave_gen dut (.clk(clk), .rst(rst), .enable(enable), .gin(gin), .state(state),
                     .degree(degree), .gout(gout));

  always #5 clk = ~clk;

  task automatic check_now();
    int exp_deg;
    exp_deg = enable ? 45 * int'((ring + state) % 8) : 0;
    checks++;
    if (int'(degree) != exp_deg || gout !== gin) begin
      failures++;
      $display("FAIL ring=%0d state=%0d gin=%b degree=%0d exp %0d gout=%b",
               ring, state, gin, degree, exp_deg, gout);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1 rst = 0;
    for (int i = 0; i < 600; i++) begin
      @(negedge clk);
      enable = (i % 50 < 45);
      gin    = (i % 100 < 50) ? 1'b1 : 1'($urandom_range(0, 1));
      state  = phase_state_t'($urandom_range(0, 7));
      #1 check_now();
      @(posedge clk);
      if (!enable) ring = 0;
      else if (gin) begin
        n_cw++;
        if (ring == 7) wrap_cw++;
        ring = (ring + 1) % 8;
      end else begin
        n_ccw++;
        if (ring == 0) wrap_ccw++;
        ring = (ring + 7) % 8;
      end
      #1 check_now();
    end
    checks++;
    if (n_cw == 0 || n_ccw == 0 || wrap_cw == 0 || wrap_ccw == 0) begin
      failures++;
      $display("FAIL coverage cw=%0d ccw=%0d wrap_cw=%0d wrap_ccw=%0d",
               n_cw, n_ccw, wrap_cw, wrap_ccw);
    end
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
