// tb_data_controller: sends random words through two controllers, one with
// the default 8-cycle symbol period and one with 3, and checks cycle by
// cycle that enable is high for exactly 4 symbol periods starting on the
// edge that samples start, that data_out carries the dibits LSB pair first,
// each for one symbol period, that data_out is 00 while idle, and that a
// start held high does not send the word twice.
module tb_data_controller;
  import qpsk_pkg::*;
  localparam int S_A = 8;
  localparam int S_B = 3;
  logic        clk = 0, rst = 1, start = 0;
  logic [7:0]  data_in = '0;
  dibit_t      out_a, out_b;
  logic        en_a, en_b;
  int checks = 0, failures = 0, words = 0, held_starts = 0;

  data_controller dut_a (.clk(clk), .rst(rst), .start(start), .data_in(data_in),
                         .data_out(out_a), .enable(en_a));
  data_controller #(.SYMBOL_CYCLES(S_B)) dut_b (.clk(clk), .rst(rst), .start(start),
                         .data_in(data_in), .data_out(out_b), .enable(en_b));

  always #5 clk = ~clk;

  // Expected outputs k cycles after the start edge (k = 0 is right after it).
  function automatic logic [2:0] expect_at(input logic [7:0] w, input int k, input int s);
    if (k < 0 || k >= 4 * s) return 3'b000;
    return {1'b1, w[2 * (k / s) +: 2]};
  endfunction

  task automatic send(input logic [7:0] w, input int hold);
    @(negedge clk);
    start = 1; data_in = w;
    @(posedge clk);
    for (int k = 0; k < 4 * S_A + 4; k++) begin
      #1;
      if (k == 1) data_in = ~w;      // the word is captured at the start edge
      if (k == hold) start = 0;
      checks += 2;
      if ({en_a, out_a} !== expect_at(w, k, S_A)) begin
        failures++;
        $display("FAIL A word=%h k=%0d en=%b out=%b exp %b", w, k, en_a, out_a, expect_at(w, k, S_A));
      end
      if ({en_b, out_b} !== expect_at(w, k, S_B)) begin
        failures++;
        $display("FAIL B word=%h k=%0d en=%b out=%b exp %b", w, k, en_b, out_b, expect_at(w, k, S_B));
      end
      @(posedge clk);
    end
    #1 start = 0;
    words++;
    if (hold > 4 * S_A) held_starts++;
    @(posedge clk);
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1;
    checks++;
    if (en_a || out_a != 0) begin failures++; $display("FAIL not idle after reset"); end
    rst = 0;
    send(8'b0010_0100, 1);
    send(8'hFF, 1);
    send(8'h00, 1);
    for (int i = 0; i < 20; i++)
      send(8'($urandom), (i % 3 == 0) ? 4 * S_A + 2 : 1);
    checks++;
    if (held_starts == 0) begin failures++; $display("FAIL held start never exercised"); end
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
