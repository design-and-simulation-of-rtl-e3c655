// tb_toffoli_counter: drives a 4-bit counter with random enable and clear
// and compares each cycle with a reference count; checks reset, wrap-around
// and that clear wins over enable.
module tb_toffoli_counter;
  localparam int W = 4;
  logic         clk = 0, rst = 1, clr = 0, en = 0;
  logic [W-1:0] count;
  int unsigned  ref_cnt = 0;
  int checks = 0, failures = 0, wraps = 0;

  toffoli_counter #(.WIDTH(W)) dut (.clk(clk), .rst(rst), .clr(clr), .en(en), .count(count));

  always #5 clk = ~clk;

  initial begin
    repeat (2) @(posedge clk);
    #1 rst = 0;
    checks++;
    if (count !== '0) begin failures++; $display("FAIL count after reset %0d", count); end
    for (int i = 0; i < 400; i++) begin
      @(negedge clk);
      en  = (i < 60) ? 1'b1 : 1'($urandom_range(0, 3) != 0);
      clr = (i < 60) ? 1'b0 : 1'($urandom_range(0, 15) == 0);
      @(posedge clk);
      if (clr)     ref_cnt = 0;
      else if (en) begin
        if (ref_cnt == 2**W - 1) wraps++;
        ref_cnt = (ref_cnt + 1) % (2**W);
      end
      #1;
      checks++;
      if (count !== W'(ref_cnt)) begin
        failures++;
        $display("FAIL cycle %0d en=%b clr=%b count=%0d exp %0d", i, en, clr, count, ref_cnt);
      end
    end
    checks++;
    if (wraps == 0) begin failures++; $display("FAIL no wrap-around exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
