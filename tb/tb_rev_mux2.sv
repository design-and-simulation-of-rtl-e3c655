// tb_rev_mux2: exhaustive test of a 3-bit reversible 2:1 multiplexer:
// y must be the selected input and garbage the other one.
module tb_rev_mux2;
  logic       sel;
  logic [2:0] d0, d1, y, garbage;
  int checks = 0, failures = 0;

  rev_mux2 #(.WIDTH(3)) dut (.sel(sel), .d0(d0), .d1(d1), .y(y), .garbage(garbage));

  initial begin
    for (int i = 0; i < 128; i++) begin
      {sel, d0, d1} = 7'(i);
      #1;
      checks++;
      if (y !== (sel ? d1 : d0) || garbage !== (sel ? d0 : d1)) begin
        failures++;
        $display("FAIL sel=%b d0=%b d1=%b y=%b garbage=%b", sel, d0, d1, y, garbage);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
