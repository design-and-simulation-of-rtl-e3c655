// tb_feynman_gate: exhaustive test of the Feynman gate against its truth
// table (P = A, Q = A xor B), written out as constants.
module tb_feynman_gate;
  logic a, b, p, q;
  int checks = 0, failures = 0;
  // {a,b} -> {p,q}
  localparam logic [1:0] EXP [4] = '{2'b00, 2'b01, 2'b11, 2'b10};

  feynman_gate dut (.a(a), .b(b), .p(p), .q(q));

  initial begin
    for (int i = 0; i < 4; i++) begin
      {a, b} = 2'(i);
      #1;
      checks++;
      if ({p, q} !== EXP[i]) begin
        failures++;
        $display("FAIL a=%b b=%b got pq=%b exp %b", a, b, {p, q}, EXP[i]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
