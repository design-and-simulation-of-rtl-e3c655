// tb_fredkin_gate: exhaustive test of the Fredkin gate against its truth
// table (A = 1 swaps B and C), written out as constants; also checks that
// the gate is reversible (the eight outputs are all different).
module tb_fredkin_gate;
  logic a, b, c, p, q, r;
  int checks = 0, failures = 0;
  // {a,b,c} -> {p,q,r}
  localparam logic [2:0] EXP [8] = '{3'b000, 3'b001, 3'b010, 3'b011,
                                     3'b100, 3'b110, 3'b101, 3'b111};
  logic [7:0] seen;

  fredkin_gate dut (.a(a), .b(b), .c(c), .p(p), .q(q), .r(r));

  initial begin
    seen = '0;
    for (int i = 0; i < 8; i++) begin
      {a, b, c} = 3'(i);
      #1;
      checks++;
      if ({p, q, r} !== EXP[i]) begin
        failures++;
        $display("FAIL abc=%b got pqr=%b exp %b", {a, b, c}, {p, q, r}, EXP[i]);
      end
      seen[{p, q, r}] = 1'b1;
    end
    checks++;
    if (seen !== 8'hFF) begin
      failures++;
      $display("FAIL outputs not a permutation: %b", seen);
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
