// tb_toffoli_gate: exhaustive test of the Toffoli gate against its truth
// table (P = A, Q = B, R = AB xor C), written out as constants.
module tb_toffoli_gate;
  logic a, b, c, p, q, r;
  int checks = 0, failures = 0;
  // {a,b,c} -> {p,q,r}: only the last two rows flip R.
  localparam logic [2:0] EXP [8] = '{3'b000, 3'b001, 3'b010, 3'b011,
                                     3'b100, 3'b101, 3'b111, 3'b110};

  toffoli_gate dut (.a(a), .b(b), .c(c), .p(p), .q(q), .r(r));

  initial begin
    for (int i = 0; i < 8; i++) begin
      {a, b, c} = 3'(i);
      #1;
      checks++;
      if ({p, q, r} !== EXP[i]) begin
        failures++;
        $display("FAIL abc=%b got pqr=%b exp %b", {a, b, c}, {p, q, r}, EXP[i]);
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
