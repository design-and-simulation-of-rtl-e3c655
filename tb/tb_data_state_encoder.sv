// tb_data_state_encoder: checks the default symbol-to-state table
// (00->0, 01->2, 10->4, 11->6, i.e. 0/90/180/270 degrees) and that a second
// instance with another table looks up that table.
module tb_data_state_encoder;
  import qpsk_pkg::*;
  dibit_t       dibit;
  phase_state_t state, state_alt;
  int checks = 0, failures = 0;
  localparam phase_state_t EXP_DEG [4] = '{3'd0, 3'd2, 3'd4, 3'd6};
  localparam phase_state_t ALT     [4] = '{3'd0, 3'd3, 3'd5, 3'd7};
  localparam int           DEGREES [4] = '{0, 90, 180, 270};

  data_state_encoder dut (.dibit(dibit), .state(state));
  data_state_encoder #(.STATE_TABLE(ALT)) dut_alt (.dibit(dibit), .state(state_alt));

  initial begin
    for (int i = 0; i < 4; i++) begin
      dibit = 2'(i);
      #1;
      checks++;
      if (state !== EXP_DEG[i] || 45 * int'(state) != DEGREES[i]) begin
        failures++;
        $display("FAIL dibit=%b state=%0d exp %0d", dibit, state, EXP_DEG[i]);
      end
      checks++;
      if (state_alt !== ALT[i]) begin
        failures++;
        $display("FAIL alt table dibit=%b state=%0d exp %0d", dibit, state_alt, ALT[i]);
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
