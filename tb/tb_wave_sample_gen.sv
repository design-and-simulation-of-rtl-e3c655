// tb_wave_sample_gen: sweeps every 10-bit signed angle and compares the
// sample with round(127*sin(angle)) for the ring angles (0, +/-45, ...,
// +/-315) and with 0 for every other angle.
module tb_wave_sample_gen;
  import qpsk_pkg::*;
  degree_t degree;
  sample_t sample;
  int checks = 0, failures = 0;
  real     PI = 3.14159265358979;

  wave_sample_gen dut (.degree(degree), .sample(sample));

  initial begin
    for (int d = -512; d < 512; d++) begin
      int exp_s;
      degree = degree_t'(d);
      #1;
      if (d % 45 == 0 && d > -360 && d < 360)
        exp_s = int'($rtoi($floor(127.0 * $sin(PI * real'(d) / 180.0) + 0.5)));
      else
        exp_s = 0;
      checks++;
      if (int'(sample) != exp_s) begin
        failures++;
        $display("FAIL degree=%0d sample=%0d exp %0d", d, sample, exp_s);
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
