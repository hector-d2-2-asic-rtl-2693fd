// tb_ro_bank8: measures the frequency of each of the eight ELO ring
// oscillator models and compares it with the estimated frequencies (350,
// 430, 500, 560, 630, 670, 720, 916 MHz) within 2 %. Time unit 1 ps.
module tb_ro_bank8;
  logic ena = 0;
  logic [2:0] sel = '0;
  logic out;
  int checks = 0, failures = 0;
  int fmhz[8] = '{350, 430, 500, 560, 630, 670, 720, 916};

  ro_bank8 dut (.ena, .sel, .out);

  initial begin
    #100000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 8; i++) begin
      time t0, t1;
      real f;
      sel = 3'(i); ena = 1;
      @(posedge out); t0 = $time;
      repeat (100) @(posedge out);
      t1 = $time;
      f = 100.0 * 1.0e6 / real'(t1 - t0);
      checks++;
      if (f < 0.98 * fmhz[i] || f > 1.02 * fmhz[i]) begin
        failures++; $display("FAIL RO %0d: %f MHz", i, f);
      end
      ena = 0; #5000;
      checks++;
      if (out != 0) begin failures++; $display("FAIL RO %0d still running", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
