// tb_elo_trng: self-checking test of the ELO TRNG sampler. Both oscillators
// are driven by the testbench: `ro_clk` is a plain clock and `ro_noise` a
// clock of its own period, so the value each sample must take is known
// from the sample time. Checks the strobe period (K ro_clk cycles, for
// several K including the clamp of K < 2) and every sampled bit.
module tb_elo_trng;
  logic ro_clk = 0, rst_n = 0, noise = 0;
  logic [31:0] k;
  logic strobe, bit_out;
  int checks = 0, failures = 0;
  int cyc = 0, last = -1, nstrobe = 0;
  bit exp_bit;

  elo_sampler dut (.ro_clk, .rst_n, .ro_noise(noise), .k, .strobe, .bit_out);

  always #500 ro_clk = ~ro_clk;        // 1000-unit period
  always #1733 noise = ~noise;         // unrelated noise oscillator

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at cycle %0d", what, cyc); end
  endtask

  always @(posedge ro_clk) cyc++;

  int exp_period;
  always @(posedge strobe) begin
    #1 exp_bit = noise;       // value the flip-flop saw at the strobe edge
    check(bit_out == exp_bit, "sampled bit");
    if (last >= 0) check(cyc - last == exp_period, "strobe period");
    last = cyc;
    nstrobe++;
  end

  initial begin
    #100000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int ks[4] = '{5, 2, 1, 97};
  initial begin
    k = 32'd5;
    repeat (3) @(posedge ro_clk);
    rst_n = 1;
    foreach (ks[i]) begin
      @(negedge ro_clk);
      rst_n = 0; k = ks[i]; exp_period = (ks[i] < 2) ? 2 : ks[i];
      @(negedge ro_clk);
      rst_n = 1; last = -1; nstrobe = 0;
      wait (nstrobe == 20);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
