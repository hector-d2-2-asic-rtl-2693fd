// tb_dc_trng: end-to-end test of the DC TRNG with the behavioural ring
// oscillator and delay chains (time unit 1 ps, 100 MHz quartz clock,
// test window reduced to 256 raw bits). Checks: one raw bit per DIV = 8
// clock cycles; data_out carries each raw bit (mux_sel = 0) or the parity
// of each group of 4 raw bits (mux_sel = 1) until the next one; clk_out has a period of 8 and
// 32 clock cycles in the two modes; the raw bits are not constant and no
// alarm is raised while the RO runs; both alarms rise once the RO stops.
module tb_dc_trng;
  logic clk = 0, rst_n = 0, ro_run = 1, mux_sel = 0;
  logic data_out, clk_out, tf_alarm, ol_alarm;
  int checks = 0, failures = 0, nraw = 0, nones = 0, npf = 0, last = -1, cyc = 0;
  bit acc = 0, prev_raw = 0, prev_pf = 0;
  bit pf_exp[$];

  dc_trng #(.WIN(256)) dut (.clk, .rst_n, .ro_run, .mux_sel, .data_out, .clk_out, .tf_alarm, .ol_alarm);
  always #5000 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s at %0t", what, $time); end
  endtask

  always @(posedge clk) begin
    #1;
    cyc++;
    if (rst_n && dut.raw_valid) begin
      if (last >= 0) check(cyc - last == 8, "raw bit rate");
      last = cyc;
      nraw++; nones += dut.raw_bit;
      acc ^= dut.raw_bit;
      if (nraw % 4 == 0) begin pf_exp.push_back(acc); acc = 0; end
      if (!mux_sel && nraw > 1) check(data_out == prev_raw, "raw bit on data_out");
      prev_raw = dut.raw_bit;
    end
    if (rst_n && dut.pf_valid) begin
      check(dut.pf_bit == pf_exp.pop_front(), "parity of 4 raw bits");
      if (mux_sel && npf > 0) check(data_out == prev_pf, "post-processed bit on data_out");
      prev_pf = dut.pf_bit;
      npf++;
    end
  end

  initial begin
    #3000000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic clk_out_period(input int expect_cycles);
    time t0, t1;
    @(posedge clk_out); t0 = $time;
    @(posedge clk_out); t1 = $time;
    check(t1 - t0 == time'(expect_cycles) * 10000, "clk_out period");
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (256 * 8 * 3) @(posedge clk);
    check(nones > nraw / 4 && nones < 3 * nraw / 4, "raw bits balanced");
    check(!tf_alarm && !ol_alarm, "no alarm while the RO runs");
    clk_out_period(8);
    mux_sel = 1;
    repeat (400) @(posedge clk);
    clk_out_period(32);
    check(npf > 0, "post-processed bits seen");
    ro_run = 0;
    repeat (256 * 8 * 2 + 20) @(posedge clk);
    check(tf_alarm, "total failure alarm when the RO stops");
    check(ol_alarm, "online test alarm when the RO stops");
    $display("raw=%0d ones=%0d pf=%0d", nraw, nones, npf);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
