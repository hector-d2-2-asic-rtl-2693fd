// tb_fpga_pll_trng: end-to-end test of the FPGA PLL TRNG. clk0 has a 10 ns
// period (time unit 1 ps); the four PLL1 phases are a 13.7 ns clock with
// random jitter, each delayed by a quarter period from the previous one; phases 0 and 1 are enabled. The host:
//  1. writes KD = 8 through the serial control interface;
//  2. with mux_sel = 0 checks that the raw bit line changes only on T_Q
//     boundaries after the 256-T_Q buffer has filled (first output no
//     earlier than 256*KD cycles after the new KD), and that no alarm rises;
//  3. with mux_sel = 1 decodes the start/stop framed bytes and checks each
//     against 8 consecutive XOR samples of the core;
//  4. stops PLL1 and checks that the alarm pin rises and that the status
//     word read over the serial interface shows both failure flags;
//  5. clears the alarms through the control word.
// Each mechanism (SSI write, SSI read, raw bits, jitter bytes, alarm) is
// counted and must have happened.
module tb_fpga_pll_trng;
  logic clk0 = 0, n_reset = 0, mux_sel = 0, ssi_clk = 0, ssi_rx = 0;
  logic [3:0] ph = '0;
  logic data_out, data_clk, alarm, ssi_tx;
  int checks = 0, failures = 0;
  int n_wr = 0, n_rd = 0, n_raw = 0, n_bytes = 0, n_alarm = 0;
  bit run = 1;
  bit xs[$];

  fpga_pll_trng dut (.clk0, .clk1_ph(ph), .n_reset, .mux_sel, .data_out, .data_clk, .alarm,
                     .ssi_clk, .ssi_rx, .ssi_tx);

  always #5000 clk0 = ~clk0;
  always #20000 ssi_clk = ~ssi_clk;
  always begin
    if (run) begin
      #(6850 + ($urandom % 101) - 50);
      ph[0] = ~ph[0];
      fork
        begin automatic logic v = ph[0]; #3425 ph[1] = v; #3425 ph[2] = v; #3425 ph[3] = v; end
      join_none
    end else #1000;
  end

  // XOR samples as the core computes them (observed inside the core).
  always @(posedge clk0) #1 xs.push_back(dut.u_core.xor_out);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic ssi_frame(input logic [63:0] c, output logic [63:0] st);
    @(negedge ssi_clk); ssi_rx = 1;
    for (int b = 63; b >= 0; b--) begin @(negedge ssi_clk); ssi_rx = c[b]; st[b] = ssi_tx; end
    @(negedge ssi_clk); ssi_rx = 0;
    repeat (4) @(negedge ssi_clk);
    n_wr++; n_rd++;
  endtask

  initial begin
    #2000000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [63:0] st;
    time t_first;
    int edges;
    repeat (3) @(posedge clk0);
    n_reset = 1;
    ssi_frame({43'b0, 1'b0, 4'h3, 16'd8}, st);
    check(st[63:48] == 16'd16, "status reports reset KD");
    // 2. raw bits
    edges = 0;
    t_first = 0;
    repeat (256 * 8 * 3) begin
      logic prev;
      prev = data_out;
      @(posedge clk0); #2;
      if (data_out != prev) begin
        if (t_first == 0) t_first = $time;
        edges++;
      end
    end
    check(edges > 20, "raw bits change");
    check(t_first >= 256 * 8 * 10000, "buffer delays the first bit by 256 T_Q");
    check(!alarm, "no alarm while PLL1 runs");
    n_raw = edges;
    ssi_frame({43'b0, 1'b0, 4'h3, 16'd8}, st);
    check(st[1:0] == 2'b00, "status flags clear");
    check(st[63:48] == 16'd8, "status reports KD");
    // 3. jitter bytes
    mux_sel = 1;
    repeat (20) begin
      logic [7:0] r;
      bit found;
      @(posedge clk0); #2;
      while (data_out != 1'b0) begin @(posedge clk0); #2; end
      for (int i = 0; i < 8; i++) begin @(posedge clk0); #2; r[i] = data_out; end
      @(posedge clk0); #2;
      check(data_out == 1'b1, "stop bit");
      found = 0;
      for (int s = xs.size() - 40; s < int'(xs.size()) - 8; s++) begin
        bit ok;
        ok = 1;
        for (int i = 0; i < 8; i++) if (xs[s + i] != r[i]) ok = 0;
        if (ok) found = 1;
      end
      check(found, "byte holds 8 consecutive XOR samples");
      n_bytes++;
    end
    mux_sel = 0;
    // 4. stuck source
    run = 0; ph = 4'b0000;
    repeat (256 * 8 * 3) @(posedge clk0);
    check(alarm, "total failure alarm pin");
    if (alarm) n_alarm++;
    ssi_frame({43'b0, 1'b0, 4'h3, 16'd8}, st);
    check(st[1:0] == 2'b11, "status failure flags");
    ssi_frame({43'b0, 1'b1, 4'h3, 16'd8}, st);
    repeat (4) @(posedge clk0);
    #1 check(!alarm, "alarm cleared");
    check(n_wr > 0 && n_rd > 0 && n_raw > 0 && n_bytes > 0 && n_alarm > 0, "every mechanism seen");
    $display("mechanisms: ssi=%0d raw=%0d bytes=%0d alarm=%0d", n_wr, n_raw, n_bytes, n_alarm);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
