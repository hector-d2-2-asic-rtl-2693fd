// tb_pll_trng_core: drives the four PLL1 phases with random data synchronous
// to clk0 and checks, against values computed here from the driven data:
// the XOR of the enabled, sampled phases every cycle; each decimated bit
// (XOR of KD samples) and its period of KD cycles; that the buffer outputs
// the bit decimated 256 T_Q earlier; no alarm on random data; then, with
// the phases frozen, that the total-failure and online alarms are raised
// and are cleared by `clear`.
module tb_pll_trng_core;
  logic clk0 = 0, rst_n = 0, clear = 0;
  logic [3:0] ph = '0, ph_en = 4'b1011;
  logic [15:0] kd = 16'd5;
  logic xor_out, dec_bit, dec_valid, buf_bit, buf_valid, tf_alarm, ol_alarm;
  logic [31:0] ones;
  int checks = 0, failures = 0, cyc = 0;
  bit xq[$];       // expected XOR stream
  bit dq[$];       // decimated bits seen
  int nbuf = 0, last_dec = -1;
  bit freeze = 0;

  pll_trng_core dut (.clk0, .rst_n, .ph, .ph_en, .kd, .clear, .xor_out, .dec_bit, .dec_valid,
                     .buf_bit, .buf_valid, .tf_alarm, .ol_alarm, .ones);

  always #5 clk0 = ~clk0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s at cycle %0d", what, cyc); end
  endtask

  logic [3:0] ph_q;
  always @(posedge clk0) begin
    if (rst_n) begin
      cyc++;
      #1;
      if (cyc > 1) begin
        check(xor_out == ^(ph & ph_en), "XOR of sampled phases");
        xq.push_back(xor_out);
      end
      if (dec_valid) begin
        bit e;
        e = 0;
        for (int i = 0; i < int'(kd); i++) e ^= xq[xq.size() - 2 - i];
        if (!freeze) check(dec_bit == e, "decimated bit");
        if (last_dec >= 0) check(cyc - last_dec == int'(kd), "decimation period");
        last_dec = cyc;
        dq.push_back(dec_bit);
      end
      if (buf_valid) begin
        check(buf_bit == dq[nbuf], "buffered bit is 256 T_Q old");
        check(dq.size() == nbuf + 257, "buffer depth");
        nbuf++;
      end
    end
  end

  always @(negedge clk0) begin
    ph_q <= ph;
    if (!freeze) ph <= 4'($urandom);
  end

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk0);
    rst_n = 1;
    repeat (256 * 5 * 4) @(posedge clk0);
    check(!tf_alarm && !ol_alarm, "no alarm on random data");
    check(nbuf > 0, "buffer produced output");
    freeze = 1;
    @(negedge clk0); ph = 4'b0001;
    repeat (256 * 5 * 2 + 10) @(posedge clk0);
    check(tf_alarm, "total failure alarm on a stuck source");
    check(ol_alarm, "online alarm on a stuck source");
    check(ones == 256 * 5, "ones of the stuck window");
    @(negedge clk0); clear = 1;
    @(negedge clk0); clear = 0;
    #1 check(!tf_alarm && !ol_alarm, "alarms cleared");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
