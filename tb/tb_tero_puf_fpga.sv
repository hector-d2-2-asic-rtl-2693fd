// tb_tero_puf_fpga: end-to-end test of the FPGA TERO PUF. The host (this
// testbench) requests a response twice with the default pairing and once
// with a challenge that pairs A.i with a permuted B cell, reading back the
// status word and the two response words. Expected bits come from the cell
// characteristics of the cell model (count = 300 + (i*53 + 7*seed) % 256,
// seeds 11 and 12, plus up to 3 random extra oscillations): the "A > B"
// bit of every pair whose counts differ by more than 3 must match, and
// such bits must be equal between the two repeated runs.
module tb_tero_puf_fpga;
  logic clk = 0, n_reset = 0, rx = 0, tx;
  int checks = 0, failures = 0;

  tero_puf_fpga dut (.clk, .n_reset, .ssi_rx(rx), .ssi_tx(tx));
  always #10000 clk = ~clk;   // 50 MHz, time unit 1 ps

  function automatic int nosc(int i, int seed); return 300 + ((i * 53 + seed * 7) % 256); endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic send_word(input logic [63:0] w);
    @(negedge clk); rx = 1;
    for (int b = 63; b >= 0; b--) begin @(negedge clk); rx = w[b]; end
    @(negedge clk); rx = 0;
  endtask

  task automatic recv_word(output logic [63:0] w);
    int t = 0;
    @(posedge clk); #1;
    while (tx != 1'b1 && t < 100000) begin @(posedge clk); #1; t++; end
    for (int b = 63; b >= 0; b--) begin @(posedge clk); #1; w[b] = tx; end
  endtask

  initial begin
    #2000000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [63:0] st, w0, w1;
    logic [127:0] resp[3];
    int perm[64];
    logic [383:0] chal;
    repeat (3) @(posedge clk);
    n_reset = 1;
    for (int i = 0; i < 64; i++) perm[i] = i;
    perm.shuffle();
    for (int i = 0; i < 64; i++) chal[6*i +: 6] = 6'(perm[i]);
    for (int run = 0; run < 3; run++) begin
      if (run < 2) send_word({8'h00, 51'b0, 5'd2});
      else         send_word({8'h01, 51'b0, 5'd6});
      if (run < 2) begin send_word('0); send_word('0); end
      else for (int i = 0; i < 6; i++) send_word(64'(chal >> (64 * i)));
      recv_word(st);
      check(st[1:0] == 2'b01, "status: done, not busy");
      recv_word(w0);
      recv_word(w1);
      resp[run] = {w1, w0};
      if (run == 2) for (int i = 2; i < 6; i++) recv_word(w0);
      for (int i = 0; i < 64; i++) begin
        int a, b;
        bit got;
        a = nosc(i, 11);
        b = nosc((run == 2) ? perm[i] : i, 12);
        got = resp[run][2*(63-i) + 1];
        if (a - b > 3 || b - a > 3) check(got == (a > b), "A > B bit of a pair");
        if (run == 1 && (a - b > 3 || b - a > 3)) check(got == resp[0][2*(63-i) + 1], "repeatable bit");
      end
    end
    $display("responses %h %h %h", resp[0], resp[1], resp[2]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
