// tb_puf_count_arbiter: drives the four cell outputs with clocks of known
// periods. RO mode: for every arbiter configuration, the faster of the two
// ROs must win (A -> 1, B -> 0), the strobe must pulse once and `stop`
// must rise; in the test the ROs are stopped on `stop` as in the chip, and
// the winning counter must then hold 2^(2*cfg+1) plus at most a few counts.
// TERO mode: a fixed number of edges is sent to each counter, and the
// counters must hold exactly those numbers.
module tb_puf_count_arbiter;
  logic clk = 0, rst_comp = 0, ro_tero = 1;
  logic tero_a = 0, tero_b = 0, ro_a = 0, ro_b = 0;
  logic [2:0] cfg;
  logic [15:0] cnt1, cnt2;
  logic arb_out, arb_strobe, stop;
  int checks = 0, failures = 0, nstrobe = 0;
  int hpa, hpb;
  bit run = 0;

  puf_count_arbiter dut (.clk, .rst_comp, .ro_tero, .tero_a, .tero_b, .ro_a, .ro_b,
                         .arb_cfg(cfg), .cnt1, .cnt2, .arb_out, .arb_strobe, .stop);

  always #10 clk = ~clk;
  always @(posedge clk) if (arb_strobe) nstrobe++;

  always begin
    if (run && !stop) begin #(hpa); ro_a = ~ro_a; end else begin ro_a = 0; #1; end
  end
  always begin
    if (run && !stop) begin #(hpb); ro_b = ~ro_b; end else begin ro_b = 0; #1; end
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #100000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int c = 0; c < 8; c++) begin
      for (int w = 0; w < 2; w++) begin
        int lim;
        cfg = 3'(c);
        hpa = w ? 45 : 30; hpb = w ? 30 : 45;
        ro_tero = 1; rst_comp = 1; nstrobe = 0;
        repeat (2) @(posedge clk);
        rst_comp = 0; run = 1;
        wait (stop);
        repeat (4) @(posedge clk);
        run = 0;
        lim = 1 << (2 * c + 1);
        check(nstrobe == 1, "one arbiter strobe");
        check(arb_out == (w == 0), "faster RO wins");
        if (w == 0) check(int'(cnt1) >= lim && int'(cnt1) <= lim + 40, "winning counter stopped at the bit");
        else        check(int'(cnt2) >= lim && int'(cnt2) <= lim + 40, "winning counter stopped at the bit");
      end
    end
    // TERO mode
    ro_tero = 0; rst_comp = 1; nstrobe = 0;
    repeat (2) @(posedge clk);
    rst_comp = 0;
    fork
      repeat (321) begin #7 tero_a = 1; #7 tero_a = 0; end
      repeat (299) begin #9 tero_b = 1; #9 tero_b = 0; end
      repeat (50) begin #11 ro_a = ~ro_a; end
    join
    repeat (4) @(posedge clk);
    check(cnt1 == 16'd321 && cnt2 == 16'd299, "TERO counts");
    check(nstrobe == 0, "no arbitration in TERO mode");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
