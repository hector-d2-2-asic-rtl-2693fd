// tb_hector_asic: end-to-end test of the HECTOR ASIC core through its pins.
// Commands are shifted in serially. The two PLL outputs are modelled by the
// testbench as clocks of 3000 and 4100 ps with random jitter. Time unit 1 ps,
// clk_asic period 20 ns.
//  - PLL TRNG: words must arrive once per KD PLL1 periods, each below KD.
//  - ELO TRNG: 32-bit words must arrive at one per 32*K bank-1 RO periods.
//  - TERO PUF: the two counts must match the cells' oscillation numbers.
//  - RO PUF:   the arbiter bit must name the faster cell.
//  - TERO test modules: the LVDS output must carry the selected cell.
// Each mechanism (PLL word, ELO word, TERO challenge, RO challenge with
// each outcome, next_config, test pulse) is counted, and one that never
// happened counts as a failure.
module tb_hector_asic;
  import hector_pkg::*;
  logic clk = 0, rst_n = 0, ser = 0, rdy = 0;
  logic [31:0] data;
  logic data_rdy, next_config;
  logic [7:0] km1, kd1, km2, kd2;
  logic pll1 = 0, pll2 = 0, lvds0, lvds1, test_ctrl = 0, test_lvds;
  int checks = 0, failures = 0, nrdy = 0, nnext = 0, tedges = 0;
  int hd = 0;
  int n_pll = 0, n_elo = 0, n_tero = 0, n_ro1 = 0, n_ro0 = 0, n_test = 0;

  hector_asic dut (
    .clk_asic(clk), .resetb_asic(rst_n), .config_serial(ser), .config_ready(rdy),
    .data, .data_rdy, .next_config,
    .pll_km1(km1), .pll_kd1(kd1), .pll_km2(km2), .pll_kd2(kd2),
    .pll1_clk(pll1), .pll2_clk(pll2), .pll0_lvds(lvds0), .pll1_lvds(lvds1),
    .test_ctrl, .test_lvds
  );

  always #10000 clk = ~clk;
  always begin #1500; pll1 = ~pll1; end
  always begin #(2050 + ($urandom % 21) - 10); pll2 = ~pll2; end
  always @(posedge clk) begin
    if (rst_n && data_rdy) nrdy++;
    if (rst_n && next_config) nnext++;
  end
  always @(posedge test_lvds) tedges++;

  function automatic int hp(int i, int seed);  return 400 + ((i * 37 + seed * 11) % 64) * 2; endfunction
  function automatic int nosc(int i, int seed); return 300 + ((i * 53 + seed * 7) % 256); endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic send(input logic [3:0] id, input logic [CMD_W-5:0] f);
    logic [CMD_W-1:0] c;
    c = {id, f};
    for (int b = CMD_W - 1; b >= 0; b--) begin @(negedge clk); ser = c[b]; end
    @(negedge clk); rdy = 1;
    @(negedge clk); rdy = 0;
  endtask

  task automatic wait_word(output time t);
    int n = 0;
    @(posedge clk);
    while (!data_rdy && n < 200000) begin @(posedge clk); n++; end
    t = $time;
    #1;
  endtask

  initial begin
    #4000000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    pll_cfg_t pc; elo_cfg_t ec; puf_cfg_t fc; test_cfg_t tc;
    time t0, t1;
    repeat (3) @(posedge clk);
    rst_n = 1;

    // PLL TRNG, KD = 200 PLL1 periods of 3 ns = 600 ns per word.
    pc = '0; pc.km1 = 8'd10; pc.kd1 = 8'd3; pc.km2 = 8'd7; pc.kd2 = 8'd3; pc.kd = 12'd200;
    send(BLK_PLL_TRNG, pc);
    repeat (2) @(negedge clk);
    check(km1 == 8'd10 && kd1 == 8'd3 && km2 == 8'd7 && kd2 == 8'd3, "PLL parameters on the pins");
    wait_word(t0);
    for (int i = 0; i < 8; i++) begin
      wait_word(t1);
      check(data < 32'd200, "PLL count below KD");
      check(int'(t1 - t0) >= 600000 - 20000 && int'(t1 - t0) <= 600000 + 20000, "PLL word rate");
      t0 = t1;
      n_pll++;
    end

    // ELO TRNG, RO 7 (916 MHz), K = 100: a word per 32*100 periods (~3.5 us).
    ec = '0; ec.ro_sel = 4'd7; ec.k = 32'd100;
    send(BLK_ELO_TRNG, ec);
    wait_word(t0);
    for (int i = 0; i < 6; i++) begin
      wait_word(t1);
      check(int'(t1 - t0) >= 3200 * 1092 - 40000 && int'(t1 - t0) <= 3200 * 1100 + 40000, "ELO word rate");
      t0 = t1;
      n_elo++;
    end

    // TERO PUF challenges, 1 us activation (50 cycles).
    for (int i = 0; i < 4; i++) begin
      fc = '0; fc.sel1 = 7'($urandom); fc.sel2 = 7'($urandom); fc.t_act = 16'd50;
      nnext = 0;
      send(BLK_TERO_PUF, fc);
      wait_word(t1);
      check(int'(data[31:16]) >= nosc(fc.sel1, 1) && int'(data[31:16]) <= nosc(fc.sel1, 1) + 4, "TERO A count");
      check(int'(data[15:0]) >= nosc(fc.sel2, 2) && int'(data[15:0]) <= nosc(fc.sel2, 2) + 4, "TERO B count");
      @(posedge clk); #1;
      check(nnext == 1, "next_config");
      n_tero++;
    end

    // RO PUF challenges on cell pairs whose periods differ.
    for (int i = 0; i < 6; i++) begin
      do begin
        fc = '0; fc.sel1 = 7'($urandom); fc.sel2 = 7'($urandom);
        hd = hp(fc.sel1, 3) - hp(fc.sel2, 4);
      end while (hd >= -3 && hd <= 3);
      fc.arb_cfg = 3'd7;
      send(BLK_RO_PUF, fc);
      wait_word(t1);
      check(data[0] == (hp(fc.sel1, 3) < hp(fc.sel2, 4)), "RO PUF arbiter picks the faster cell");
      if (data[0]) n_ro1++; else n_ro0++;
    end

    // TERO test modules
    for (int i = 0; i < 3; i++) begin
      int c, exp_n;
      c = $urandom % 128;
      exp_n = 100 + ((c / 8) * 53 + 35) % 800;
      tc = '0; tc.sel = 7'(c);
      send(BLK_TERO_TEST, tc);
      tedges = 0;
      @(negedge clk); test_ctrl = 1;
      #((exp_n + 10) * 1060);
      @(negedge clk); test_ctrl = 0;
      check(tedges >= exp_n && tedges <= exp_n + 3, "TERO test cell on LVDS");
      n_test++;
    end

    check(n_pll > 0, "PLL words seen");
    check(n_elo > 0, "ELO words seen");
    check(n_tero > 0, "TERO challenges seen");
    check(n_ro1 > 0 && n_ro0 > 0, "both RO PUF outcomes seen");
    check(n_test > 0, "TERO test pulses seen");
    $display("mechanisms: pll=%0d elo=%0d tero=%0d ro1=%0d ro0=%0d test=%0d", n_pll, n_elo, n_tero, n_ro1, n_ro0, n_test);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
