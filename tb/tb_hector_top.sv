// tb_hector_top: end-to-end test of all designs side by side, with the top
// at its default parameters. Time unit 1 ps. Five host processes run in
// parallel, one per design, each through its own pins only:
//  - HECTOR ASIC: serial commands for the PLL TRNG (word rate, count below
//    KD), the ELO TRNG (word rate), the TERO PUF (counts match the cells),
//    the RO PUF (faster cell wins, both outcomes) and the TERO test modules
//    (selected cell on the LVDS pin). PLL outputs are testbench clocks.
//  - FPGA PLL TRNG: KD written over the serial control interface, raw bits
//    after the 256-T_Q buffer, framed jitter bytes, alarm when PLL1 stops,
//    alarm cleared through the control word.
//  - DC TRNG: clk_out periods in both modes, raw bits balanced, no alarm
//    while the RO runs, both alarms after it stops.
//  - FPGA TERO PUF: a response over the serial interface whose comparison
//    bits match the cell characteristics.
//  - TERO TRNG chip: SPI start, stop detection, counter range and parity.
// Every mechanism is counted; one that never happened counts as a failure.
module tb_hector_top;
  import hector_pkg::*;

  // ---------------- pins ----------------
  logic        asic_clk = 0, asic_resetb = 0, asic_config_serial = 0, asic_config_ready = 0;
  logic [31:0] asic_data;
  logic        asic_data_rdy, asic_next_config;
  logic [7:0]  asic_pll_km1, asic_pll_kd1, asic_pll_km2, asic_pll_kd2;
  logic        asic_pll1_clk = 0, asic_pll2_clk = 0, asic_pll0_lvds, asic_pll1_lvds;
  logic        asic_test_ctrl = 0, asic_test_lvds;
  logic        pll_clk0 = 0, pll_n_reset = 0, pll_mux_sel = 0, pll_ssi_clk = 0, pll_ssi_rx = 0;
  logic [3:0]  pll_clk1_ph = '0;
  logic        pll_data_out, pll_data_clk, pll_alarm, pll_ssi_tx;
  logic        dc_clk = 0, dc_rst_n = 0, dc_ro_run = 1, dc_mux_sel = 0;
  logic        dc_data_out, dc_clk_out, dc_tf_alarm, dc_ol_alarm;
  logic        puf_clk = 0, puf_n_reset = 0, puf_ssi_rx = 0, puf_ssi_tx;
  logic        st_clk = 0, st_nrst = 1, st_spi_clk = 0, st_spi_mosi = 0, st_spi_ss_n = 1, st_spi_miso;

  hector_top dut (.*);

  int checks = 0, failures = 0;
  // mechanism counters
  int n_pll = 0, n_elo = 0, n_tero = 0, n_ro1 = 0, n_ro0 = 0, n_test = 0, n_next = 0;
  int n_fssi = 0, n_fraw = 0, n_fbyte = 0, n_falarm = 0;
  int n_dcraw = 0, n_dcpf = 0, n_dcalarm = 0;
  int n_puf = 0;
  int n_st = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    #3000000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- clocks ----------------
  always #10000 asic_clk = ~asic_clk;
  always begin #1500; asic_pll1_clk = ~asic_pll1_clk; end
  always begin #(2050 + ($urandom % 21) - 10); asic_pll2_clk = ~asic_pll2_clk; end
  always #5000 pll_clk0 = ~pll_clk0;
  always #20000 pll_ssi_clk = ~pll_ssi_clk;
  bit pll_run = 1;
  always begin
    if (pll_run) begin
      #(6850 + ($urandom % 101) - 50);
      pll_clk1_ph[0] = ~pll_clk1_ph[0];
      fork
        begin
          automatic logic v = pll_clk1_ph[0];
          #3425 pll_clk1_ph[1] = v; #3425 pll_clk1_ph[2] = v; #3425 pll_clk1_ph[3] = v;
        end
      join_none
    end else #1000;
  end
  always #5000 dc_clk = ~dc_clk;
  always #10000 puf_clk = ~puf_clk;
  always #5000 st_clk = ~st_clk;

  // ---------------- HECTOR ASIC host ----------------
  int asic_tedges = 0, asic_nnext = 0;
  always @(posedge asic_clk) if (asic_resetb && asic_next_config) asic_nnext++;
  always @(posedge asic_test_lvds) asic_tedges++;

  function automatic int hp(int i, int seed);  return 400 + ((i * 37 + seed * 11) % 64) * 2; endfunction
  function automatic int nosc(int i, int seed); return 300 + ((i * 53 + seed * 7) % 256); endfunction

  task automatic asic_send(input logic [3:0] id, input logic [CMD_W-5:0] f);
    logic [CMD_W-1:0] c;
    c = {id, f};
    for (int b = CMD_W - 1; b >= 0; b--) begin @(negedge asic_clk); asic_config_serial = c[b]; end
    @(negedge asic_clk); asic_config_ready = 1;
    @(negedge asic_clk); asic_config_ready = 0;
  endtask

  task automatic asic_wait(output time t);
    int n = 0;
    @(posedge asic_clk);
    while (!asic_data_rdy && n < 200000) begin @(posedge asic_clk); n++; end
    t = $time;
    #1;
  endtask

  task automatic run_asic();
    pll_cfg_t pc; elo_cfg_t ec; puf_cfg_t fc; test_cfg_t tc;
    time t0, t1;
    int hd;
    repeat (3) @(posedge asic_clk);
    asic_resetb = 1;
    pc = '0; pc.km1 = 8'd10; pc.kd1 = 8'd3; pc.km2 = 8'd7; pc.kd2 = 8'd3; pc.kd = 12'd200;
    asic_send(BLK_PLL_TRNG, pc);
    repeat (2) @(negedge asic_clk);
    check(asic_pll_km1 == 8'd10 && asic_pll_kd2 == 8'd3, "ASIC PLL parameters on the pins");
    asic_wait(t0);
    for (int i = 0; i < 4; i++) begin
      asic_wait(t1);
      check(asic_data < 32'd200, "ASIC PLL count below KD");
      check(int'(t1 - t0) >= 580000 && int'(t1 - t0) <= 620000, "ASIC PLL word rate");
      t0 = t1;
      n_pll++;
    end
    ec = '0; ec.ro_sel = 4'd7; ec.k = 32'd100;
    asic_send(BLK_ELO_TRNG, ec);
    asic_wait(t0);
    for (int i = 0; i < 3; i++) begin
      asic_wait(t1);
      check(int'(t1 - t0) >= 3200 * 1092 - 40000 && int'(t1 - t0) <= 3200 * 1100 + 40000, "ASIC ELO word rate");
      t0 = t1;
      n_elo++;
    end
    for (int i = 0; i < 3; i++) begin
      fc = '0; fc.sel1 = 7'($urandom); fc.sel2 = 7'($urandom); fc.t_act = 16'd50;
      asic_nnext = 0;
      asic_send(BLK_TERO_PUF, fc);
      asic_wait(t1);
      check(int'(asic_data[31:16]) >= nosc(fc.sel1, 1) && int'(asic_data[31:16]) <= nosc(fc.sel1, 1) + 4, "ASIC TERO A count");
      check(int'(asic_data[15:0]) >= nosc(fc.sel2, 2) && int'(asic_data[15:0]) <= nosc(fc.sel2, 2) + 4, "ASIC TERO B count");
      @(posedge asic_clk); #1;
      check(asic_nnext == 1, "ASIC next_config");
      n_next += asic_nnext;
      n_tero++;
    end
    for (int i = 0; i < 8 && !(n_ro1 > 1 && n_ro0 > 1); i++) begin
      do begin
        fc = '0; fc.sel1 = 7'($urandom); fc.sel2 = 7'($urandom);
        hd = hp(fc.sel1, 3) - hp(fc.sel2, 4);
      end while (hd >= -3 && hd <= 3);
      fc.arb_cfg = 3'd7;
      asic_send(BLK_RO_PUF, fc);
      asic_wait(t1);
      check(asic_data[0] == (hd < 0), "ASIC RO PUF arbiter picks the faster cell");
      if (asic_data[0]) n_ro1++; else n_ro0++;
    end
    for (int i = 0; i < 2; i++) begin
      int c, exp_n;
      c = $urandom % 128;
      exp_n = 100 + ((c / 8) * 53 + 35) % 800;
      tc = '0; tc.sel = 7'(c);
      asic_send(BLK_TERO_TEST, tc);
      asic_tedges = 0;
      @(negedge asic_clk); asic_test_ctrl = 1;
      #((exp_n + 10) * 1060);
      @(negedge asic_clk); asic_test_ctrl = 0;
      check(asic_tedges >= exp_n && asic_tedges <= exp_n + 3, "ASIC TERO test cell on LVDS");
      n_test++;
    end
  endtask

  // ---------------- FPGA PLL TRNG host ----------------
  bit pll_xs[$];
  always @(posedge pll_clk0) #1 pll_xs.push_back(dut.u_pll.u_core.xor_out);

  task automatic pll_ssi(input logic [63:0] c, output logic [63:0] st);
    @(negedge pll_ssi_clk); pll_ssi_rx = 1;
    for (int b = 63; b >= 0; b--) begin @(negedge pll_ssi_clk); pll_ssi_rx = c[b]; st[b] = pll_ssi_tx; end
    @(negedge pll_ssi_clk); pll_ssi_rx = 0;
    repeat (4) @(negedge pll_ssi_clk);
    n_fssi++;
  endtask

  task automatic run_fpga_pll();
    logic [63:0] st;
    time t_first;
    int edges;
    repeat (3) @(posedge pll_clk0);
    pll_n_reset = 1;
    pll_ssi({43'b0, 1'b0, 4'h3, 16'd8}, st);
    check(st[63:48] == 16'd16, "FPGA PLL status reports reset KD");
    edges = 0;
    t_first = 0;
    repeat (256 * 8 * 3) begin
      logic prev;
      prev = pll_data_out;
      @(posedge pll_clk0); #2;
      if (pll_data_out != prev) begin
        if (t_first == 0) t_first = $time;
        edges++;
      end
    end
    check(edges > 20, "FPGA PLL raw bits change");
    check(!pll_alarm, "FPGA PLL no alarm while PLL1 runs");
    n_fraw = edges;
    pll_ssi({43'b0, 1'b0, 4'h3, 16'd8}, st);
    check(st[63:48] == 16'd8 && st[1:0] == 2'b00, "FPGA PLL status reports KD, no failure");
    pll_mux_sel = 1;
    repeat (6) begin
      logic [7:0] r;
      bit found;
      @(posedge pll_clk0); #2;
      while (pll_data_out != 1'b0) begin @(posedge pll_clk0); #2; end
      for (int i = 0; i < 8; i++) begin @(posedge pll_clk0); #2; r[i] = pll_data_out; end
      @(posedge pll_clk0); #2;
      check(pll_data_out == 1'b1, "FPGA PLL stop bit");
      found = 0;
      for (int s = pll_xs.size() - 40; s < int'(pll_xs.size()) - 8; s++) begin
        bit ok;
        ok = 1;
        for (int i = 0; i < 8; i++) if (pll_xs[s + i] != r[i]) ok = 0;
        if (ok) found = 1;
      end
      check(found, "FPGA PLL byte holds 8 consecutive XOR samples");
      n_fbyte++;
    end
    pll_mux_sel = 0;
    pll_run = 0; pll_clk1_ph = 4'b0000;
    repeat (256 * 8 * 3) @(posedge pll_clk0);
    check(pll_alarm, "FPGA PLL total failure alarm pin");
    if (pll_alarm) n_falarm++;
    pll_ssi({43'b0, 1'b1, 4'h3, 16'd8}, st);
    check(st[1:0] == 2'b11, "FPGA PLL status failure flags");
    repeat (4) @(posedge pll_clk0);
    #1 check(!pll_alarm, "FPGA PLL alarm cleared");
  endtask

  // ---------------- DC TRNG host ----------------
  task automatic dc_period(input int cyc);
    time t0, t1;
    @(posedge dc_clk_out); t0 = $time;
    @(posedge dc_clk_out); t1 = $time;
    check(t1 - t0 == time'(cyc) * 10000, "DC clk_out period");
  endtask

  task automatic run_dc();
    int nb, n1;
    repeat (3) @(posedge dc_clk);
    dc_rst_n = 1;
    dc_period(8);
    nb = 0; n1 = 0;
    repeat (1024 * 2 + 64) begin
      @(posedge dc_clk_out); #1;
      nb++; n1 += dc_data_out;
    end
    check(n1 > nb / 4 && n1 < 3 * nb / 4, "DC raw bits balanced");
    check(!dc_tf_alarm && !dc_ol_alarm, "DC no alarm while the RO runs");
    n_dcraw = nb;
    dc_mux_sel = 1;
    repeat (100) @(posedge dc_clk);
    dc_period(32);
    repeat (16) begin @(posedge dc_clk_out); n_dcpf++; end
    dc_ro_run = 0;
    repeat (1024 * 8 * 2 + 20) @(posedge dc_clk);
    check(dc_tf_alarm && dc_ol_alarm, "DC alarms when the RO stops");
    if (dc_tf_alarm) n_dcalarm++;
  endtask

  // ---------------- FPGA TERO PUF host ----------------
  task automatic puf_send(input logic [63:0] w);
    @(negedge puf_clk); puf_ssi_rx = 1;
    for (int b = 63; b >= 0; b--) begin @(negedge puf_clk); puf_ssi_rx = w[b]; end
    @(negedge puf_clk); puf_ssi_rx = 0;
  endtask

  task automatic puf_recv(output logic [63:0] w);
    int t = 0;
    @(posedge puf_clk); #1;
    while (puf_ssi_tx != 1'b1 && t < 100000) begin @(posedge puf_clk); #1; t++; end
    for (int b = 63; b >= 0; b--) begin @(posedge puf_clk); #1; w[b] = puf_ssi_tx; end
  endtask

  task automatic run_puf();
    logic [63:0] st, w0, w1;
    logic [127:0] resp;
    repeat (3) @(posedge puf_clk);
    puf_n_reset = 1;
    puf_send({8'h00, 51'b0, 5'd2});
    puf_send('0); puf_send('0);
    puf_recv(st);
    check(st[1:0] == 2'b01, "PUF status: done, not busy");
    puf_recv(w0);
    puf_recv(w1);
    resp = {w1, w0};
    for (int i = 0; i < 64; i++) begin
      int a, b;
      a = nosc(i, 11);
      b = nosc(i, 12);
      if (a - b > 3 || b - a > 3) check(resp[2*(63-i) + 1] == (a > b), "PUF A > B bit of a pair");
    end
    n_puf++;
  endtask

  // ---------------- TERO TRNG chip host ----------------
  task automatic st_spi(input bit w, input logic [6:0] a, input logic [15:0] d, output logic [15:0] q);
    logic [23:0] f;
    f = {w, a, d};
    q = '0;
    st_spi_ss_n = 1'b0;
    #200000;
    for (int i = 23; i >= 0; i--) begin
      st_spi_mosi = f[i];
      #100000;
      st_spi_clk = 1'b1;
      if (i < 16) q = {q[14:0], st_spi_miso};
      #100000;
      st_spi_clk = 1'b0;
    end
    #200000;
    st_spi_ss_n = 1'b1;
    #200000;
  endtask

  task automatic run_st();
    logic [15:0] q, sr, cn;
    int tries, base;
    #1 st_nrst = 1'b0;   // power-on reset pulse
    #100000 st_nrst = 1'b1;
    #100000;
    for (int x = 0; x < 6; x += 5) begin
      for (int r = 0; r < 3; r++) begin
        base = 100 + 50 * x + 40 * r;
        st_spi(1'b1, 7'(4 * x), 16'({4'(r), 2'b11}), q);
        tries = 0;
        do begin st_spi(1'b0, 7'(4 * x + 1), 16'h0, sr); tries++; end
        while (sr[1:0] == 2'b00 && tries < 50);
        check(sr[1:0] == 2'b01 || sr[1:0] == 2'b10, "ST exactly one stop state");
        st_spi(1'b0, 7'(4 * x + 2), 16'h0, cn);
        check(int'(cn) >= base && int'(cn) <= base + 63, "ST counter stop value in range");
        check(sr[2] == ^cn, "ST random bit is counter parity");
        st_spi(1'b1, 7'(4 * x), 16'({4'(r), 2'b01}), q);
        n_st++;
      end
    end
  endtask

  initial begin
    fork
      run_asic();
      run_fpga_pll();
      run_dc();
      run_puf();
      run_st();
    join
    check(n_pll > 0, "ASIC PLL TRNG words seen");
    check(n_elo > 0, "ASIC ELO TRNG words seen");
    check(n_tero > 0 && n_next > 0, "ASIC TERO PUF challenges and next_config seen");
    check(n_ro1 > 0 && n_ro0 > 0, "ASIC RO PUF both outcomes seen");
    check(n_test > 0, "ASIC TERO test pulses seen");
    check(n_fssi > 0 && n_fraw > 0 && n_fbyte > 0 && n_falarm > 0, "FPGA PLL TRNG mechanisms seen");
    check(n_dcraw > 0 && n_dcpf > 0 && n_dcalarm > 0, "DC TRNG mechanisms seen");
    check(n_puf > 0, "FPGA TERO PUF response seen");
    check(n_st > 0, "TERO TRNG chip bits seen");
    $display("mechanisms: pll=%0d elo=%0d tero=%0d ro1=%0d ro0=%0d test=%0d next=%0d fssi=%0d fraw=%0d fbyte=%0d falarm=%0d dcraw=%0d dcpf=%0d dcalarm=%0d puf=%0d st=%0d",
             n_pll, n_elo, n_tero, n_ro1, n_ro0, n_test, n_next, n_fssi, n_fraw, n_fbyte, n_falarm,
             n_dcraw, n_dcpf, n_dcalarm, n_puf, n_st);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
