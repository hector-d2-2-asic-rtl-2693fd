// tb_asic_ctrl: drives the control logic with commands for every block and
// plays the part of the blocks. Checks: configuration fields reach the
// right block; PLL words are forwarded; 32 ELO bits are packed into one
// word MSB first; the TERO PUF sequence (rst_comp 2 cycles, tero_ctrl for
// exactly t_act cycles, then {cnt1,cnt2} with next_config); the RO PUF
// sequence (ro_ena until the arbiter strobe, then the arbiter bit with
// next_config); the TERO test select; only one block active at a time.
module tb_asic_ctrl;
  import hector_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [CMD_W-1:0] cmd = '0;
  logic cmd_valid = 0;
  pll_cfg_t pll_cfg; elo_cfg_t elo_cfg; puf_cfg_t puf_cfg; test_cfg_t test_cfg;
  logic pll_run, elo_ena, test_active, ro_tero, rst_comp, tero_ctrl, ro_ena;
  logic [11:0] pll_data = '0;
  logic pll_pulse = 0, elo_bit = 0, elo_pulse = 0, arb_out = 0, arb_strobe = 0;
  logic [15:0] cnt1 = '0, cnt2 = '0;
  logic [31:0] data_out;
  logic data_rdy, next_config;
  int checks = 0, failures = 0, ctrl_cycles = 0, rst_cycles = 0, nrdy = 0, nnext = 0;

  asic_ctrl dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) begin
    if (rst_n && tero_ctrl) ctrl_cycles++;
    if (rst_n && rst_comp) rst_cycles++;
    if (rst_n && data_rdy) nrdy++;
    if (rst_n && next_config) nnext++;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic send(input logic [3:0] id, input logic [CMD_W-5:0] f);
    @(negedge clk); cmd = {id, f}; cmd_valid = 1;
    @(negedge clk); cmd_valid = 0;
  endtask

  task automatic wait_rdy();
    int t = 0;
    while (!data_rdy && t < 1000) begin @(posedge clk); t++; end
    #1;
  endtask

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    pll_cfg_t pc; elo_cfg_t ec; puf_cfg_t fc; test_cfg_t tc;
    logic [31:0] word;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // PLL TRNG
    pc = '0; pc.km1 = 8'h12; pc.kd1 = 8'h34; pc.km2 = 8'h56; pc.kd2 = 8'h78; pc.kd = 12'h9ab;
    send(BLK_PLL_TRNG, pc);
    check(pll_cfg == pc && pll_run && !elo_ena && !test_active, "PLL configuration");
    for (int i = 0; i < 5; i++) begin
      @(negedge clk); pll_data = 12'($urandom); pll_pulse = 1;
      @(negedge clk); pll_pulse = 0;
      wait_rdy();
      check(data_out == {20'b0, pll_data}, "PLL word");
      repeat (3) @(negedge clk);
    end
    // ELO TRNG
    ec = '0; ec.ro_sel = 4'd5; ec.k = 32'hdead_beef;
    send(BLK_ELO_TRNG, ec);
    check(elo_cfg == ec && elo_ena && !pll_run, "ELO configuration");
    word = $urandom;
    for (int i = 31; i >= 0; i--) begin
      @(negedge clk); elo_bit = word[i]; elo_pulse = 1;
      @(negedge clk); elo_pulse = 0;
    end
    @(posedge clk); #1;
    check(data_out == word && nrdy == 6, "ELO word packing");
    // TERO PUF
    fc = '0; fc.sel1 = 7'd17; fc.sel2 = 7'd99; fc.arb_cfg = 3'd4; fc.t_act = 16'd37;
    ctrl_cycles = 0; rst_cycles = 0; nnext = 0;
    send(BLK_TERO_PUF, fc);
    check(puf_cfg == fc && !ro_tero, "TERO PUF configuration");
    cnt1 = 16'd1234; cnt2 = 16'd1201;
    wait_rdy();
    check(data_out == {16'd1234, 16'd1201}, "TERO PUF counters");
    check(ctrl_cycles == 37, "TERO activation time");
    check(rst_cycles == 2, "rst_comp length");
    @(posedge clk); #1;
    check(nnext == 1, "next_config after TERO challenge");
    // RO PUF
    fc.arb_cfg = 3'd2;
    rst_cycles = 0; nnext = 0;
    send(BLK_RO_PUF, fc);
    check(ro_tero, "RO selected");
    repeat (4) @(negedge clk);
    check(ro_ena && !tero_ctrl, "RO enabled until the arbiter decides");
    repeat (20) @(negedge clk);
    arb_out = 1; arb_strobe = 1;
    @(negedge clk); arb_strobe = 0;
    check(!ro_ena, "RO disabled after the arbiter strobe");
    wait_rdy();
    check(data_out == 32'd1, "RO PUF bit");
    @(posedge clk); #1;
    check(nnext == 1 && rst_cycles == 2, "next_config after RO challenge");
    // TERO test modules
    tc = '0; tc.sel = 7'd77;
    send(BLK_TERO_TEST, tc);
    check(test_cfg == tc && test_active && !ro_tero && !pll_run, "TERO test select");
    send(BLK_NONE, '0);
    check(!test_active && !pll_run && !elo_ena, "idle");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
