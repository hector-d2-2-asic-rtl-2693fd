// hector_asic: core of the HECTOR ASIC #2 test chip: PLL TRNG, ELO TRNG,
// TERO PUF, RO PUF and TERO test modules behind one shared command input
// and one shared 32-bit output bus.
//
// Commands of 88 bits are shifted in on `config_serial` and loaded with
// `config_ready` (asic_cmd_rx). The control logic (asic_ctrl) activates the
// block named by the command's top four bits, configures it and routes its
// results to `data`, flagged by `data_rdy`; `next_config` tells the host a
// PUF challenge is done. Only one block is active at a time.
//
// The PLL macros are analog and not part of this RTL: their configuration
// (KM1, KD1, KM2, KD2) leaves on `pll_km1`..`pll_kd2`, and their outputs
// come back on `pll1_clk` (sampling clock) and `pll2_clk` (sampled clock).
// Both PLL outputs are also forwarded to the two PLL LVDS output pairs. The
// ring oscillators and TERO cells are represented by the behavioural models
// ro_bank8 and osc_bank; in silicon they are hand-placed cells.
//
// Clock domains: `clk_asic` (command interface, control, PUF sequencing),
// `pll1_clk` (PLL TRNG) and the selected bank-1 ring oscillator (ELO TRNG);
// results cross into `clk_asic` through pulse_sync. Each TRNG is held in
// reset while it is not the active block, through a two-flip-flop reset
// synchroniser in its own domain.
//
// The pin list follows the chip pin-out (clk_asic, resetb_asic,
// config_serial, config_ready, data[31:0], data_rdy, next_config, PLL and
// test-module LVDS outputs, test modules ctrl); power pins are omitted.
module hector_asic
  import hector_pkg::*;
(
  input  logic              clk_asic,
  input  logic              resetb_asic,
  input  logic              config_serial,
  input  logic              config_ready,
  output logic [DATA_W-1:0] data,
  output logic              data_rdy,
  output logic              next_config,
  // PLL macros (outside this RTL)
  output logic [7:0]        pll_km1,
  output logic [7:0]        pll_kd1,
  output logic [7:0]        pll_km2,
  output logic [7:0]        pll_kd2,
  input  logic              pll1_clk,
  input  logic              pll2_clk,
  output logic              pll0_lvds,
  output logic              pll1_lvds,
  // TERO test modules
  input  logic              test_ctrl,
  output logic              test_lvds
);

  logic [CMD_W-1:0] cmd;
  logic             cmd_valid;

  pll_cfg_t  pll_cfg;
  elo_cfg_t  elo_cfg;
  puf_cfg_t  puf_cfg;
  test_cfg_t test_cfg;

  logic        pll_run, elo_ena, test_active;
  logic [11:0] pll_data;
  logic        pll_strobe, pll_pulse;
  logic        elo_bit, elo_strobe, elo_pulse;
  logic        ro_tero, rst_comp, tero_ctrl, ro_ena;
  logic [15:0] cnt1, cnt2;
  logic        arb_out, arb_strobe, arb_stop;

  asic_cmd_rx u_cmd_rx (
    .clk(clk_asic), .rst_n(resetb_asic),
    .config_serial, .config_rdy(config_ready),
    .cmd, .cmd_valid
  );

  asic_ctrl u_ctrl (
    .clk(clk_asic), .rst_n(resetb_asic),
    .cmd, .cmd_valid,
    .pll_cfg, .pll_run, .pll_data, .pll_pulse,
    .elo_cfg, .elo_ena, .elo_bit, .elo_pulse,
    .puf_cfg, .ro_tero, .rst_comp, .tero_ctrl, .ro_ena,
    .cnt1, .cnt2, .arb_out, .arb_strobe,
    .test_cfg, .test_active,
    .data_out(data), .data_rdy, .next_config
  );

  // ---------------- PLL TRNG ----------------
  assign pll_km1   = pll_cfg.km1;
  assign pll_kd1   = pll_cfg.kd1;
  assign pll_km2   = pll_cfg.km2;
  assign pll_kd2   = pll_cfg.kd2;
  assign pll0_lvds = pll1_clk;
  assign pll1_lvds = pll2_clk;

  logic [1:0] pll_rst_sync;
  always_ff @(posedge pll1_clk or negedge resetb_asic) begin
    if (!resetb_asic) pll_rst_sync <= '0;
    else              pll_rst_sync <= {pll_rst_sync[0], pll_run};
  end

  pll_trng_asic u_pll_trng (
    .clk(pll1_clk), .rst_n(pll_rst_sync[1]), .jit_clk(pll2_clk),
    .kd(pll_cfg.kd), .data(pll_data), .strobe(pll_strobe)
  );

  pulse_sync u_pll_sync (
    .src_clk(pll1_clk), .src_rst_n(pll_rst_sync[1]), .src_pulse(pll_strobe),
    .dst_clk(clk_asic), .dst_rst_n(resetb_asic), .dst_pulse(pll_pulse)
  );

  // ---------------- ELO TRNG ----------------
  logic ro_noise, ro_samp;

  ro_bank8 u_elo_bank0 (.ena(elo_ena), .sel(elo_cfg.ro_sel[2:0]), .out(ro_noise));
  ro_bank8 u_elo_bank1 (.ena(elo_ena), .sel(elo_cfg.ro_sel[2:0]), .out(ro_samp));

  logic [1:0] elo_rst_sync;
  always_ff @(posedge ro_samp or negedge resetb_asic) begin
    if (!resetb_asic) elo_rst_sync <= '0;
    else              elo_rst_sync <= {elo_rst_sync[0], elo_ena};
  end

  elo_sampler u_elo (
    .ro_clk(ro_samp), .rst_n(elo_rst_sync[1]), .ro_noise,
    .k(elo_cfg.k), .strobe(elo_strobe), .bit_out(elo_bit)
  );

  pulse_sync u_elo_sync (
    .src_clk(ro_samp), .src_rst_n(elo_rst_sync[1]), .src_pulse(elo_strobe),
    .dst_clk(clk_asic), .dst_rst_n(resetb_asic), .dst_pulse(elo_pulse)
  );

  // ---------------- TERO and RO PUF ----------------
  logic tero_a, tero_b, ro_a, ro_b, ro_trig;
  assign ro_trig = ro_ena && !arb_stop;

  osc_bank #(.N(128), .MODE(1'b1), .SEED(1)) u_tero_a (.trig(tero_ctrl), .sel(puf_cfg.sel1), .out(tero_a));
  osc_bank #(.N(128), .MODE(1'b1), .SEED(2)) u_tero_b (.trig(tero_ctrl), .sel(puf_cfg.sel2), .out(tero_b));
  osc_bank #(.N(128), .MODE(1'b0), .SEED(3)) u_ro_a   (.trig(ro_trig),   .sel(puf_cfg.sel1), .out(ro_a));
  osc_bank #(.N(128), .MODE(1'b0), .SEED(4)) u_ro_b   (.trig(ro_trig),   .sel(puf_cfg.sel2), .out(ro_b));

  puf_count_arbiter u_puf (
    .clk(clk_asic), .rst_comp, .ro_tero,
    .tero_a, .tero_b, .ro_a, .ro_b,
    .arb_cfg(puf_cfg.arb_cfg),
    .cnt1, .cnt2, .arb_out, .arb_strobe, .stop(arb_stop)
  );

  // ---------------- TERO test modules ----------------
  tero_test_modules u_test (
    .ctrl(test_ctrl && test_active), .sel(test_cfg.sel), .lvds_out(test_lvds)
  );

endmodule
