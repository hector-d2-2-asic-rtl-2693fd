// hector_top: the TRNG and PUF designs side by side. They are independent
// test designs for different targets and share no logic; each keeps its
// own clocks, reset and pins:
//   asic_*  HECTOR ASIC #2 core (PLL TRNG, ELO TRNG, TERO PUF, RO PUF and
//           TERO test modules behind one command interface); the PLLs are
//           outside, their settings and outputs are ports;
//   pll_*   FPGA PLL TRNG with its fast data and serial control interfaces;
//           PLL0 and PLL1 outputs are ports;
//   dc_*    FPGA delay-chain TRNG;
//   puf_*   FPGA TERO PUF with its serial interface;
//   st_*    TERO TRNG test chip with its SPI register interface.
module hector_top (
  // HECTOR ASIC
  input  logic        asic_clk,
  input  logic        asic_resetb,
  input  logic        asic_config_serial,
  input  logic        asic_config_ready,
  output logic [31:0] asic_data,
  output logic        asic_data_rdy,
  output logic        asic_next_config,
  output logic [7:0]  asic_pll_km1,
  output logic [7:0]  asic_pll_kd1,
  output logic [7:0]  asic_pll_km2,
  output logic [7:0]  asic_pll_kd2,
  input  logic        asic_pll1_clk,
  input  logic        asic_pll2_clk,
  output logic        asic_pll0_lvds,
  output logic        asic_pll1_lvds,
  input  logic        asic_test_ctrl,
  output logic        asic_test_lvds,
  // FPGA PLL TRNG
  input  logic        pll_clk0,
  input  logic [3:0]  pll_clk1_ph,
  input  logic        pll_n_reset,
  input  logic        pll_mux_sel,
  output logic        pll_data_out,
  output logic        pll_data_clk,
  output logic        pll_alarm,
  input  logic        pll_ssi_clk,
  input  logic        pll_ssi_rx,
  output logic        pll_ssi_tx,
  // FPGA DC TRNG
  input  logic        dc_clk,
  input  logic        dc_rst_n,
  input  logic        dc_ro_run,
  input  logic        dc_mux_sel,
  output logic        dc_data_out,
  output logic        dc_clk_out,
  output logic        dc_tf_alarm,
  output logic        dc_ol_alarm,
  // FPGA TERO PUF
  input  logic        puf_clk,
  input  logic        puf_n_reset,
  input  logic        puf_ssi_rx,
  output logic        puf_ssi_tx,
  // ST TERO TRNG
  input  logic        st_clk,
  input  logic        st_nrst,
  input  logic        st_spi_clk,
  input  logic        st_spi_mosi,
  input  logic        st_spi_ss_n,
  output logic        st_spi_miso
);

  hector_asic u_asic (
    .clk_asic(asic_clk), .resetb_asic(asic_resetb),
    .config_serial(asic_config_serial), .config_ready(asic_config_ready),
    .data(asic_data), .data_rdy(asic_data_rdy), .next_config(asic_next_config),
    .pll_km1(asic_pll_km1), .pll_kd1(asic_pll_kd1), .pll_km2(asic_pll_km2), .pll_kd2(asic_pll_kd2),
    .pll1_clk(asic_pll1_clk), .pll2_clk(asic_pll2_clk),
    .pll0_lvds(asic_pll0_lvds), .pll1_lvds(asic_pll1_lvds),
    .test_ctrl(asic_test_ctrl), .test_lvds(asic_test_lvds)
  );

  fpga_pll_trng u_pll (
    .clk0(pll_clk0), .clk1_ph(pll_clk1_ph), .n_reset(pll_n_reset), .mux_sel(pll_mux_sel),
    .data_out(pll_data_out), .data_clk(pll_data_clk), .alarm(pll_alarm),
    .ssi_clk(pll_ssi_clk), .ssi_rx(pll_ssi_rx), .ssi_tx(pll_ssi_tx)
  );

  dc_trng u_dc (
    .clk(dc_clk), .rst_n(dc_rst_n), .ro_run(dc_ro_run), .mux_sel(dc_mux_sel),
    .data_out(dc_data_out), .clk_out(dc_clk_out), .tf_alarm(dc_tf_alarm), .ol_alarm(dc_ol_alarm)
  );

  tero_puf_fpga u_puf (
    .clk(puf_clk), .n_reset(puf_n_reset), .ssi_rx(puf_ssi_rx), .ssi_tx(puf_ssi_tx)
  );

  st_tero_trng u_st (
    .clk(st_clk), .nrst(st_nrst), .spi_clk(st_spi_clk), .spi_mosi(st_spi_mosi),
    .spi_ss_n(st_spi_ss_n), .spi_miso(st_spi_miso)
  );

endmodule
