// st_tero_trng: the TERO TRNG test chip (ST ASIC #1): several variants of a
// TERO core, each with its own control, status and counter registers, all
// reached through one SPI slave.
//
// A TERO core oscillates for a random number of periods after it is
// started and then settles; the parity of that number is the random bit.
// Register map (7-bit SPI address): instance x has CRx at 4x, SRx at 4x+1
// and CNTRx at 4x+2 (see tero_trng_channel); other addresses read 0.
// Statistics and online tests on the count values are left to the host.
//
// The NT = 6 cores are modelled by tero_cell (behavioural) with different
// base oscillation counts, standing for the six structures of the chip.
// Pins: CLK, NRST, SPI_CLK, SPI_MOSI, SPI_MISO, SPI_SS_N.
module st_tero_trng #(
  parameter int unsigned NT = 6
) (
  input  logic clk,
  input  logic nrst,
  input  logic spi_clk,
  input  logic spi_mosi,
  input  logic spi_ss_n,
  output logic spi_miso
);

  logic [6:0]  addr;
  logic        wr;
  logic [15:0] wdata, rdata;
  logic [15:0] ch_rdata [NT];

  spi_slave u_spi (
    .clk, .rst_n(nrst), .spi_clk, .spi_mosi, .spi_ss_n, .spi_miso,
    .addr, .rdata, .wr, .wdata
  );

  for (genvar x = 0; x < NT; x++) begin : g_tero
    logic       en, st, tout;
    logic [3:0] adj;

    tero_trng_channel u_ch (
      .clk, .rst_n(nrst),
      .reg_sel(addr[1:0]), .wr(wr && addr[6:2] == 5'(x)), .wdata,
      .rdata(ch_rdata[x]),
      .tero_enable(en), .tero_start(st), .tero_adj_sel(adj), .tero_out(tout)
    );

    tero_cell #(.BASE(100 + 50 * x), .HP(400 + 40 * x)) u_core (
      .enable(en), .start(st), .adj, .out(tout)
    );
  end

  always_comb begin
    rdata = '0;
    for (int x = 0; x < int'(NT); x++)
      if (addr[6:2] == 5'(x)) rdata = ch_rdata[x];
  end

endmodule
