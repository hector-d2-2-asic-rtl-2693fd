// spi_slave: SPI slave (mode 0: SCK idles low, data sampled on the rising
// edge and changed on the falling edge) giving register access inside the
// chip. SPI_CLK, SPI_MOSI and SPI_SS_N are synchronised into the system
// clock `clk` by two flip-flops each and their edges detected there, so
// `clk` must run at least 8 times faster than SPI_CLK.
//
// Frame, while SS_N is low, MSB first: an 8-bit command {write, addr[6:0]}
// and 16 data bits. For a read (write = 0) the register `rdata` at `addr`
// (valid one clk cycle after `addr` appears) is shifted out on MISO during
// the 16 data bits. For a write, `wr` pulses for one clk cycle after the
// 24th bit with `addr` and `wdata`. A frame cut short by SS_N rising is
// discarded. MISO is driven 0 outside the data phase of a read.
//
// From the description: a standard SPI with SPI_CLK, SPI_MOSI, SPI_MISO
// and SPI_SS_N. Own choices: mode 0, the frame format, oversampling.
module spi_slave (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        spi_clk,
  input  logic        spi_mosi,
  input  logic        spi_ss_n,
  output logic        spi_miso,
  output logic [6:0]  addr,
  input  logic [15:0] rdata,
  output logic        wr,
  output logic [15:0] wdata
);

  logic [2:0] sck_s, ss_s;
  logic [1:0] mosi_s;
  logic       rise, fall, active;
  logic [4:0] nbit;
  logic [15:0] rx_sh, tx_sh;
  logic       is_write;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sck_s  <= '0;
      ss_s   <= '1;
      mosi_s <= '0;
    end else begin
      sck_s  <= {sck_s[1:0], spi_clk};
      ss_s   <= {ss_s[1:0], spi_ss_n};
      mosi_s <= {mosi_s[0], spi_mosi};
    end
  end

  assign active = !ss_s[1];
  assign rise   = active && sck_s[1] && !sck_s[2];
  assign fall   = active && !sck_s[1] && sck_s[2];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      nbit     <= '0;
      rx_sh    <= '0;
      tx_sh    <= '0;
      addr     <= '0;
      is_write <= 1'b0;
      wr       <= 1'b0;
      wdata    <= '0;
      spi_miso <= 1'b0;
    end else begin
      wr <= 1'b0;
      if (!active) begin
        nbit     <= '0;
        spi_miso <= 1'b0;
      end else begin
        if (rise) begin
          rx_sh <= {rx_sh[14:0], mosi_s[1]};
          nbit  <= nbit + 5'd1;
          if (nbit == 5'd7) begin
            is_write <= rx_sh[6];
            addr     <= {rx_sh[5:0], mosi_s[1]};
          end
          if (nbit == 5'd23 && is_write) begin
            wdata <= {rx_sh[14:0], mosi_s[1]};
            wr    <= 1'b1;
          end
        end
        if (fall) begin
          if (nbit == 5'd8) begin
            tx_sh    <= {rdata[14:0], 1'b0};
            spi_miso <= !is_write && rdata[15];
          end else if (nbit > 5'd8 && nbit < 5'd24) begin
            tx_sh    <= {tx_sh[14:0], 1'b0};
            spi_miso <= !is_write && tx_sh[15];
          end else begin
            spi_miso <= 1'b0;
          end
        end
      end
    end
  end

endmodule
