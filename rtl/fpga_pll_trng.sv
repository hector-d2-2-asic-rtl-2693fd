// fpga_pll_trng: the PLL TRNG of the FPGA daughter board with its data and
// control interfaces.
//
// Entropy comes from the jitter of a PLL-generated clock: PLL1 outputs up
// to four phases of a jittery clock, which are sampled on the reference
// clock from PLL0 (both PLLs are FPGA primitives outside this RTL, so their
// outputs arrive on `clk0` and `clk1_ph`). pll_trng_core samples, XORs,
// decimates, tests and buffers. The fast data interface sends on
// `data_out`:
//   mux_sel = 0  the decimated raw random bits after the 256-bit buffer,
//                one per T_Q = KD periods of clk0 (held between updates);
//   mux_sel = 1  the XOR output for jitter characterisation, packed into
//                bytes of 8 consecutive samples and sent with start and stop
//                bits by p2s_conv (a byte is taken whenever the converter is
//                free, so bytes are not contiguous).
// `data_clk` is the reference clock the interface is synchronous to,
// `alarm` the total-failure alarm.
//
// Serial control interface (ssi_slave, 64-bit words, own clock `ssi_clk`):
//   control word [15:0] KD, [19:16] phase enables, [20] clear alarms;
//   status word  [0] total failure, [1] online test failure,
//                [47:16] ones of the last test window, [63:48] KD in use.
// Control is taken into the clk0 domain through a two-flip-flop
// synchroniser of ctrl_valid; the status bits are quasi-static.
// After reset KD = 16 and all four phases are enabled.
//
// From the description: the structure of the core, the mux_sel choice
// between XOR output and decimator output, the alarm output, the 64-bit
// control/status words with the test flags and the jitter data in the
// status. Own choices: the word layouts, reset values, the byte packing of
// the XOR stream.
module fpga_pll_trng #(
  parameter int unsigned NPH = 4
) (
  input  logic           clk0,      // PLL0 reference clock
  input  logic [NPH-1:0] clk1_ph,   // PLL1 phases
  input  logic           n_reset,
  input  logic           mux_sel,
  output logic           data_out,
  output logic           data_clk,
  output logic           alarm,
  input  logic           ssi_clk,
  input  logic           ssi_rx,
  output logic           ssi_tx
);

  logic [63:0] ctrl_w, status_w;
  logic        ctrl_valid;
  logic [15:0] kd;
  logic [NPH-1:0] ph_en;
  logic        clear;
  logic        xor_out, dec_bit, dec_valid, buf_bit, buf_valid, tf_alarm, ol_alarm;
  logic [31:0] ones;

  ssi_slave #(.W(64)) u_ssi (
    .sclk(ssi_clk), .rst_n(n_reset), .rx(ssi_rx), .tx(ssi_tx),
    .status(status_w), .ctrl(ctrl_w), .ctrl_valid
  );

  // Bring a new control word into the clk0 domain.
  logic       v_tgl;
  logic [2:0] v_sync;
  always_ff @(posedge ssi_clk or negedge n_reset) begin
    if (!n_reset)        v_tgl <= 1'b0;
    else if (ctrl_valid) v_tgl <= ~v_tgl;
  end

  always_ff @(posedge clk0 or negedge n_reset) begin
    if (!n_reset) begin
      v_sync <= '0;
      kd     <= 16'd16;
      ph_en  <= '1;
      clear  <= 1'b0;
    end else begin
      v_sync <= {v_sync[1:0], v_tgl};
      clear  <= 1'b0;
      if (v_sync[2] ^ v_sync[1]) begin
        kd    <= (ctrl_w[15:0] == '0) ? 16'd1 : ctrl_w[15:0];
        ph_en <= ctrl_w[16 +: NPH];
        clear <= ctrl_w[20];
      end
    end
  end

  pll_trng_core #(.NPH(NPH), .KD_W(16), .BUF_N(256)) u_core (
    .clk0, .rst_n(n_reset), .ph(clk1_ph), .ph_en, .kd, .clear,
    .xor_out, .dec_bit, .dec_valid, .buf_bit, .buf_valid,
    .tf_alarm, .ol_alarm, .ones
  );

  assign status_w = {kd, ones, 14'b0, ol_alarm, tf_alarm};

  // Raw random bit, held between buffer outputs.
  logic raw_q;
  always_ff @(posedge clk0 or negedge n_reset) begin
    if (!n_reset)       raw_q <= 1'b0;
    else if (buf_valid) raw_q <= buf_bit;
  end

  // Jitter characterisation: bytes of 8 consecutive XOR samples.
  logic [7:0] byte_sh;
  logic [2:0] nbit;
  logic       byte_full, p2s_ready, p2s_load, p2s_out;

  always_ff @(posedge clk0 or negedge n_reset) begin
    if (!n_reset) begin
      byte_sh   <= '0;
      nbit      <= '0;
      byte_full <= 1'b0;
    end else if (!byte_full || p2s_load) begin
      byte_sh   <= {xor_out, byte_sh[7:1]};
      nbit      <= nbit + 3'd1;
      byte_full <= (nbit == 3'd7);
    end
  end

  assign p2s_load = byte_full && p2s_ready;

  p2s_conv u_p2s (
    .clk(clk0), .rst_n(n_reset), .din(byte_sh), .load(p2s_load),
    .ready(p2s_ready), .sout(p2s_out)
  );

  assign data_out = mux_sel ? p2s_out : raw_q;
  assign data_clk = clk0;
  assign alarm    = tf_alarm;

endmodule
