// ssi_slave: synchronous serial control interface of the FPGA daughter
// boards: a W-bit serial-to-parallel converter for the control word and a
// W-bit parallel-to-serial converter for the status word, full duplex.
//
// The line `rx` idles at 0. A 1 seen on a rising edge of `sclk` while idle
// is a start bit: at that edge `status` is captured, and on the next W
// rising edges W control bits are shifted in from `rx`, MSB first, while
// the captured status is shifted out on `tx`, MSB first; `tx` changes just
// after a rising edge, so the host samples it on the falling edge. After
// the last bit `ctrl` takes the received word and `ctrl_valid` pulses for
// one `sclk` cycle. `tx` is 0 between frames. The host can read the status
// at any time by sending a frame; to read without changing the control it
// sends the current control word back.
//
// From the description: 64-bit words in both directions, the three signals
// SSI_clk, SSI_rx, SSI_tx. Own choices: the start bit, MSB-first order and
// the idle levels.
module ssi_slave #(
  parameter int unsigned W = 64
) (
  input  logic         sclk,
  input  logic         rst_n,
  input  logic         rx,
  output logic         tx,
  input  logic [W-1:0] status,
  output logic [W-1:0] ctrl,
  output logic         ctrl_valid
);

  logic [W-1:0] rx_sh, tx_sh;
  logic [$clog2(W+1)-1:0] cnt;   // bits still to receive, 0 = idle

  assign tx = (cnt != '0) ? tx_sh[W-1] : 1'b0;

  always_ff @(posedge sclk or negedge rst_n) begin
    if (!rst_n) begin
      rx_sh      <= '0;
      tx_sh      <= '0;
      cnt        <= '0;
      ctrl       <= '0;
      ctrl_valid <= 1'b0;
    end else begin
      ctrl_valid <= 1'b0;
      if (cnt == '0) begin
        if (rx) begin
          cnt   <= ($clog2(W+1))'(W);
          tx_sh <= status;
        end
      end else begin
        rx_sh <= {rx_sh[W-2:0], rx};
        tx_sh <= {tx_sh[W-2:0], 1'b0};
        cnt   <= cnt - 1'b1;
        if (cnt == ($clog2(W+1))'(1)) begin
          ctrl       <= {rx_sh[W-2:0], rx};
          ctrl_valid <= 1'b1;
        end
      end
    end
  end

endmodule
