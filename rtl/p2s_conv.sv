// p2s_conv: parallel-to-serial converter of the fast data interface. An
// 8-bit word is sent as a start bit (0), the eight data bits LSB first and
// a stop bit (1), one bit per clock, so the receiver can find the byte
// boundaries. Between frames the line idles at 1. A word offered on `din`
// with `load` is taken only when `ready` is high (the converter is idle);
// `ready` is high again in the cycle the stop bit is on the line.
//
// From the description: 8 bits, start and stop bits added for byte
// alignment, synchronous to the data clock. Own choices: bit order, the
// polarities and the ready/load handshake.
module p2s_conv (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [7:0] din,
  input  logic       load,
  output logic       ready,
  output logic       sout
);

  logic [9:0] sh;      // {stop, data[7:0], start}, shifted out LSB first
  logic [3:0] left;    // bits still to send after the current one

  assign ready = (left == 4'd0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sh   <= '1;
      left <= '0;
    end else if (ready && load) begin
      sh   <= {1'b1, din, 1'b0};
      left <= 4'd9;
    end else if (!ready) begin
      sh   <= {1'b1, sh[9:1]};
      left <= left - 4'd1;
    end
  end

  assign sout = sh[0];

  // A load while busy would be lost.
  assert property (@(posedge clk) disable iff (!rst_n) load |-> ready)
    else $error("p2s_conv: load while busy");

endmodule
