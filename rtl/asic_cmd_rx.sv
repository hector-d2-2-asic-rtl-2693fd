// asic_cmd_rx: command input of the HECTOR ASIC: the serial-in shift
// register and the input latch.
//
// The host shifts a command into `config_serial`, one bit per `clk_asic`
// cycle, most significant bit first; the shift register shifts on every
// cycle. After the last bit the host raises `config_rdy`; on the first cycle
// in which it is high the input latch copies the shift register and
// `cmd_valid` pulses for one cycle with the new `cmd`. Keeping `config_rdy`
// high longer does not load the command again.
//
// From the description: the 88-bit command, the shift register clocked by
// clk_asic, the input latch enabled by config_rdy. Own choices: MSB-first
// order, loading on the rising edge of config_rdy, the active-low reset.
module asic_cmd_rx #(
  parameter int unsigned CMD_W = hector_pkg::CMD_W
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             config_serial,
  input  logic             config_rdy,
  output logic [CMD_W-1:0] cmd,
  output logic             cmd_valid
);

  logic [CMD_W-1:0] shreg;
  logic             rdy_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      shreg     <= '0;
      rdy_q     <= 1'b0;
      cmd       <= '0;
      cmd_valid <= 1'b0;
    end else begin
      shreg     <= {shreg[CMD_W-2:0], config_serial};
      rdy_q     <= config_rdy;
      cmd_valid <= config_rdy && !rdy_q;
      if (config_rdy && !rdy_q) cmd <= shreg;
    end
  end

endmodule
