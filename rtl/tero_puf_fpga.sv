// tero_puf_fpga: the TERO PUF of the FPGA daughter board with its serial
// interface.
//
// A TERO (transition effect ring oscillator) cell, once triggered, oscillates
// for a number of periods that depends on its process variation and then
// settles. Comparing the oscillation counts of two cells built alike gives
// device-specific bits. Here 128 cells form two blocks of 64 (osc_bank,
// a behavioural model of the hand-placed cells and their demultiplexers and
// multiplexers); tero_puf_core compares A.i with a B cell for i = 0..63 and
// extracts 2 bits per comparison, forming a 128-bit response.
//
// The host talks to the board through puf_ssi on the board clock `clk`
// (the motherboard clock; the serial clock is the same clock): it sends a
// control word with PUF_mode and a number N of data words, then the data
// words (challenges). PUF_mode bit 0 = 1 takes the B cell of each pair from
// the challenge data (6 bits per pair, from bit 0 of the register up),
// otherwise B.i is paired with A.i. When the response is ready the board
// answers with PUF_status ({30'b0, busy, done}) and N words read back from
// the register, whose low 128 bits now hold the response.
module tero_puf_fpga #(
  parameter int unsigned NPAIR = 64,
  parameter int unsigned T_ACT = 50
) (
  input  logic clk,
  input  logic n_reset,
  input  logic ssi_rx,
  output logic ssi_tx
);

  localparam int unsigned SW = $clog2(NPAIR);

  logic [7:0]    puf_mode;
  logic          start_process, busy, done, ctrl, osc_a, osc_b;
  logic [1023:0] reg_data;
  logic [SW-1:0] sel_a, sel_b;
  logic [2*NPAIR-1:0] response;

  puf_ssi #(.RES_W(2*NPAIR)) u_ssi (
    .clk, .rst_n(n_reset), .ssi_rx, .ssi_tx,
    .puf_mode, .start_process, .reg_data,
    .core_done(done && !busy), .core_result(response),
    .puf_status({30'b0, busy, done})
  );

  tero_puf_core #(.NPAIR(NPAIR), .CNT_W(11), .T_ACT(T_ACT)) u_core (
    .clk, .rst_n(n_reset), .start(start_process), .use_chal(puf_mode[0]),
    .chal(reg_data[6*NPAIR-1:0]), .osc_a, .osc_b,
    .sel_a, .sel_b, .ctrl, .busy, .done, .response
  );

  osc_bank #(.N(NPAIR), .MODE(1'b1), .SEED(11)) u_block_a (.trig(ctrl), .sel(sel_a), .out(osc_a));
  osc_bank #(.N(NPAIR), .MODE(1'b1), .SEED(12)) u_block_b (.trig(ctrl), .sel(sel_b), .out(osc_b));

endmodule
