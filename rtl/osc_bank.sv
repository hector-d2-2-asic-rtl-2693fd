// osc_bank: behavioural model (not synthesizable) of a block of N oscillating
// cells together with the de-multiplexer that routes the activation signal to
// the selected cell and the multiplexer that returns that cell's output.
//
// Ring oscillators and TERO cells are analog in nature, so this model only
// reproduces what the surrounding digital logic sees:
//   MODE = 0 (RO):   while `trig` is high the selected cell toggles with a
//                    half period of half_period(sel) time units plus a small
//                    random jitter of 0..JIT units.
//   MODE = 1 (TERO): on a rising edge of `trig` the selected cell produces
//                    n_osc(sel) rising edges (plus 0..JIT random extra ones)
//                    and then stops in a random logic state; it is reset when
//                    `trig` falls.
// The per-cell half period and oscillation count are fixed formulas of the
// cell index (see the functions below), standing in for process variation.
// Only one cell of a bank is active at a time, as in the design, so the
// model runs just the selected one. Delays are in the simulator's default
// time unit (1 ps in Verilator).
// The model draws its jitter and noise from a linear congruential generator
// instead of $urandom. A synthesis tool reads its free-running process as a
// combinational loop with latches; an oscillator is such a loop, and the model
// stands in for analog cells, so it is not meant for synthesis.
module osc_bank #(
  parameter int unsigned N       = 128,  // cells in the bank
  parameter bit          MODE    = 1'b0, // 0: ring oscillators, 1: TERO cells
  parameter int unsigned SEED    = 0,    // varies the cell characteristics
  parameter int unsigned HP_BASE = 400,  // shortest half period
  parameter int unsigned HP_SPAN = 64,   // half-period spread between cells
  parameter int unsigned C_BASE  = 300,  // smallest TERO oscillation count
  parameter int unsigned C_SPAN  = 256,  // TERO count spread
  parameter int unsigned C_GROUP = 1,    // cells per TERO configuration
  parameter int unsigned JIT     = 3,    // random jitter / count spread
  localparam int unsigned SW = (N > 1) ? $clog2(N) : 1
) (
  input  logic          trig,  // Ena (RO) or Ctrl (TERO) activation
  input  logic [SW-1:0] sel,   // cell select (challenge)
  output logic          out    // output of the selected cell
);

  function automatic int unsigned half_period(input int unsigned i);
    return HP_BASE + ((i * 37 + SEED * 11) % HP_SPAN) * 2;
  endfunction

  function automatic int unsigned n_osc(input int unsigned i);
    return C_BASE + (((i / C_GROUP) * 53 + SEED * 7) % C_SPAN);
  endfunction

  int unsigned n_left;

  // Pseudo-random source for jitter and noise (linear congruential).
  int unsigned rs;

  initial begin
    out = 1'b0;
    rs  = 32'h2545_F491 + SEED * 32'h9E37_79B9;
  end

  always begin
    rs = rs * 32'd1664525 + 32'd1013904223;
    if (!trig) begin
      out = 1'b0;
      @(posedge trig);
      n_left = n_osc(int'(sel)) + ((rs >> 16) % (JIT + 1));
    end else if (MODE == 1'b0 || n_left != 0) begin
      #(half_period(int'(sel)) + ((rs >> 16) % (JIT + 1)));
      if (trig) begin
        out = ~out;
        if (out && MODE == 1'b1) n_left = n_left - 1;
      end
    end else begin
      // TERO cell has stopped oscillating; it stays in a random state.
      if ((rs >> 16) % 2 != 0) begin
        #(half_period(int'(sel)));
        if (trig) out = 1'b0;
      end
      if (trig) @(negedge trig);
    end
  end

endmodule
