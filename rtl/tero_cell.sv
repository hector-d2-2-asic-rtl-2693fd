// tero_cell: behavioural model (not synthesizable) of a TERO core as used
// in the TERO TRNG. When `start` rises while `enable` is high, the cell
// oscillates for a random number of periods and then settles in a random
// one of its two stable states; `out` is its output. The number of periods
// is BASE + 40*adj + a random part of 0..63, standing for the effect of the
// adjustable delays (`adj`, tero_adj_sel) and of the noise that makes the
// count random. Half period HP time units (default time unit 1 ps). The
// cell is reset (out = 0) while `start` or `enable` is low.
// The model draws its jitter and noise from a linear congruential generator
// instead of $urandom. A synthesis tool reads its free-running process as a
// combinational loop with latches; an oscillator is such a loop, and the model
// stands in for analog cells, so it is not meant for synthesis.
module tero_cell #(
  parameter int unsigned BASE = 200,
  parameter int unsigned HP   = 500
) (
  input  logic       enable,
  input  logic       start,
  input  logic [3:0] adj,
  output logic       out
);

  int unsigned n_left;

  // Pseudo-random source for jitter and noise (linear congruential).
  int unsigned rs;

  initial begin
    out = 1'b0;
    rs  = 32'h2545_F491 + BASE * 32'h9E37_79B9 + HP;
  end

  always begin
    rs = rs * 32'd1664525 + 32'd1013904223;
    if (!(enable && start)) begin
      out = 1'b0;
      @(enable or start);
      if (enable && start) n_left = BASE + 40 * int'(adj) + ((rs >> 16) % 64);
    end else if (n_left != 0) begin
      #(HP);
      out = 1'b1;
      #(HP);
      n_left = n_left - 1;
      if (n_left != 0 || ((rs >> 16) % 2) == 0) out = 1'b0;
    end else begin
      @(enable or start);
    end
  end

endmodule
