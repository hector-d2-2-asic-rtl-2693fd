// dc_trng: the delay-chain TRNG of the FPGA daughter board.
//
// The entropy is the timing jitter accumulated by a free-running ring
// oscillator. Each of the RO's three stage outputs runs through a tapped
// delay chain of fast buffers (dc_ro_chains, a behavioural model of the
// hand-placed LUTs and CARRY4 chains). A divider derives the sampling
// signal from the quartz clock: every DIV cycles of `clk` all taps are
// captured by flip-flops, and the encoder reduces the captured code to one
// raw bit, the LSB of the edge position. A parity filter compresses PF_N
// raw bits into one post-processed bit. The raw bit stream also feeds the
// total-failure and online tests over windows of WIN raw bits.
//
// Outputs: mux_sel = 0 gives the raw bits on `data_out` with `clk_out` =
// divided clock (one bit per DIV cycles of clk); mux_sel = 1 gives the
// post-processed bits with `clk_out` divided again by PF_N. `clk_out` is
// low in the first half of each bit period and rises in its middle, so a
// receiver samples `data_out` on the rising edge of `clk_out`.
// `tf_alarm` (total failure) and `ol_alarm` (online tests failed) are
// sticky until reset.
//
// From the description: ring oscillator, tapped delay chains sampled by a
// divided quartz clock, encoder, parity filter, the mux_sel choice of raw
// or post-processed data, the two alarm outputs, the second divider on
// clk_out. Own choices: DIV, L, PF_N, WIN, the sampling enable (one clock
// with an enable instead of a derived clock) and the tests (trng_tests).
module dc_trng #(
  parameter int unsigned NCH  = 3,     // RO stages / delay chains
  parameter int unsigned L    = 32,    // taps per chain
  parameter int unsigned DIV  = 8,     // sampling divider
  parameter int unsigned PF_N = 4,     // parity filter length
  parameter int unsigned WIN  = 1024   // test window in raw bits
) (
  input  logic clk,        // quartz oscillator
  input  logic rst_n,
  input  logic ro_run,     // RO enable (0 simulates a dead source)
  input  logic mux_sel,
  output logic data_out,
  output logic clk_out,
  output logic tf_alarm,
  output logic ol_alarm
);

  logic [NCH*L-1:0] taps, cap;
  logic [$clog2(DIV)-1:0] dcnt;
  logic [$clog2(PF_N)-1:0] pcnt;
  logic tick, cap_valid;
  logic raw_valid, raw_bit, no_edge, pf_valid, pf_bit;
  logic raw_q, pf_q;
  logic win_done;
  logic [31:0] ones;

  dc_ro_chains #(.NCH(NCH), .L(L)) u_src (.run(ro_run), .taps);

  // Frequency divider and tap capture.
  assign tick = (dcnt == ($clog2(DIV))'(DIV - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dcnt      <= '0;
      pcnt      <= '0;
      cap       <= '0;
      cap_valid <= 1'b0;
    end else begin
      dcnt      <= tick ? '0 : dcnt + 1'b1;
      cap_valid <= tick;
      if (tick) begin
        cap  <= taps;
        pcnt <= pcnt + 1'b1;
      end
    end
  end

  dc_encoder #(.NCH(NCH), .L(L)) u_enc (
    .clk, .rst_n, .in_valid(cap_valid), .taps(cap),
    .valid(raw_valid), .raw_bit, .no_edge
  );

  parity_filter #(.N(PF_N)) u_pf (
    .clk, .rst_n, .in_valid(raw_valid), .in_bit(raw_bit),
    .out_valid(pf_valid), .out_bit(pf_bit)
  );

  trng_tests #(.WIN_W(32)) u_tests (
    .clk, .rst_n, .clear(1'b0), .valid(raw_valid), .bit_in(raw_bit),
    .win_len(32'(WIN)), .tf_alarm, .ol_alarm, .win_done, .ones
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      raw_q <= 1'b0;
      pf_q  <= 1'b0;
    end else begin
      if (raw_valid) raw_q <= raw_bit;
      if (pf_valid)  pf_q  <= pf_bit;
    end
  end

  assign data_out = mux_sel ? pf_q : raw_q;
  assign clk_out  = mux_sel ? (pcnt >= ($clog2(PF_N))'(PF_N / 2))
                            : (dcnt >= ($clog2(DIV))'(DIV / 2));

endmodule
