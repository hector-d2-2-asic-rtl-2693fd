// pulse_sync: carries single-cycle pulses from one clock domain to another.
//
// Each source pulse toggles a flag in the source domain; the flag passes
// through a two-flip-flop synchroniser in the destination domain, and every
// change of the synchronised flag gives one destination pulse, 2-3
// destination cycles later. Source pulses must be spaced by more than three
// destination cycles. Used where the TRNGs, clocked by their own PLL or ring
// oscillator, hand results to the ASIC control logic.
module pulse_sync (
  input  logic src_clk,
  input  logic src_rst_n,
  input  logic src_pulse,
  input  logic dst_clk,
  input  logic dst_rst_n,
  output logic dst_pulse
);

  logic       tgl;
  logic [2:0] sync;

  always_ff @(posedge src_clk or negedge src_rst_n) begin
    if (!src_rst_n)     tgl <= 1'b0;
    else if (src_pulse) tgl <= ~tgl;
  end

  always_ff @(posedge dst_clk or negedge dst_rst_n) begin
    if (!dst_rst_n) sync <= '0;
    else            sync <= {sync[1:0], tgl};
  end

  assign dst_pulse = sync[2] ^ sync[1];

endmodule
