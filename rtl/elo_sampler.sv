// elo_sampler: digital part of the elementary ring-oscillator TRNG (ELO
// TRNG) of the HECTOR ASIC.
//
// Two free-running ring oscillators are used. The selected RO of bank 1
// (`ro_clk`) clocks a 32-bit counter preloaded with K; the counter divides
// it down to the sampling signal `strobe`, which is high for one `ro_clk`
// cycle every K cycles. The rising edge of `strobe` clocks the sampling
// flip-flop, whose D input is the selected RO of bank 0 (`ro_noise`). The
// jitter accumulated by the two oscillators during the K periods between
// samples makes `bit_out` random; a larger K accumulates more jitter and
// gives fewer bits per second.
//
// Interface: everything here runs in the `ro_clk` domain (and the strobe
// derived from it); `rst_n` is asynchronous, active low. `bit_out` is valid
// from the cycle after `strobe` rises until the next strobe.
//
// From the description: the 32-bit counter with preload K, the sampling DFF
// clocked by the counter output, the output strobe. Own choices: counting
// down to zero and reloading, K below 2 treated as 2 (so that the strobe
// has an edge), and the reset.
module elo_sampler #(
  parameter int unsigned K_W = 32
) (
  input  logic           ro_clk,    // selected RO of bank 1
  input  logic           rst_n,
  input  logic           ro_noise,  // selected RO of bank 0
  input  logic [K_W-1:0] k,         // preload: sampling period in ro_clk cycles
  output logic           strobe,    // sampling signal / output strobe
  output logic           bit_out    // random output bit
);

  logic [K_W-1:0] cnt;
  logic [K_W-1:0] k_eff;

  assign k_eff = (k < K_W'(2)) ? K_W'(2) : k;

  always_ff @(posedge ro_clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt    <= '0;
      strobe <= 1'b0;
    end else begin
      strobe <= (cnt == '0);
      // Reload also when the count is out of range (new, smaller K).
      if (cnt == '0 || cnt >= k_eff) cnt <= k_eff - K_W'(1);
      else                           cnt <= cnt - K_W'(1);
    end
  end

  always_ff @(posedge strobe or negedge rst_n) begin
    if (!rst_n) bit_out <= 1'b0;
    else        bit_out <= ro_noise;
  end

endmodule
