// pll_trng_asic: digital part of the PLL-based TRNG of the HECTOR ASIC.
//
// Two on-chip PLLs are fed by the same reference clock. The output of PLL2
// (`jit_clk`) is sampled on the rising edges of the PLL1 output (`clk`) by
// DFF1 and re-registered by DFF2. Because the two PLL frequencies are in a
// rational ratio KM/KD, the sampled bit stream is periodic except where the
// clock jitter moves an edge across the sampling instant. A sample counter
// counts 0..KD-1 clock periods and pulses `tq_end` on the last one; during
// each such window of KD samples a 12-bit counter counts the samples equal
// to 1. At `tq_end` the count is copied into the 12-bit output register and
// the counter is synchronously reset.
//
// Output: `data` (12 bits) holds the count of the last window; its LSB is
// the random bit, the full value serves jitter characterisation. `strobe`
// is high for one `clk` cycle when `data` takes a new value, i.e. once every
// KD cycles. The sample that arrives in the `tq_end` cycle itself is lost to
// the synchronous reset, as drawn in the block diagram, so a window counts
// KD-1 samples.
//
// From the description: DFF1/DFF2, sample counter 0..KD-1, 12-bit counter
// with sreset/ena, 12-bit output register, 12-bit KD. Own choices: the
// asynchronous active-low reset, `strobe` delayed by a cycle to line up with
// `data`, and KD = 0 treated like KD = 1.
module pll_trng_asic #(
  parameter int unsigned KD_W  = 12,  // width of KD
  parameter int unsigned CNT_W = 12   // width of the sample counter/output
) (
  input  logic             clk,      // PLL1 output: sampling clock
  input  logic             rst_n,
  input  logic             jit_clk,  // PLL2 output: sampled jittery clock
  input  logic [KD_W-1:0]  kd,       // accumulation length in samples
  output logic [CNT_W-1:0] data,     // last window count, LSB = random bit
  output logic             strobe    // data updated
);

  logic            dff1, dff2;
  logic [KD_W-1:0] samp_cnt;
  logic            tq_end;
  logic [CNT_W-1:0] ones_cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dff1 <= 1'b0;
      dff2 <= 1'b0;
    end else begin
      dff1 <= jit_clk;
      dff2 <= dff1;
    end
  end

  // Counter of samples 0..KD-1.
  assign tq_end = (samp_cnt >= kd - KD_W'(1)) || (kd == '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      samp_cnt <= '0;
    else if (tq_end) samp_cnt <= '0;
    else             samp_cnt <= samp_cnt + KD_W'(1);
  end

  // 12-bit counter of ones (sreset = tq_end, ena = DFF2).
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      ones_cnt <= '0;
    else if (tq_end) ones_cnt <= '0;
    else if (dff2)   ones_cnt <= ones_cnt + CNT_W'(1);
  end

  // 12-bit output register (ena = tq_end).
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      data   <= '0;
      strobe <= 1'b0;
    end else begin
      strobe <= tq_end;
      if (tq_end) data <= ones_cnt;
    end
  end

endmodule
