// trng_tests: embedded total-failure test and online test of a TRNG's raw
// binary signal, evaluated over consecutive windows of `win_len` valid
// samples.
//
// Total failure test: if the input bit did not change once during a whole
// window, the entropy source is considered dead and `tf_alarm` is set.
// Online test: the number of ones in a window must lie between a quarter
// and three quarters of the window length (a monobit test); otherwise
// `ol_alarm` is set. Both alarms are sticky until `clear` or reset.
// `win_done` pulses at the end of each window and `ones` then holds the
// window's count of ones (for the status register). The verdict on a window
// is known one cycle after its last sample, so a design that wants every
// output bit checked must delay its output by at least one window.
//
// The document names the two tests and their 256-period latency in the PLL
// TRNG but gives neither their statistics nor their thresholds: the tests
// and bounds here are this design's choice.
module trng_tests #(
  parameter int unsigned WIN_W = 32
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clear,      // clears both alarms
  input  logic             valid,      // a new sample on bit_in
  input  logic             bit_in,
  input  logic [WIN_W-1:0] win_len,    // samples per window (>= 2)
  output logic             tf_alarm,
  output logic             ol_alarm,
  output logic             win_done,
  output logic [WIN_W-1:0] ones
);

  logic [WIN_W-1:0] n, n_ones;
  logic             prev, changed;
  logic [WIN_W-1:0] ones_now;

  assign ones_now = n_ones + WIN_W'(bit_in);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      n        <= '0;
      n_ones   <= '0;
      prev     <= 1'b0;
      changed  <= 1'b0;
      tf_alarm <= 1'b0;
      ol_alarm <= 1'b0;
      win_done <= 1'b0;
      ones     <= '0;
    end else begin
      win_done <= 1'b0;
      if (clear) begin
        tf_alarm <= 1'b0;
        ol_alarm <= 1'b0;
      end
      if (valid) begin
        prev <= bit_in;
        if (n + WIN_W'(1) >= win_len) begin
          // last sample of the window
          if (!(changed || (n != '0 && bit_in != prev))) tf_alarm <= 1'b1;
          if (ones_now < (win_len >> 2) || ones_now > win_len - (win_len >> 2)) ol_alarm <= 1'b1;
          ones     <= ones_now;
          win_done <= 1'b1;
          n        <= '0;
          n_ones   <= '0;
          changed  <= 1'b0;
        end else begin
          if (n != '0 && bit_in != prev) changed <= 1'b1;
          n      <= n + WIN_W'(1);
          n_ones <= ones_now;
        end
      end
    end
  end

endmodule
