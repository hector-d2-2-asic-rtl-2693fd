// dc_ro_chains: behavioural model (not synthesizable) of the entropy source
// of the DC TRNG: a three-stage ring oscillator (three LUT inverters) whose
// every stage output drives a tapped delay chain of L fast buffers (CARRY4
// primitives on the FPGA). The outputs are the unsampled tap signals; the
// flip-flops that capture them are in dc_trng.
//
// Each inverter has a delay of STAGE time units plus 0..JIT units of random
// jitter per transition, giving an RO period of about 6*STAGE; each buffer
// delays by TAP units. `run` = 0 stops the oscillator (used to test the
// alarms). Delays are in the simulator's default time unit (1 ps).
// The model draws its jitter and noise from a linear congruential generator
// instead of $urandom. A synthesis tool reads its free-running process as a
// combinational loop with latches; an oscillator is such a loop, and the model
// stands in for analog cells, so it is not meant for synthesis.
module dc_ro_chains #(
  parameter int unsigned NCH   = 3,
  parameter int unsigned L     = 32,
  parameter int unsigned STAGE = 600,
  parameter int unsigned TAP   = 50,
  parameter int unsigned JIT   = 20
) (
  input  logic             run,
  output logic [NCH*L-1:0] taps
);

  logic [NCH-1:0] s;

  // Pseudo-random source for jitter and noise (linear congruential).
  int unsigned rs;

  // Start from a state with a single pending transition at stage 0.
  initial begin
    for (int k = 0; k < int'(NCH); k++) s[k] = k[0];
    rs = 32'h2545_F491 + 32'd0;
  end

  // Ring: stage k inverts stage k-1, stage 0 inverts the last stage.
  always begin
    if (!run) #1000;
    else begin
      for (int k = 0; k < int'(NCH); k++) begin
        rs = rs * 32'd1664525 + 32'd1013904223;
        #(STAGE + ((rs >> 16) % (JIT + 1)));
        s[k] = (k == 0) ? ~s[NCH-1] : ~s[k-1];
      end
    end
  end

  for (genvar c = 0; c < NCH; c++) begin : g_chain
    for (genvar j = 0; j < L; j++) begin : g_tap
      if (j == 0) begin : g_first
        always @(s[c]) taps[c*L + j] <= #(TAP) s[c];
      end else begin : g_next
        always @(taps[c*L + j - 1]) taps[c*L + j] <= #(TAP) taps[c*L + j - 1];
      end
    end
  end

endmodule
