// ro_bank8: behavioural model (not synthesizable) of one bank of the ELO
// TRNG: eight ring oscillators of different lengths, a de-multiplexer that
// enables only the selected one and a multiplexer that outputs it.
//
// The oscillation frequencies are the estimates from electrical simulation
// given for the eight ROs (350, 430, 500, 560, 630, 670, 720 and 916 MHz);
// each half period gets 0..JIT time units of random jitter. Delays are in
// the simulator's default time unit (1 ps in Verilator). The selected RO
// runs while `ena` is high and rests at 0 otherwise.
// The model draws its jitter and noise from a linear congruential generator
// instead of $urandom. A synthesis tool reads its free-running process as a
// combinational loop with latches; an oscillator is such a loop, and the model
// stands in for analog cells, so it is not meant for synthesis.
module ro_bank8 #(
  parameter int unsigned JIT = 8   // random jitter per half period
) (
  input  logic       ena,
  input  logic [2:0] sel,
  output logic       out
);

  // Half periods in ps: 1e6 / (2 * f[MHz]).
  function automatic int unsigned half_period(input logic [2:0] i);
    case (i)
      3'd0: return 1429;  // 350 MHz
      3'd1: return 1163;  // 430 MHz
      3'd2: return 1000;  // 500 MHz
      3'd3: return 893;   // 560 MHz
      3'd4: return 794;   // 630 MHz
      3'd5: return 746;   // 670 MHz
      3'd6: return 694;   // 720 MHz
      default: return 546; // 916 MHz
    endcase
  endfunction

  // Pseudo-random source for jitter and noise (linear congruential).
  int unsigned rs;

  initial begin
    out = 1'b0;
    rs  = 32'h2545_F491 + 32'd0;
  end

  always begin
    rs = rs * 32'd1664525 + 32'd1013904223;
    if (!ena) begin
      out = 1'b0;
      @(posedge ena);
    end else begin
      #(half_period(sel) + ((rs >> 16) % (JIT + 1)));
      if (ena) out = ~out;
    end
  end

endmodule
