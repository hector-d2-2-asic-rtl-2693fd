// puf_count_arbiter: the counters and the arbiter shared by the TERO PUF and
// the RO PUF of the HECTOR ASIC.
//
// The RO PUF and the TERO PUF each have two blocks (A and B) of oscillating
// cells; the cell pair is chosen by the challenge outside this module. The
// `ro_tero` input selects which PUF's two cell outputs clock the two 16-bit
// counters, so both PUFs reuse the same counters. `rst_comp` clears the
// counters and the arbiter before each comparison.
//
// TERO PUF: both cells are triggered together; each oscillates a number of
// times that depends on its process variation and then stops. The two
// counter values are brought out (`cnt1`, `cnt2`) and compared off chip.
//
// RO PUF: the two ROs run together; the arbiter watches bit 2*arb_cfg+1 of
// each counter (so the configuration chooses bit 1, 3, ..., 15). The first
// counter to set that bit wins: A gives `arb_out` = 1, B gives 0. The
// arbiter then raises `stop`, which is used to disable the ROs and thus
// freeze the counters, and pulses `arb_strobe` for one `clk` cycle.
//
// Timing: the counters run in the oscillators' own clock domains; the two
// watched bits are synchronised into `clk` by two flip-flops each, so the
// decision comes 2-3 `clk` cycles after the bit sets. A tie (both bits seen
// in the same cycle) is decided as 1. `cnt1`/`cnt2` must be read only once
// the oscillators have stopped.
//
// From the description: two 16-bit counters shared by both PUFs, the
// RO/TERO selection, Rst_comp, a 3-bit arbiter configuration choosing the
// compared counter bit, arbiter out and strobe. Own choices: the mapping of
// the configuration to a bit, the synchroniser, the tie rule, `ro_tero` = 1
// meaning RO, and the `stop` output.
module puf_count_arbiter #(
  parameter int unsigned CNT_W = 16
) (
  input  logic             clk,
  input  logic             rst_comp,   // active high, clears counters and arbiter
  input  logic             ro_tero,    // 1: RO PUF cells, 0: TERO PUF cells
  input  logic             tero_a,     // selected TERO cell of block A
  input  logic             tero_b,     // selected TERO cell of block B
  input  logic             ro_a,       // selected RO cell of block A
  input  logic             ro_b,       // selected RO cell of block B
  input  logic [2:0]       arb_cfg,    // compared bit = 2*arb_cfg+1
  output logic [CNT_W-1:0] cnt1,
  output logic [CNT_W-1:0] cnt2,
  output logic             arb_out,
  output logic             arb_strobe,
  output logic             stop
);

  logic osc1, osc2;
  assign osc1 = ro_tero ? ro_a : tero_a;
  assign osc2 = ro_tero ? ro_b : tero_b;

  always_ff @(posedge osc1 or posedge rst_comp) begin
    if (rst_comp) cnt1 <= '0;
    else          cnt1 <= cnt1 + CNT_W'(1);
  end

  always_ff @(posedge osc2 or posedge rst_comp) begin
    if (rst_comp) cnt2 <= '0;
    else          cnt2 <= cnt2 + CNT_W'(1);
  end

  logic [3:0] bit_idx;
  assign bit_idx = {arb_cfg, 1'b1};

  logic [1:0] sync_a, sync_b;

  always_ff @(posedge clk or posedge rst_comp) begin
    if (rst_comp) begin
      sync_a     <= '0;
      sync_b     <= '0;
      stop       <= 1'b0;
      arb_out    <= 1'b0;
      arb_strobe <= 1'b0;
    end else begin
      sync_a     <= {sync_a[0], cnt1[bit_idx]};
      sync_b     <= {sync_b[0], cnt2[bit_idx]};
      arb_strobe <= 1'b0;
      if (!stop && ro_tero && (sync_a[1] || sync_b[1])) begin
        stop       <= 1'b1;
        arb_out    <= sync_a[1];
        arb_strobe <= 1'b1;
      end
    end
  end

endmodule
