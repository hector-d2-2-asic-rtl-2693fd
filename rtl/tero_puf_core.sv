// tero_puf_core: controller, counters, subtractor, bit extractor and
// response shift register of the FPGA TERO PUF.
//
// The PUF has two blocks of NPAIR TERO cells, A and B. For challenge i
// (i = 0..NPAIR-1) cell A.i is compared with one cell of block B: B.i, or,
// when `use_chal` is set, the cell given by chal[6*i +: 6] (the host must
// then use every B cell only once). For each comparison the controller
//   1. selects the two cells and clears both counters (2 cycles);
//   2. raises `ctrl` for T_ACT cycles, triggering both cells together;
//   3. drops `ctrl` and waits 4 cycles for the counters to settle;
//   4. subtracts the two 11-bit oscillation counts and extracts 2 bits:
//      bit 1 = (count A > count B), bit 0 = bit 1 of |count A - count B|;
//      both are shifted into the 2*NPAIR-bit response register.
// After the last challenge `done` rises and `response` holds the result,
// the bits of challenge 0 at the most significant end. `start` begins a new
// response generation.
//
// Timing: one challenge takes T_ACT + 7 cycles, a response NPAIR times
// that; with T_ACT = 50 (1 us at 50 MHz) and 64 pairs, about 3.7k cycles.
//
// From the description: 128 cells in two blocks, each A cell compared with
// a B cell and used once, two 11-bit counters, 1 us activation, subtractor,
// up to 2 bits per challenge, 128-bit response in a shift register. Own
// choices: which two bits are extracted, the pairing, the sequencing and
// its cycle counts, and the clock of 50 MHz implied by T_ACT.
module tero_puf_core #(
  parameter int unsigned NPAIR = 64,  // cells per block
  parameter int unsigned CNT_W = 11,  // counter width
  parameter int unsigned T_ACT = 50,  // activation time in clk cycles
  localparam int unsigned SW = $clog2(NPAIR)
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               start,
  input  logic               use_chal,
  input  logic [6*NPAIR-1:0] chal,
  input  logic               osc_a,      // output of the selected A cell
  input  logic               osc_b,      // output of the selected B cell
  output logic [SW-1:0]      sel_a,
  output logic [SW-1:0]      sel_b,
  output logic               ctrl,       // activation of both selected cells
  output logic               busy,
  output logic               done,
  output logic [2*NPAIR-1:0] response
);

  typedef enum logic [2:0] {S_IDLE, S_CLR, S_ACT, S_SETTLE, S_EXTRACT} state_e;

  state_e          st;
  logic [15:0]     t;
  logic [SW-1:0]   idx;
  logic            cnt_clr;
  logic [CNT_W-1:0] cnt_a, cnt_b;
  logic [CNT_W:0]  diff, mag;

  assign busy    = (st != S_IDLE);
  assign ctrl    = (st == S_ACT);
  assign cnt_clr = (st == S_CLR) || !rst_n;
  assign sel_a   = idx;
  assign sel_b   = use_chal ? chal[6*idx +: SW] : idx;

  always_ff @(posedge osc_a or posedge cnt_clr) begin
    if (cnt_clr) cnt_a <= '0;
    else         cnt_a <= cnt_a + CNT_W'(1);
  end

  always_ff @(posedge osc_b or posedge cnt_clr) begin
    if (cnt_clr) cnt_b <= '0;
    else         cnt_b <= cnt_b + CNT_W'(1);
  end

  // Subtractor and bit extractor.
  assign diff = {1'b0, cnt_a} - {1'b0, cnt_b};
  assign mag  = diff[CNT_W] ? -diff : diff;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st       <= S_IDLE;
      t        <= '0;
      idx      <= '0;
      done     <= 1'b0;
      response <= '0;
    end else begin
      t <= t + 16'd1;
      unique case (st)
        S_IDLE: if (start) begin
          st   <= S_CLR;
          t    <= '0;
          idx  <= '0;
          done <= 1'b0;
        end
        S_CLR: if (t == 16'd1) begin
          st <= S_ACT;
          t  <= '0;
        end
        S_ACT: if (t == 16'(T_ACT - 1)) begin
          st <= S_SETTLE;
          t  <= '0;
        end
        S_SETTLE: if (t == 16'd3) st <= S_EXTRACT;
        S_EXTRACT: begin
          response <= {response[2*NPAIR-3:0], (cnt_a > cnt_b), mag[1]};
          t        <= '0;
          if (idx == SW'(NPAIR - 1)) begin
            st   <= S_IDLE;
            done <= 1'b1;
          end else begin
            st  <= S_CLR;
            idx <= idx + 1'b1;
          end
        end
        default: st <= S_IDLE;
      endcase
    end
  end

endmodule
