// tero_trng_channel: one TERO TRNG instance of the ST test chip: control
// register CR, status register SR, counter stop value register CNTR, the
// control logic and the counter of TERO oscillations.
//
// CR (read/write): [0] tero_enable, [1] tero_start, [5:2] tero_adj_sel.
// Setting tero_enable and tero_start starts the TERO core. The counter,
// clocked directly by the TERO output (an asynchronous counter), counts its
// oscillations. The control logic watches the counter from `clk`: once the
// counter has not moved for STOP_CYC cycles the core has stopped, and SR
// shows in which state: [0] stopl (stopped with output 0), [1] stopr
// (stopped with output 1). CNTR holds the counter value at which the TERO
// stopped; its parity is the random bit, also given as SR[2] (`rnd`).
// Clearing tero_start clears the counter and the status so that the next
// start makes a new bit. CNTR is taken relative to the counter value seen
// before the start, so a counter left uncleared at power-up still gives
// the right count.
//
// Timing: the counter value and the TERO output are synchronised into `clk`
// by two flip-flops; they are only used once the core has stopped, when
// they no longer change. STOP_CYC must exceed the TERO period in clk
// cycles.
//
// From the description: CR with tero_enable, tero_start, tero_adj_sel; SR
// with stopl and stopr; CNTR with the stop value; the random bit as the
// parity of CNTR; the counter counting oscillations until the core stops.
// Own choices: bit positions, widths (16-bit counter, 4-bit adj), stop
// detection by a timeout, SR[2], and clearing on tero_start = 0.
module tero_trng_channel #(
  parameter int unsigned CNT_W    = 16,
  parameter int unsigned STOP_CYC = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  // register access
  input  logic [1:0]       reg_sel,   // 0 CR, 1 SR, 2 CNTR
  input  logic             wr,
  input  logic [15:0]      wdata,
  output logic [15:0]      rdata,
  // TERO core
  output logic             tero_enable,
  output logic             tero_start,
  output logic [3:0]       tero_adj_sel,
  input  logic             tero_out
);

  logic [5:0]       cr;
  logic [CNT_W-1:0] cnt, cnt_s1, cnt_s2, cnt_last, cnt_base, cntr;
  logic [1:0]       out_s;
  logic [$clog2(STOP_CYC+1)-1:0] still;
  logic             stopped, stopl, stopr;
  logic             cnt_clr;

  assign tero_enable  = cr[0];
  assign tero_start   = cr[1];
  assign tero_adj_sel = cr[5:2];
  assign cnt_clr      = !rst_n || !tero_start;

  always_ff @(posedge tero_out or posedge cnt_clr) begin
    if (cnt_clr) cnt <= '0;
    else         cnt <= cnt + CNT_W'(1);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cr       <= '0;
      cnt_s1   <= '0;
      cnt_s2   <= '0;
      cnt_last <= '0;
      cnt_base <= '0;
      out_s    <= '0;
      still    <= '0;
      stopped  <= 1'b0;
      stopl    <= 1'b0;
      stopr    <= 1'b0;
      cntr     <= '0;
    end else begin
      if (wr && reg_sel == 2'd0) cr <= wdata[5:0];
      cnt_s1   <= cnt;
      cnt_s2   <= cnt_s1;
      cnt_last <= cnt_s2;
      out_s    <= {out_s[0], tero_out};
      if (!(tero_enable && tero_start)) begin
        cnt_base <= cnt_s2;
        still   <= '0;
        stopped <= 1'b0;
        stopl   <= 1'b0;
        stopr   <= 1'b0;
      end else if (!stopped) begin
        if (cnt_s2 != cnt_last || cnt_s2 == cnt_base) still <= '0;
        else                                    still <= still + 1'b1;
        if (still == ($clog2(STOP_CYC+1))'(STOP_CYC)) begin
          stopped <= 1'b1;
          stopl   <= !out_s[1];
          stopr   <= out_s[1];
          cntr    <= cnt_s2 - cnt_base;
        end
      end
    end
  end

  always_comb begin
    unique case (reg_sel)
      2'd0:    rdata = {10'b0, cr};
      2'd1:    rdata = {13'b0, ^cntr, stopr, stopl};
      2'd2:    rdata = 16'(cntr);
      default: rdata = '0;
    endcase
  end

endmodule
