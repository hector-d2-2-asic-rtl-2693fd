// asic_ctrl: control logic and output latch of the HECTOR ASIC.
//
// A command (from asic_cmd_rx) names one block in its top four bits; that
// block becomes the only active one and its configuration field is kept in
// a register that drives the block. Output data of the active block is
// routed to the 32-bit output latch; `data_rdy` pulses for one `clk` cycle
// whenever the latch holds a new word, and `next_config` pulses with it when
// a PUF has finished a challenge and can take the next one.
//
// Per block:
//   PLL TRNG  runs while active (`pll_run`); each synchronised strobe
//             (`pll_pulse`) latches {20'b0, 12-bit count}.
//   ELO TRNG  runs while active (`elo_ena`); 32 successive random bits,
//             one per synchronised strobe, are packed MSB first into a word.
//   TERO PUF  per command: `rst_comp` for 2 cycles, then `tero_ctrl` high
//             for t_act cycles, 4 cycles to settle, then {cnt1, cnt2} is
//             latched and next_config pulses.
//   RO PUF    per command: `rst_comp` for 2 cycles, then `ro_ena` until the
//             arbiter strobes, then {31'b0, arb_out} is latched and
//             next_config pulses.
//   TERO test cell select is held; the activation comes from a pin and the
//             cell output leaves on its own LVDS pair, so no data is latched.
// A new command aborts whatever the previous one started.
//
// From the description: one block active at a time, the shared 32-bit
// output, data_rdy, next_config only for the PUFs. Own choices: the command
// field layout (hector_pkg), the PUF sequencing and its cycle counts, packing
// ELO bits into words, and the TERO PUF data format.
module asic_ctrl
  import hector_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic [CMD_W-1:0]  cmd,
  input  logic              cmd_valid,
  // PLL TRNG
  output pll_cfg_t          pll_cfg,
  output logic              pll_run,
  input  logic [11:0]       pll_data,
  input  logic              pll_pulse,
  // ELO TRNG
  output elo_cfg_t          elo_cfg,
  output logic              elo_ena,
  input  logic              elo_bit,
  input  logic              elo_pulse,
  // TERO and RO PUF
  output puf_cfg_t          puf_cfg,
  output logic              ro_tero,
  output logic              rst_comp,
  output logic              tero_ctrl,
  output logic              ro_ena,
  input  logic [15:0]       cnt1,
  input  logic [15:0]       cnt2,
  input  logic              arb_out,
  input  logic              arb_strobe,
  // TERO test modules
  output test_cfg_t         test_cfg,
  output logic              test_active,
  // ASIC output
  output logic [DATA_W-1:0] data_out,
  output logic              data_rdy,
  output logic              next_config
);

  typedef enum logic [2:0] {S_IDLE, S_RST, S_ACT, S_SETTLE, S_DONE} puf_state_e;

  block_id_e   active;
  puf_state_e  pst;
  logic [15:0] tcnt;
  logic [31:0] elo_word;
  logic [4:0]  elo_n;

  logic [CMD_W-5:0] field;
  assign field = cmd[CMD_W-5:0];

  assign pll_run     = (active == BLK_PLL_TRNG);
  assign elo_ena     = (active == BLK_ELO_TRNG);
  assign test_active = (active == BLK_TERO_TEST);
  assign ro_tero     = (active == BLK_RO_PUF);
  assign rst_comp    = (pst == S_RST);
  assign tero_ctrl   = (pst == S_ACT) && (active == BLK_TERO_PUF);
  assign ro_ena      = (pst == S_ACT) && (active == BLK_RO_PUF);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      active      <= BLK_NONE;
      pll_cfg     <= '0;
      elo_cfg     <= '0;
      puf_cfg     <= '0;
      test_cfg    <= '0;
      pst         <= S_IDLE;
      tcnt        <= '0;
      elo_word    <= '0;
      elo_n       <= '0;
      data_out    <= '0;
      data_rdy    <= 1'b0;
      next_config <= 1'b0;
    end else begin
      data_rdy    <= 1'b0;
      next_config <= 1'b0;
      if (cmd_valid) begin
        active   <= block_id_e'(cmd[CMD_W-1 -: 4]);
        pst      <= S_IDLE;
        elo_n    <= '0;
        tcnt     <= '0;
        unique case (block_id_e'(cmd[CMD_W-1 -: 4]))
          BLK_PLL_TRNG:  pll_cfg <= pll_cfg_t'(field);
          BLK_ELO_TRNG:  elo_cfg <= elo_cfg_t'(field);
          BLK_TERO_PUF,
          BLK_RO_PUF: begin
            puf_cfg <= puf_cfg_t'(field);
            pst     <= S_RST;
          end
          BLK_TERO_TEST: test_cfg <= test_cfg_t'(field);
          default: ;
        endcase
      end else begin
        unique case (active)
          BLK_PLL_TRNG: if (pll_pulse) begin
            data_out <= {20'b0, pll_data};
            data_rdy <= 1'b1;
          end
          BLK_ELO_TRNG: if (elo_pulse) begin
            elo_word <= {elo_word[30:0], elo_bit};
            elo_n    <= elo_n + 5'd1;
            if (elo_n == 5'd31) begin
              data_out <= {elo_word[30:0], elo_bit};
              data_rdy <= 1'b1;
            end
          end
          BLK_TERO_PUF, BLK_RO_PUF: begin
            tcnt <= tcnt + 16'd1;
            unique case (pst)
              S_RST: if (tcnt == 16'd1) begin
                pst  <= S_ACT;
                tcnt <= '0;
              end
              S_ACT: begin
                if ((active == BLK_TERO_PUF && tcnt + 16'd1 >= puf_cfg.t_act) ||
                    (active == BLK_RO_PUF && arb_strobe)) begin
                  pst  <= S_SETTLE;
                  tcnt <= '0;
                end
              end
              S_SETTLE: if (tcnt == 16'd3) pst <= S_DONE;
              S_DONE: begin
                data_out    <= (active == BLK_TERO_PUF) ? {cnt1, cnt2} : {31'b0, arb_out};
                data_rdy    <= 1'b1;
                next_config <= 1'b1;
                pst         <= S_IDLE;
              end
              default: ;
            endcase
          end
          default: ;
        endcase
      end
    end
  end

endmodule
