// puf_ssi: serial interface of the FPGA PUF, with the 1024-bit register
// that holds the challenge data going to the PUF core and the response
// coming back.
//
// Everything runs on the clock received from the motherboard. Words are 64
// bits, each sent MSB first after a start bit (1) on a line that idles at 0.
// The host sends a control word, {PUF_mode[63:56], 51 unused bits, number
// of data words N[4:0]}, followed by N data words (N <= 16), which fill the
// register from word 0 (bits 63:0) upwards. Then `start_process` pulses
// for one cycle with `puf_mode` valid. When the core reports `core_done`,
// its result is written into the low bits of the register and the board
// answers: a word {32'b0, PUF_status}, then N data words read back from the
// register, each after a start bit. A control word with N = 0 starts the
// core and returns only the status.
//
// From the description: 64-bit words, the first one a control word with
// PUF_mode and the number of words, the data words following, the answer
// of a 32-bit PUF_status and the data words, the 1024-bit register, 8-bit
// PUF_mode, Start_process, the board running on the received clock. Own
// choices: the start bits, bit order, field positions and the limit N <= 16.
module puf_ssi #(
  parameter int unsigned RES_W = 128   // width of the core result
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             ssi_rx,
  output logic             ssi_tx,
  output logic [7:0]       puf_mode,
  output logic             start_process,
  output logic [1023:0]    reg_data,       // challenge data to the core
  input  logic             core_done,      // result valid (level)
  input  logic [RES_W-1:0] core_result,
  input  logic [31:0]      puf_status
);

  typedef enum logic [2:0] {S_IDLE, S_RX, S_WAIT, S_TX} state_e;

  state_e      st;
  logic [63:0] sh;
  logic [6:0]  bitn;     // bits left in the current word, 0 = expect start
  logic [4:0]  nwords, widx;
  logic        ctrl_word, done_seen;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st            <= S_IDLE;
      sh            <= '0;
      bitn          <= '0;
      nwords        <= '0;
      widx          <= '0;
      ctrl_word     <= 1'b1;
      puf_mode      <= '0;
      start_process <= 1'b0;
      reg_data      <= '0;
      ssi_tx        <= 1'b0;
      done_seen     <= 1'b0;
    end else begin
      start_process <= 1'b0;
      unique case (st)
        S_IDLE, S_RX: begin
          ssi_tx <= 1'b0;
          if (bitn == '0) begin
            if (ssi_rx) begin
              bitn <= 7'd64;
              st   <= S_RX;
            end
          end else begin
            sh   <= {sh[62:0], ssi_rx};
            bitn <= bitn - 7'd1;
            if (bitn == 7'd1) begin
              if (ctrl_word) begin
                puf_mode  <= sh[62:55];
                nwords    <= {sh[3:0], ssi_rx};
                widx      <= '0;
                ctrl_word <= 1'b0;
                if ({sh[3:0], ssi_rx} == 5'd0) begin
                  st            <= S_WAIT;
                  start_process <= 1'b1;
                end
              end else begin
                reg_data[64*widx +: 64] <= {sh[62:0], ssi_rx};
                widx <= widx + 5'd1;
                if (widx + 5'd1 == nwords) begin
                  st            <= S_WAIT;
                  start_process <= 1'b1;
                end
              end
            end
          end
          done_seen <= 1'b0;
        end
        S_WAIT: begin
          // Let the core see start_process and leave its done state.
          done_seen <= 1'b1;
          if (done_seen && core_done) begin
            reg_data[RES_W-1:0] <= core_result;
            sh     <= {32'b0, puf_status};
            bitn   <= 7'd65;
            widx   <= '0;
            st     <= S_TX;
          end
        end
        S_TX: begin
          if (bitn == 7'd65) begin
            ssi_tx <= 1'b1;                   // start bit
            bitn   <= 7'd64;
          end else begin
            ssi_tx <= sh[63];
            sh     <= {sh[62:0], 1'b0};
            bitn   <= bitn - 7'd1;
            if (bitn == 7'd1) begin
              if (widx == nwords) begin
                st        <= S_IDLE;
                bitn      <= '0;
                ctrl_word <= 1'b1;
              end else begin
                sh   <= reg_data[64*widx +: 64];
                widx <= widx + 5'd1;
                bitn <= 7'd65;
              end
            end
          end
        end
        default: st <= S_IDLE;
      endcase
    end
  end

endmodule
