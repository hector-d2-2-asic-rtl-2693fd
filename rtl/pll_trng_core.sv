// pll_trng_core: TRNG core of the FPGA PLL TRNG.
//
// PLL0 gives the reference clock `clk0`; PLL1, fed by the same quartz,
// gives up to four phases of a jittery clock (`ph`). Each enabled phase is
// sampled by a D flip-flop on `clk0` and the samples are XORed (`xor_out`,
// one bit per clk0 cycle). The decimator adds the XOR output modulo 2 over
// KD periods of clk0 (one period T_Q) and delivers one raw random bit per
// T_Q. The XOR output also feeds the total-failure and online tests, whose
// window is 256 T_Q; since their verdict comes that late, every decimated
// bit goes through a 256-bit buffer and leaves it only after the window in
// which its samples were tested. `buf_valid` marks the cycle in which
// `buf_bit` takes a new value, once the buffer has filled.
//
// Timing: xor_out lags the phases by one clk0 cycle; a decimated bit is
// ready at the end of each T_Q; buf_bit is the bit decimated 256 T_Q
// earlier.
//
// From the description: the phase-sampling DFFs, the XOR, the decimator
// over KD reference periods, the embedded tests on the decimator input with
// 256-T_Q latency, the 256-bit buffer. Own choices: the phase-enable mask,
// the 16-bit KD, the reset, and the tests themselves (see trng_tests).
module pll_trng_core #(
  parameter int unsigned NPH   = 4,    // PLL1 phases sampled (one to four)
  parameter int unsigned KD_W  = 16,   // width of KD
  parameter int unsigned BUF_N = 256   // output buffer length, in T_Q
) (
  input  logic            clk0,      // PLL0 reference clock
  input  logic            rst_n,
  input  logic [NPH-1:0]  ph,        // PLL1 clock phases
  input  logic [NPH-1:0]  ph_en,     // which phases take part
  input  logic [KD_W-1:0] kd,        // decimation factor (>= 1)
  input  logic            clear,     // clear alarms
  output logic            xor_out,   // XOR of the samples, every clk0
  output logic            dec_bit,   // decimator output
  output logic            dec_valid,
  output logic            buf_bit,   // decimated bit after the buffer
  output logic            buf_valid,
  output logic            tf_alarm,  // total failure
  output logic            ol_alarm,  // online test failure
  output logic [31:0]     ones       // ones in the last test window
);

  logic [NPH-1:0]  samp;
  logic [KD_W-1:0] kcnt;
  logic            acc;
  logic [BUF_N-1:0] buffer;
  logic [$clog2(BUF_N+1)-1:0] fill;
  logic            win_done;

  always_ff @(posedge clk0 or negedge rst_n) begin
    if (!rst_n) samp <= '0;
    else        samp <= ph & ph_en;
  end

  assign xor_out = ^samp;

  // Decimator: XOR-accumulate KD samples.
  always_ff @(posedge clk0 or negedge rst_n) begin
    if (!rst_n) begin
      kcnt      <= '0;
      acc       <= 1'b0;
      dec_bit   <= 1'b0;
      dec_valid <= 1'b0;
    end else begin
      dec_valid <= 1'b0;
      if (kcnt + KD_W'(1) >= kd) begin
        dec_bit   <= acc ^ xor_out;
        dec_valid <= 1'b1;
        acc       <= 1'b0;
        kcnt      <= '0;
      end else begin
        acc  <= acc ^ xor_out;
        kcnt <= kcnt + KD_W'(1);
      end
    end
  end

  // 256-bit output buffer.
  always_ff @(posedge clk0 or negedge rst_n) begin
    if (!rst_n) begin
      buffer    <= '0;
      fill      <= '0;
      buf_bit   <= 1'b0;
      buf_valid <= 1'b0;
    end else begin
      buf_valid <= 1'b0;
      if (dec_valid) begin
        buffer <= {buffer[BUF_N-2:0], dec_bit};
        if (fill == ($clog2(BUF_N+1))'(BUF_N)) begin
          buf_bit   <= buffer[BUF_N-1];
          buf_valid <= 1'b1;
        end else begin
          fill <= fill + 1'b1;
        end
      end
    end
  end

  trng_tests #(.WIN_W(32)) u_tests (
    .clk(clk0), .rst_n, .clear, .valid(1'b1), .bit_in(xor_out),
    .win_len(32'(BUF_N) * 32'(kd)),
    .tf_alarm, .ol_alarm, .win_done, .ones
  );

endmodule
