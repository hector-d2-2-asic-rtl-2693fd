// parity_filter: post-processing of the DC TRNG: every N raw bits are
// compressed into one output bit, their XOR (parity). This reduces the
// bias of the raw bits at the cost of an N times lower bit rate. `out_valid`
// pulses in the cycle after the N-th raw bit of a group.
//
// The document names the parity filter; N is not given, N = 4 is this
// design's choice.
module parity_filter #(
  parameter int unsigned N = 4
) (
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  input  logic in_bit,
  output logic out_valid,
  output logic out_bit
);

  logic [$clog2(N+1)-1:0] cnt;
  logic acc;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt       <= '0;
      acc       <= 1'b0;
      out_valid <= 1'b0;
      out_bit   <= 1'b0;
    end else begin
      out_valid <= 1'b0;
      if (in_valid) begin
        if (cnt == ($clog2(N+1))'(N - 1)) begin
          out_bit   <= acc ^ in_bit;
          out_valid <= 1'b1;
          acc       <= 1'b0;
          cnt       <= '0;
        end else begin
          acc <= acc ^ in_bit;
          cnt <= cnt + 1'b1;
        end
      end
    end
  end

endmodule
