// dc_encoder: encoder of the delay-chain TRNG. It turns the states captured
// in the tapped delay chains into one raw bit per sample.
//
// Each chain is handled separately: a bubble filter replaces every tap by
// the majority of itself and its two neighbours (removing isolated wrong
// bits caused by flip-flops that sampled during a transition), then a
// priority encoder finds the lowest tap position p at which the filtered
// code changes value. The lowest-numbered chain that shows an edge gives
// the position, and the raw bit is its least significant bit p[0]. If no
// chain shows an edge, `no_edge` is set and the raw bit is 0. Output is
// registered: `valid` follows `in_valid` by one cycle.
//
// From the description: bubble filtering, priority encoding of the edge
// position, output of its LSB. Own choices: the three-tap majority filter,
// per-chain encoding with the first chain taking precedence, and the
// no-edge flag.
module dc_encoder #(
  parameter int unsigned NCH = 3,   // delay chains (one per RO stage)
  parameter int unsigned L   = 32   // taps per chain
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  logic [NCH*L-1:0] taps,    // chain c tap j at taps[c*L+j]
  output logic             valid,
  output logic             raw_bit,
  output logic             no_edge
);

  logic [NCH*L-1:0] filt;

  always_comb begin
    for (int c = 0; c < NCH; c++) begin
      for (int j = 0; j < int'(L); j++) begin
        logic a, b, m;
        a = (j == 0)          ? taps[c*L + j] : taps[c*L + j - 1];
        m = taps[c*L + j];
        b = (j == int'(L) - 1) ? taps[c*L + j] : taps[c*L + j + 1];
        filt[c*L + j] = (a & m) | (m & b) | (a & b);
      end
    end
  end

  logic found;
  logic pos_lsb;

  always_comb begin
    found   = 1'b0;
    pos_lsb = 1'b0;
    for (int c = NCH - 1; c >= 0; c--) begin
      logic cf, cl;
      cf = 1'b0;
      cl = 1'b0;
      for (int j = int'(L) - 2; j >= 0; j--) begin
        if (filt[c*L + j] != filt[c*L + j + 1]) begin
          cf = 1'b1;
          cl = j[0];
        end
      end
      if (cf) begin
        found   = 1'b1;
        pos_lsb = cl;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid   <= 1'b0;
      raw_bit <= 1'b0;
      no_edge <= 1'b0;
    end else begin
      valid <= in_valid;
      if (in_valid) begin
        raw_bit <= found & pos_lsb;
        no_edge <= !found;
      end
    end
  end

endmodule
