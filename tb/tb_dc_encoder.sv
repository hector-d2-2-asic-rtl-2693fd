// tb_dc_encoder: builds captured delay-chain codes with a known edge: the
// chains before chain c hold constant codes, chain c changes value after
// tap p, and one isolated wrong bit (a bubble) is flipped elsewhere. The
// raw bit must be p[0]; codes with no edge at all must set no_edge. The
// output must appear one cycle after the input.
module tb_dc_encoder;
  localparam int NCH = 3, L = 32;
  logic clk = 0, rst_n = 0, in_valid = 0;
  logic [NCH*L-1:0] taps = '0;
  logic valid, raw_bit, no_edge;
  int checks = 0, failures = 0;

  dc_encoder #(.NCH(NCH), .L(L)) dut (.clk, .rst_n, .in_valid, .taps, .valid, .raw_bit, .no_edge);
  always #5 clk = ~clk;

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 500; n++) begin
      int c, p, q;
      bit v, none;
      none = ($urandom % 10) == 0;
      c = $urandom % NCH;
      p = 1 + $urandom % (L - 3);
      for (int k = 0; k < NCH; k++) begin
        v = 1'($urandom);
        for (int j = 0; j < L; j++) taps[k*L + j] = v;
        if (k == c && !none) for (int j = p + 1; j < L; j++) taps[k*L + j] = ~v;
      end
      // a bubble in chain c, at least 3 taps away from the edge, not at an end
      do q = 1 + $urandom % (L - 2); while (q >= p - 2 && q <= p + 3);
      if (!none) taps[c*L + q] = ~taps[c*L + q];
      @(negedge clk); in_valid = 1;
      @(negedge clk); in_valid = 0;
      checks++;
      if (!valid) begin failures++; $display("FAIL latency"); end
      checks++;
      if (none) begin
        if (!no_edge || raw_bit) begin failures++; $display("FAIL no-edge code"); end
      end else if (no_edge || raw_bit != p[0]) begin
        failures++; $display("FAIL chain %0d edge %0d bubble %0d: bit %b", c, p, q, raw_bit);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
