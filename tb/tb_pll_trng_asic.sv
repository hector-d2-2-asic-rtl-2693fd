// tb_pll_trng_asic: self-checking test of the ASIC PLL TRNG datapath.
// The sampled clock is driven as data synchronous to the sampling clock:
// constant 1 (each window must count KD-1 ones), constant 0 (count 0),
// a toggle every cycle (count within one of (KD-1)/2) and a random
// stream, where each window is compared with a sum of the driven bits.
// The strobe period must be exactly KD cycles.
module tb_pll_trng_asic;
  logic clk = 0, rst_n = 0, jit = 0;
  logic [11:0] kd, data;
  logic strobe;
  int checks = 0, failures = 0;
  int cyc = 0, last_strobe = -1;
  int mode = 0;
  bit hist[$];

  pll_trng_asic dut (.clk, .rst_n, .jit_clk(jit), .kd, .data, .strobe);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at cycle %0d", what, cyc); end
  endtask

  always @(posedge clk) begin
    cyc++;
    if (rst_n) hist.push_back(jit);
  end

  always @(negedge clk) begin
    case (mode)
      0: jit <= 1'b1;
      1: jit <= 1'b0;
      2: jit <= ~jit;
      default: jit <= 1'($urandom);
    endcase
  end

  // Expected count of a window: the KD-1 samples that entered DFF1 from
  // KD+3 down to 5 entries of the history before the edge at which strobe is seen.
  function automatic int expected_count();
    int s = 0;
    int n = hist.size();
    int k = int'(kd);
    for (int i = n - k - 3; i <= n - 5; i++) if (i >= 0 && hist[i]) s++;
    return s;
  endfunction

  int windows;
  always @(posedge clk) begin
    if (strobe && rst_n) begin
      if (last_strobe >= 0) begin
        check(cyc - last_strobe == int'(kd), "strobe period");
        windows++;
        if (windows > 2) begin
          case (mode)
            0: check(data == kd - 1, "constant one count");
            1: check(data == 0, "constant zero count");
            2: check((int'(data) - int'((kd - 1) / 2)) inside {[-1:1]}, "toggle count");
            default: check(int'(data) == expected_count(), "random stream count");
          endcase
        end
      end
      last_strobe = cyc;
    end
  end

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    kd = 12'd50;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int m = 0; m < 4; m++) begin
      mode = m; windows = 0; last_strobe = -1;
      kd = (m == 3) ? 12'd37 : 12'd50;
      wait (windows == 12);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
