// tb_parity_filter: feeds random raw bits with random gaps and checks every
// output bit against the XOR of the corresponding group of N = 4 inputs,
// and that one output comes per 4 inputs.
module tb_parity_filter;
  logic clk = 0, rst_n = 0, in_valid = 0, in_bit = 0, out_valid, out_bit;
  int checks = 0, failures = 0, nin = 0, nout = 0;
  bit acc = 0;
  bit exp_q[$];

  parity_filter #(.N(4)) dut (.clk, .rst_n, .in_valid, .in_bit, .out_valid, .out_bit);
  always #5 clk = ~clk;

  always @(posedge clk) begin
    if (in_valid) begin
      acc ^= in_bit; nin++;
      if (nin % 4 == 0) begin exp_q.push_back(acc); acc = 0; end
    end
    if (out_valid) begin
      checks++; nout++;
      if (exp_q.size() == 0 || out_bit != exp_q.pop_front()) begin failures++; $display("FAIL parity %0d", nout); end
    end
  end

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (2000) begin
      @(negedge clk); in_valid = 1'($urandom); in_bit = 1'($urandom);
    end
    @(negedge clk); in_valid = 0;
    repeat (3) @(posedge clk);
    checks++;
    if (nout != nin / 4) begin failures++; $display("FAIL %0d outputs for %0d inputs", nout, nin); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
