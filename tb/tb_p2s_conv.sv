// tb_p2s_conv: sends random bytes back to back through the converter and
// decodes the serial line here: every frame must be start 0, the eight bits
// LSB first, stop 1, ten clocks per byte, and the line must idle at 1.
module tb_p2s_conv;
  logic clk = 0, rst_n = 0, load = 0, ready, sout;
  logic [7:0] din;
  int checks = 0, failures = 0;
  byte unsigned sent[$];

  p2s_conv dut (.clk, .rst_n, .din, .load, .ready, .sout);
  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Receiver: wait for a start bit, then take 8 data bits and the stop bit.
  initial begin
    logic [7:0] r;
    forever begin
      @(posedge clk); #1;
      if (rst_n && sout == 1'b0) begin
        for (int i = 0; i < 8; i++) begin @(posedge clk); #1; r[i] = sout; end
        @(posedge clk); #1;
        checks++;
        if (sent.size() == 0 || r != sent[0] || sout != 1'b1) begin
          failures++; $display("FAIL frame %h stop %b", r, sout);
        end
        if (sent.size() != 0) void'(sent.pop_front());
      end
    end
  end

  initial begin
    time ts, te;
    int nb;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (3) @(posedge clk);
    #1 checks++; if (sout != 1'b1) begin failures++; $display("FAIL idle level"); end
    nb = 0;
    for (int n = 0; n < 50; n++) begin
      @(negedge clk);
      while (!ready) @(negedge clk);
      if (n == 0) ts = $time;
      te = $time;
      din = 8'($urandom); load = 1; sent.push_back(din);
      @(negedge clk); load = 0;
      nb++;
    end
    repeat (20) @(posedge clk);
    checks++;
    if (te - ts != 49 * 10 * 10) begin failures++; $display("FAIL rate: %0t for 49 bytes", te - ts); end
    checks++;
    if (sent.size() != 0) begin failures++; $display("FAIL %0d bytes not received", sent.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
