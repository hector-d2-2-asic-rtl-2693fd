// tb_asic_cmd_rx: sends random 88-bit commands MSB first through the
// serial input, raises config_rdy (sometimes for several cycles) and checks
// that each command is latched once and exactly.
module tb_asic_cmd_rx;
  localparam int W = hector_pkg::CMD_W;
  logic clk = 0, rst_n = 0, ser = 0, rdy = 0;
  logic [W-1:0] cmd, sent;
  logic cmd_valid;
  int checks = 0, failures = 0, nvalid = 0;

  asic_cmd_rx dut (.clk, .rst_n, .config_serial(ser), .config_rdy(rdy), .cmd, .cmd_valid);

  always #5 clk = ~clk;
  always @(posedge clk) if (rst_n && cmd_valid) nvalid++;

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
    for (int n = 0; n < 40; n++) begin
      for (int w = 0; w < W; w += 32) sent[w +: 32] = $urandom;
      for (int b = W - 1; b >= 0; b--) begin
        @(negedge clk); ser = sent[b];
      end
      @(negedge clk); ser = 1'($urandom); rdy = 1;
      repeat ($urandom % 4) @(negedge clk);
      @(negedge clk); rdy = 0;
      @(negedge clk);
      checks++;
      if (cmd !== sent || nvalid != n + 1) begin
        failures++;
        $display("FAIL command %0d: got %h expected %h, %0d loads", n, cmd, sent, nvalid);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
