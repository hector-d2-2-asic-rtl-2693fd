// tb_ssi_slave: the testbench acts as the host. Each frame sends a start bit
// and a random 64-bit control word MSB first while reading the status word
// on the falling edges; the control word must arrive intact with one
// ctrl_valid pulse, and the status read must equal the status offered when
// the frame started.
module tb_ssi_slave;
  logic sclk = 0, rst_n = 0, rx = 0, tx, ctrl_valid;
  logic [63:0] status, ctrl;
  int checks = 0, failures = 0, nvalid = 0;

  ssi_slave #(.W(64)) dut (.sclk, .rst_n, .rx, .tx, .status, .ctrl, .ctrl_valid);
  always #20 sclk = ~sclk;
  always @(posedge sclk) if (rst_n && ctrl_valid) nvalid++;

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [63:0] c, got, st;
    repeat (3) @(posedge sclk);
    rst_n = 1;
    for (int n = 0; n < 30; n++) begin
      c = {$urandom, $urandom};
      st = {$urandom, $urandom};
      @(negedge sclk); status = st; rx = 1;            // start bit
      for (int b = 63; b >= 0; b--) begin
        @(negedge sclk); rx = c[b];
        got[b] = tx;
      end
      @(negedge sclk); rx = 0; status = '0;
      repeat (1 + $urandom % 5) @(negedge sclk);
      checks += 2;
      if (ctrl != c || nvalid != n + 1) begin failures++; $display("FAIL control word %h vs %h", ctrl, c); end
      if (got != st) begin failures++; $display("FAIL status %h vs %h", got, st); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
