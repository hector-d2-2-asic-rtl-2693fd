// tb_puf_ssi: the testbench is both host and PUF core. The host sends a
// control word (PUF_mode, N) and N random data words; the register must
// hold them and start_process must pulse once with PUF_mode. The fake core
// raises done a while later with a random 128-bit result; the answer must
// be the status word followed by N words: the register with its low 128
// bits replaced by the result. Also checks a control word with N = 0.
module tb_puf_ssi;
  logic clk = 0, rst_n = 0, rx = 0, tx, start_process;
  logic [7:0] puf_mode;
  logic [1023:0] reg_data;
  logic core_done = 1;
  logic [127:0] core_result = '0;
  logic [31:0] puf_status;
  int checks = 0, failures = 0, nstart = 0;

  puf_ssi dut (.clk, .rst_n, .ssi_rx(rx), .ssi_tx(tx), .puf_mode, .start_process, .reg_data,
               .core_done, .core_result, .puf_status);

  always #10 clk = ~clk;
  always @(posedge clk) if (start_process) begin
    nstart++;
    fork begin
      @(negedge clk); core_done = 0;
      repeat (50) @(negedge clk);
      core_result = {$urandom, $urandom, $urandom, $urandom};
      core_done = 1;
    end join_none
  end
  assign puf_status = {24'h5a5a5a, 6'b0, 1'b0, core_done};

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic send_word(input logic [63:0] w);
    @(negedge clk); rx = 1;
    for (int b = 63; b >= 0; b--) begin @(negedge clk); rx = w[b]; end
    @(negedge clk); rx = 0;
  endtask

  task automatic recv_word(output logic [63:0] w);
    int t = 0;
    @(posedge clk); #1;
    while (tx != 1'b1 && t < 100000) begin @(posedge clk); #1; t++; end
    for (int b = 63; b >= 0; b--) begin @(posedge clk); #1; w[b] = tx; end
  endtask

  initial begin
    #100000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [63:0] w, words[16];
    logic [1023:0] expv;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int run = 0; run < 3; run++) begin
      int n;
      n = (run == 2) ? 0 : 3 + run * 13;   // 3, 16, 0 words
      nstart = 0;
      expv = reg_data;
      send_word({8'(8'h40 + run), 51'b0, 5'(n)});
      for (int i = 0; i < n; i++) begin
        words[i] = {$urandom, $urandom};
        expv[64*i +: 64] = words[i];
        send_word(words[i]);
      end
      @(negedge clk);
      check(nstart == 1 && puf_mode == 8'(8'h40 + run), "start_process with PUF_mode");
      check(reg_data == expv, "register holds the data words");
      recv_word(w);
      check(w == {32'b0, 24'h5a5a5a, 8'h01}, "status word first");
      expv[127:0] = core_result;
      for (int i = 0; i < n; i++) begin
        recv_word(w);
        check(w == expv[64*i +: 64], "data word returned");
      end
      repeat (5) @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
