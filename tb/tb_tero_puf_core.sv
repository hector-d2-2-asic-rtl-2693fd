// tb_tero_puf_core: the testbench plays the 128 TERO cells: when `ctrl`
// rises it sends nA(sel_a) pulses on osc_a and nB(sel_b) on osc_b, numbers
// given by fixed formulas of the cell index. Runs one response with the
// default pairing and one with challenge-selected B cells, and checks all
// 128 response bits ({A > B, bit 1 of |A - B|} per pair, pair 0 first) and
// the duration of NPAIR * (T_ACT + 7) cycles.
module tb_tero_puf_core;
  localparam int NPAIR = 64, T_ACT = 50;
  logic clk = 0, rst_n = 0, start = 0, use_chal = 0;
  logic [6*NPAIR-1:0] chal = '0;
  logic osc_a = 0, osc_b = 0;
  logic [5:0] sel_a, sel_b;
  logic ctrl, busy, done;
  logic [2*NPAIR-1:0] response;
  int checks = 0, failures = 0;

  tero_puf_core #(.NPAIR(NPAIR), .T_ACT(T_ACT)) dut (.clk, .rst_n, .start, .use_chal, .chal,
    .osc_a, .osc_b, .sel_a, .sel_b, .ctrl, .busy, .done, .response);

  always #10 clk = ~clk;

  function automatic int na(int s); return 300 + (s * 29) % 200; endfunction
  function automatic int nb(int s); return 310 + (s * 31) % 190; endfunction

  always @(posedge ctrl) begin
    fork
      begin automatic int n = na(sel_a); repeat (n) begin #1 osc_a = 1; #1 osc_a = 0; end end
      begin automatic int n = nb(sel_b); repeat (n) begin #1 osc_b = 1; #1 osc_b = 0; end end
    join_none
  end

  initial begin
    #100000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int perm[NPAIR];
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < NPAIR; i++) perm[i] = i;
    perm.shuffle();
    for (int i = 0; i < NPAIR; i++) chal[6*i +: 6] = 6'(perm[i]);
    for (int run = 0; run < 2; run++) begin
      int cyc;
      logic [2*NPAIR-1:0] expv;
      use_chal = (run == 1);
      @(negedge clk); start = 1;
      @(negedge clk); start = 0;
      cyc = 1;
      while (!done) begin @(negedge clk); cyc++; end
      for (int i = 0; i < NPAIR; i++) begin
        int a, b, m;
        a = na(i);
        b = nb(use_chal ? perm[i] : i);
        m = (a > b) ? a - b : b - a;
        expv[2*(NPAIR-1-i) +: 2] = {a > b, 1'(m >> 1)};
      end
      checks++;
      if (response != expv) begin failures++; $display("FAIL response %h expected %h", response, expv); end
      checks++;
      if (cyc < NPAIR * (T_ACT + 7) || cyc > NPAIR * (T_ACT + 7) + 3) begin
        failures++; $display("FAIL took %0d cycles", cyc);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
