// tb_osc_bank: checks the oscillator-cell model. RO bank: the selected cell
// toggles with its own half period (measured edge to edge) only while
// triggered, and rests at 0 otherwise. TERO bank: after each trigger the
// selected cell makes n_osc(sel)..n_osc(sel)+JIT rising edges and then
// stops. Expected values use the same characteristic formulas as the
// model's documentation.
module tb_osc_bank;
  logic trig_r = 0, trig_t = 0;
  logic [6:0] sel = '0;
  logic out_r, out_t;
  int checks = 0, failures = 0, edges = 0;

  osc_bank #(.N(128), .MODE(1'b0), .SEED(3)) u_ro   (.trig(trig_r), .sel, .out(out_r));
  osc_bank #(.N(128), .MODE(1'b1), .SEED(1)) u_tero (.trig(trig_t), .sel, .out(out_t));

  function automatic int hp(int i, int seed);  return 400 + ((i * 37 + seed * 11) % 64) * 2; endfunction
  function automatic int nosc(int i, int seed); return 300 + ((i * 53 + seed * 7) % 256); endfunction

  always @(posedge out_t) edges++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s sel=%0d", what, sel); end
  endtask

  initial begin
    #50000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 10; n++) begin
      time t0, t1;
      sel = 7'($urandom);
      #100 trig_r = 1;
      @(posedge out_r); t0 = $time;
      repeat (10) @(posedge out_r);
      t1 = $time;
      check(int'(t1 - t0) >= 20 * hp(sel, 3) && int'(t1 - t0) <= 20 * (hp(sel, 3) + 3), "RO period");
      trig_r = 0;
      #2000;
      check(out_r == 0, "RO rests when disabled");
      edges = 0;
      trig_t = 1;
      #((nosc(sel, 1) + 10) * 2 * (hp(sel, 1) + 4));
      check(edges >= nosc(sel, 1) && edges <= nosc(sel, 1) + 3, "TERO oscillation count");
      trig_t = 0;
      #100;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
