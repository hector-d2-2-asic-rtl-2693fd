// tb_tero_test_modules: triggers every one of the 128 TERO test cells and
// counts the rising edges on the LVDS output. Cells of the same block of 8
// must give the same count within the model's spread (3), and the 16 block
// counts must follow the block's configuration: 100 + (b*53 + 35) % 800.
module tb_tero_test_modules;
  logic ctrl = 0;
  logic [6:0] sel = '0;
  logic out;
  int checks = 0, failures = 0, edges = 0;

  tero_test_modules dut (.ctrl, .sel, .lvds_out(out));
  always @(posedge out) edges++;

  initial begin
    #900000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int c = 0; c < 128; c++) begin
      int exp_n;
      exp_n = 100 + ((c / 8) * 53 + 35) % 800;
      sel = 7'(c); edges = 0;
      #10 ctrl = 1;
      #((exp_n + 10) * 1060);
      ctrl = 0;
      checks++;
      if (edges < exp_n || edges > exp_n + 3) begin
        failures++; $display("FAIL cell %0d: %0d edges, expected %0d", c, edges, exp_n);
      end
      #50;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
