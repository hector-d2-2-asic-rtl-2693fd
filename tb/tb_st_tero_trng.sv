// tb_st_tero_trng: self-checking testbench of the TERO TRNG test chip,
// driven only through its SPI pins. For every TERO instance it writes and
// reads back the control register, starts the core with several delay
// settings, polls the status register until the core has stopped and then
// checks: exactly one of stopl/stopr is set; the counter stop value lies in
// the range the core model can produce for that setting; the random bit in
// the status register is the parity of the counter value; clearing
// tero_start clears the status. Across all runs both stop states and both
// parities must occur. Also checks that writes to one instance leave the
// others alone and that unused addresses read 0.
// SPI: mode 0, 100 ns half period; system clock 100 MHz.
module tb_st_tero_trng;

  localparam int NT = 6;

  logic clk = 1'b0, nrst = 1'b1;
  logic spi_clk = 1'b0, spi_mosi = 1'b0, spi_ss_n = 1'b1;
  logic spi_miso;

  int checks = 0, failures = 0;
  int n_l = 0, n_r = 0, n_odd = 0, n_even = 0;

  st_tero_trng dut (.*);

  always #5000 clk = ~clk;

  initial begin
    #200000000000;
    $display("FAIL watchdog");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  task automatic spi(input bit w, input logic [6:0] a, input logic [15:0] d,
                     output logic [15:0] q);
    logic [23:0] f;
    f = {w, a, d};
    q = '0;
    spi_ss_n = 1'b0;
    #200000;
    for (int i = 23; i >= 0; i--) begin
      spi_mosi = f[i];
      #100000;
      spi_clk = 1'b1;
      if (i < 16) q = {q[14:0], spi_miso};
      #100000;
      spi_clk = 1'b0;
    end
    #200000;
    spi_ss_n = 1'b1;
    #200000;
  endtask

  task automatic wr(input int a, input logic [15:0] d);
    logic [15:0] q;
    spi(1'b1, 7'(a), d, q);
  endtask

  task automatic rd(input int a, output logic [15:0] q);
    spi(1'b0, 7'(a), 16'h0, q);
  endtask

  logic [15:0] q, sr, cn;
  int base, tries;

  initial begin
    #1 nrst = 1'b0;   // power-on reset pulse
    #100000 nrst = 1'b1;
    #100000;

    // Register access and independence of the instances.
    for (int x = 0; x < NT; x++) wr(4 * x, 16'(6'h3C ^ x));
    for (int x = 0; x < NT; x++) begin
      rd(4 * x, q);
      check(q == 16'(6'h3C ^ 6'(x)), "CR read back");
    end
    rd(4 * NT, q);     check(q == 16'h0, "unused address reads 0");
    rd(3, q);          check(q == 16'h0, "reserved register reads 0");
    for (int x = 0; x < NT; x++) wr(4 * x, 16'h0);

    for (int x = 0; x < NT; x++) begin
      for (int r = 0; r < 6; r++) begin
        int adj;
        adj = (r * 5 + x) % 16;
        base = 100 + 50 * x + 40 * adj;
        wr(4 * x, 16'({adj[3:0], 2'b01}));        // enable, not started
        rd(4 * x + 1, sr);
        check(sr[1:0] == 2'b00, "status clear before start");
        wr(4 * x, 16'({adj[3:0], 2'b11}));        // start
        tries = 0;
        do begin
          rd(4 * x + 1, sr);
          tries++;
        end while (sr[1:0] == 2'b00 && tries < 50);
        check(sr[1:0] == 2'b01 || sr[1:0] == 2'b10, "exactly one stop state");
        rd(4 * x + 2, cn);
        check(int'(cn) >= base && int'(cn) <= base + 63, "counter stop value in range");
        check(sr[2] == ^cn, "random bit is counter parity");
        if (sr[0]) n_l++;
        if (sr[1]) n_r++;
        if (cn[0]) n_odd++; else n_even++;
        wr(4 * x, 16'({adj[3:0], 2'b01}));        // stop: clears status
        rd(4 * x + 1, sr);
        check(sr[1:0] == 2'b00, "status cleared by tero_start = 0");
      end
      wr(4 * x, 16'h0);
    end

    check(n_l > 0 && n_r > 0, "both stop states occur");
    check(n_odd > 0 && n_even > 0, "both parities occur");
    $display("stopl=%0d stopr=%0d odd=%0d even=%0d", n_l, n_r, n_odd, n_even);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
