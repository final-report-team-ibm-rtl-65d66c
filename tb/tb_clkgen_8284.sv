// tb_clkgen_8284 - checks the periods and duty cycles of CLK, PCLK, OSC and
// VCLK against 210/70 ns, 420/210 ns, 70/40 ns and 40/20 ns, the strobes, the
// READY sampling at CLK boundaries and the RESET release after PWR GOOD.
// The expected values are worked out here from the behaviour of the PC part
// described above; the stimulus, the random choices and the sizes are this
// testbench's own.
module tb_clkgen_8284;
  logic clk = 1'b0;
  always #5 clk = ~clk;   // 100 MHz

  logic pwr_good = 1'b0, rdy = 1'b1;
  logic clk88, clk88_rise, pclk, pclk_rise, osc, vclk, vclk_rise, ready, reset;
  int checks = 0, failures = 0;

  clkgen_8284 dut (.*);

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // measure period and high time of a signal in board cycles
  task automatic measure(input int which, output int period, output int high);
    int t_rise1, t_rise2, t_fall, n;
    logic prev, cur;
    n = 0; t_rise1 = -1; t_rise2 = -1; t_fall = -1;
    @(posedge clk); #1;
    prev = (which == 0) ? clk88 : (which == 1) ? pclk : (which == 2) ? osc : vclk;
    while (t_rise2 < 0 && n < 1000) begin
      @(posedge clk); #1;
      cur = (which == 0) ? clk88 : (which == 1) ? pclk : (which == 2) ? osc : vclk;
      if (cur && !prev) begin
        if (t_rise1 < 0) t_rise1 = n; else t_rise2 = n;
      end
      if (!cur && prev && t_rise1 >= 0 && t_fall < 0) t_fall = n;
      prev = cur; n++;
    end
    period = t_rise2 - t_rise1;
    high   = t_fall - t_rise1;
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int p, h, n_rise, n_prise, n_vrise;
    repeat (50) @(posedge clk);
    check(reset == 1'b1, "reset held while PWR GOOD low");
    pwr_good = 1'b1;
    // RESET released after RESET_HOLD CLK periods, at a CLK boundary
    n_rise = 0;
    while (reset) begin @(posedge clk); #1; if (clk88_rise) n_rise++; end
    check(n_rise >= 4 && n_rise <= 6, $sformatf("reset released after %0d CLK periods", n_rise));
    measure(0, p, h); check(p == 21 && h == 7,  $sformatf("CLK period %0d high %0d", p, h));
    measure(1, p, h); check(p == 42 && h == 21, $sformatf("PCLK period %0d high %0d", p, h));
    measure(2, p, h); check(p == 7 && h == 4,   $sformatf("OSC period %0d high %0d", p, h));
    measure(3, p, h); check(p == 4 && h == 2,   $sformatf("VCLK period %0d high %0d", p, h));
    // strobes: count over 840 board cycles = 40 CLK, 20 PCLK, 210 VCLK periods
    n_rise = 0; n_prise = 0; n_vrise = 0;
    repeat (840) begin
      @(posedge clk); #1;
      n_rise += int'(clk88_rise); n_prise += int'(pclk_rise); n_vrise += int'(vclk_rise);
    end
    check(n_rise == 40,  $sformatf("CLK strobes %0d", n_rise));
    check(n_prise == 20, $sformatf("PCLK strobes %0d", n_prise));
    check(n_vrise == 210, $sformatf("VCLK strobes %0d", n_vrise));
    // READY follows RDY only at a CLK boundary
    do begin @(posedge clk); #1; end while (!clk88_rise);
    @(posedge clk); #1;
    rdy = 1'b0;
    repeat (3) @(posedge clk); #1;
    check(ready == 1'b1, "READY unchanged inside a CLK period");
    do begin @(posedge clk); #1; end while (!clk88_rise);
    @(posedge clk); #1;
    check(ready == 1'b0, "READY low after the next CLK edge");
    rdy = 1'b1;
    // PWR GOOD low resets at once
    pwr_good = 1'b0; @(posedge clk); @(posedge clk); #1;
    check(reset == 1'b1, "reset on PWR GOOD low");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
