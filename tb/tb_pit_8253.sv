// tb_pit_8253 - programs the three counters as the PC does (square wave,
// rate generator, interrupt on terminal count) and measures OUT in counter
// ticks: a mode 3 period of N ticks split ceil(N/2)/floor(N/2), a mode 2
// period of N ticks with one low tick, a mode 0 time-out of N ticks after the
// load tick, GATE pausing and restarting, and the count latch read back LSB
// then MSB.  The BIOS divisors 65536 and 1331 and random counts in modes 2
// and 3 are measured too.
// The expected values are worked out here from the behaviour of the PC part
// described above; the stimulus, the random choices and the sizes are this
// testbench's own.
module tb_pit_8253;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic rst = 1'b1, tick = 1'b0, cs = 1'b0, wr = 1'b0, rd = 1'b0;
  logic [1:0] a = '0;
  logic [7:0] din = '0, dout;
  logic [2:0] gate = 3'b111, out;
  int checks = 0, failures = 0;

  pit_8253 dut (.*);

  // tick every 4 board cycles
  int unsigned tdiv = 0, ticks = 0;
  always_ff @(posedge clk) begin
    tdiv <= tdiv + 1;
    tick <= (tdiv[1:0] == 2'd2);
    if (tick) ticks <= ticks + 1;
  end

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic write(input logic [1:0] ad, input logic [7:0] d);
    @(posedge clk); #1 cs = 1; a = ad; din = d; wr = 1;
    @(posedge clk); #1 cs = 0; wr = 0;
  endtask

  task automatic read(input logic [1:0] ad, output logic [7:0] d);
    @(posedge clk); #1 cs = 1; a = ad; #1 d = dout; rd = 1;
    @(posedge clk); #1 cs = 0; rd = 0;
  endtask

  // ticks spent high and low over one full period of OUT[i]
  task automatic measure(input int i, output int hi, output int lo);
    int unsigned t0, t1;
    @(posedge out[i]); t0 = ticks;
    @(negedge out[i]); t1 = ticks; hi = int'(t1 - t0);
    @(posedge out[i]); lo = int'(ticks - t1);
  endtask

  int hi, lo, n;
  logic [7:0] b0, b1;
  int unsigned t0;
  initial begin
    repeat (4) @(posedge clk); #1 rst = 0;
    // counter 0, mode 3, LSB+MSB, N = 10
    write(3, 8'h36); write(0, 8'd10); write(0, 8'd0);
    measure(0, hi, lo);
    check(hi == 5 && lo == 5, $sformatf("mode 3 N=10: %0d/%0d", hi, lo));
    // odd count N = 7
    write(3, 8'h36); write(0, 8'd7); write(0, 8'd0);
    measure(0, hi, lo); measure(0, hi, lo);
    check(hi == 4 && lo == 3, $sformatf("mode 3 N=7: %0d/%0d", hi, lo));
    // counter 1, mode 2, LSB only, N = 18
    write(3, 8'h54); write(1, 8'd18);
    measure(1, hi, lo);
    check(hi == 17 && lo == 1, $sformatf("mode 2 N=18: %0d/%0d", hi, lo));
    // counter 2, mode 0, N = 50
    write(3, 8'hB0);
    @(posedge clk); check(out[2] == 1'b0, "mode 0 OUT low after mode write");
    write(2, 8'd50); write(2, 8'd0);
    t0 = ticks;
    @(posedge out[2]);
    check(ticks - t0 >= 50 && ticks - t0 <= 52, $sformatf("mode 0 N=50 took %0d ticks", ticks - t0));
    // GATE low pauses mode 0
    write(3, 8'hB0); write(2, 8'd40); write(2, 8'd0);
    repeat (40) @(posedge clk);
    #1 gate[2] = 0; repeat (200) @(posedge clk);
    check(out[2] == 1'b0, "mode 0 paused by GATE");
    #1 gate[2] = 1; t0 = ticks;
    @(posedge out[2]);
    check(ticks - t0 < 40, "mode 0 finishes after GATE returns");
    // gate low forces mode 3 high
    #1 gate[0] = 0; repeat (60) @(posedge clk);
    check(out[0] == 1'b1, "mode 3 OUT held high with GATE low");
    #1 gate[0] = 1;
    // latch counter 1 (mode 2, N=18 LSB only) and read it: 1..18
    write(3, 8'h70); write(1, 8'd0); write(1, 8'h03);   // counter 1, mode 0, N = 0x300
    repeat (40) @(posedge clk);
    write(3, 8'h40);                                      // latch counter 1
    repeat (100) @(posedge clk);
    read(1, b0); read(1, b1);
    check({b1, b0} < 16'h0300 && {b1, b0} > 16'h02F0, $sformatf("latched count %h", {b1, b0}));
    // the BIOS divisors: 65536 (written as 0) for the time of day, 1331 for the beep
    write(3, 8'h36); write(0, 8'd0); write(0, 8'd0);
    measure(0, hi, lo); measure(0, hi, lo);
    check(hi == 32768 && lo == 32768, $sformatf("mode 3 N=65536: %0d/%0d", hi, lo));
    write(3, 8'hB6); write(2, 8'(1331 % 256)); write(2, 8'(1331 / 256));
    measure(2, hi, lo); measure(2, hi, lo);
    check(hi == 666 && lo == 665, $sformatf("mode 3 N=1331: %0d/%0d", hi, lo));
    // random counts in modes 3 and 2
    for (int k = 0; k < 8; k++) begin
      n = $urandom_range(3, 400);
      write(3, 8'h36); write(0, 8'(n % 256)); write(0, 8'(n / 256));
      measure(0, hi, lo); measure(0, hi, lo);
      check(hi == (n + 1) / 2 && lo == n / 2, $sformatf("mode 3 N=%0d: %0d/%0d", n, hi, lo));
      n = $urandom_range(3, 255);
      write(3, 8'h54); write(1, 8'(n));
      measure(1, hi, lo); measure(1, hi, lo);
      check(hi == n - 1 && lo == 1, $sformatf("mode 2 N=%0d: %0d/%0d", n, hi, lo));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
