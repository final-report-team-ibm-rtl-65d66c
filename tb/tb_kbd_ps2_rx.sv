// tb_kbd_ps2_rx - sends PS/2 frames into the keyboard receiver as a keyboard
// would (clock period 40 board cycles, data changed while the clock is high)
// and checks the set-1 code in the latch and IRQ1: a make code, a release
// (F0 prefix gives bit 7 set), an E0-prefixed key, a frame with bad parity
// (dropped), a code that arrives while the latch is full (dropped), the
// acknowledge clearing IRQ1, an injected code from the loader, and recovery
// from a frame cut short.
// The expected values are worked out here from the behaviour of the PC part
// described above; the stimulus, the random choices and the sizes are this
// testbench's own.
module tb_kbd_ps2_rx;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic rst = 1'b1, ps2_clk = 1'b1, ps2_data = 1'b1, ack = 1'b0, inj_stb = 1'b0;
  logic [7:0] inj_code = '0, scan_code;
  logic irq, busy;
  int checks = 0, failures = 0;

  kbd_ps2_rx #(.FRAME_TIMEOUT(200)) dut (.*);

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic ps2_bit(input logic b);
    ps2_data = b; repeat (20) @(posedge clk);
    ps2_clk = 1'b0; repeat (20) @(posedge clk);
    ps2_clk = 1'b1;
  endtask

  task automatic send(input logic [7:0] c, input bit bad_parity = 0, input int nbits = 11);
    logic [10:0] fr;
    fr = {1'b1, ~(^c) ^ bad_parity, c, 1'b0};
    for (int i = 0; i < nbits; i++) ps2_bit(fr[i]);
    ps2_data = 1'b1;
    repeat (60) @(posedge clk);
  endtask

  task automatic do_ack();
    @(posedge clk); #1 ack = 1; repeat (3) @(posedge clk); #1 ack = 0;
    @(posedge clk);
  endtask

  initial begin
    repeat (5) @(posedge clk); #1 rst = 0;
    check(!irq && !busy, "idle after reset");
    send(8'h1C);                                  // 'A'
    check(irq && scan_code == 8'h1E, $sformatf("make A: %h", scan_code));
    send(8'h1B);                                  // arrives while full
    check(scan_code == 8'h1E, "code dropped while latch full");
    do_ack();
    check(!irq, "acknowledge clears IRQ1");
    send(8'hF0); check(!irq, "F0 alone gives no code");
    send(8'h1C);
    check(irq && scan_code == 8'h9E, $sformatf("break A: %h", scan_code));
    do_ack();
    send(8'hE0); send(8'h5A);                     // keypad Enter -> Enter
    check(irq && scan_code == 8'h1C, $sformatf("E0 5A: %h", scan_code));
    do_ack();
    send(8'h76, 1);                               // Esc with bad parity
    check(!irq, "bad parity frame dropped");
    send(8'h15, 0, 5);                            // cut short
    repeat (400) @(posedge clk);
    check(!busy, "timeout restarts the frame");
    send(8'h76);
    check(irq && scan_code == 8'h01, $sformatf("Esc: %h", scan_code));
    do_ack();
    @(posedge clk); #1 inj_stb = 1; inj_code = 8'h2C;
    @(posedge clk); #1 inj_stb = 0;
    @(posedge clk);
    check(irq && busy && scan_code == 8'h2C, "injected code latched");
    do_ack();
    check(!irq && !busy, "idle after last acknowledge");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
