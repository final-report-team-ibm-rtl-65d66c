// tb_kbd_loader - stores a short list of set-1 codes in the loader, presses
// start and plays the keyboard receiver and the processor: a code injected by
// the loader makes the model busy, the model acknowledges it some cycles
// later and then goes idle.  Checks that the codes arrive in order, one at a
// time, never while the receiver is busy, that the loader waits GAP_CYCLES
// after each acknowledge, and that it stops after num_keys codes.
// The expected values are worked out here from the behaviour of the PC part
// described above; the stimulus, the random choices and the sizes are this
// testbench's own.
module tb_kbd_loader;
  localparam int unsigned DEPTH = 16, GAP = 30;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic rst = 1'b1, start = 1'b0, kbd_busy = 1'b0, ack = 1'b0, prog_we = 1'b0;
  logic [4:0] num_keys = '0;
  logic inj_stb, active;
  logic [7:0] inj_code, prog_data = '0;
  logic [3:0] prog_addr = '0;
  int checks = 0, failures = 0;

  kbd_loader #(.DEPTH(DEPTH), .GAP_CYCLES(GAP)) dut (.*);

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  logic [7:0] codes [5] = '{8'h1E, 8'h9E, 8'h30, 8'hB0, 8'h1C};
  logic [7:0] got [$];
  int unsigned now = 0, ack_time = 0, min_gap = 1000000;
  always_ff @(posedge clk) now <= now + 1;

  // receiver + processor model
  initial begin
    forever begin
      @(posedge clk);
      if (inj_stb && !rst) begin
        check(!kbd_busy, "no injection while busy");
        if (ack_time != 0 && now - ack_time < min_gap) min_gap = now - ack_time;
        got.push_back(inj_code);
        #1 kbd_busy = 1;
        repeat (25) @(posedge clk);
        #1 ack = 1; ack_time = now;
        repeat (4) @(posedge clk);
        #1 ack = 0; kbd_busy = 0;
      end
    end
  end

  initial begin
    repeat (3) @(posedge clk); #1 rst = 0;
    for (int i = 0; i < 5; i++) begin
      @(posedge clk); #1 prog_we = 1; prog_addr = 4'(i); prog_data = codes[i];
    end
    @(posedge clk); #1 prog_we = 0; num_keys = 5'd5;
    check(!active, "idle before start");
    @(posedge clk); #1 start = 1; @(posedge clk); #1 start = 0;
    @(posedge clk); check(active, "active after start");
    wait (!active);
    repeat (200) @(posedge clk);
    check(got.size() == 5, $sformatf("%0d codes sent", got.size()));
    for (int i = 0; i < 5 && i < got.size(); i++)
      check(got[i] == codes[i], $sformatf("code %0d: %h", i, got[i]));
    check(min_gap >= GAP, $sformatf("gap after acknowledge %0d cycles", min_gap));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
