// tb_arpeggio - the motherboard playing the arpeggio sound demo.
//
// The demo steps the speaker through tones from 440 Hz up to 1000 Hz in
// 5 Hz steps and back down again.  This testbench plays it the way a BASIC
// SOUND statement does on a PC: for each tone it writes the divisor
// round(1193182 / f) to 8253 counter 2 (mode 3, LSB then MSB through port
// 42h) with the speaker enabled by PB0 (timer gate) and PB1 (speaker data)
// of the 8255.  It then measures one full period of the top's speaker
// output and checks two things:
//   - the period is exactly divisor x 84 board cycles, the counter clock
//     being PCLK / 2 (one tick per 84 cycles of the 100 MHz clock);
//   - the frequency heard is within 0.5 % of the wanted tone (the 100 MHz
//     board clock makes the counter clock 1.19048 MHz, 0.23 % below a
//     real PC's 1.19318 MHz).
// The whole upward sweep (113 tones) is played and every tenth tone of the
// downward sweep.  Each tone is held only long enough to measure it, not
// for the demo's 27.5 ms, since tone length is kept by software.
//
// The other two ways of driving the speaker are checked at the end:
// gating the timer off with PB0 while PB1 is pulsed by hand gives exactly
// one speaker pulse per PB1 pulse, and clearing PB1 silences the tone.
//
// The processor is played by the testbench with byte I/O requests on the
// core port, so every access runs through the real bus interface, 8288,
// decoding and wait-state logic.  All top parameters are at their defaults.
module tb_arpeggio;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  // ---------------- top ports
  logic        pwr_good = 1'b0;
  logic        core_req = 0, core_io = 0, core_we = 0, core_word = 0, core_code = 0, core_inta = 0;
  logic [19:0] core_addr = '0;
  logic [15:0] core_wdata = '0;
  logic        core_fetch = 1'b1, core_lock_n = 1'b1;
  logic [15:0] core_rdata;
  logic        core_done, core_halt, core_intr, core_nmi, sys_reset;
  logic        rom_load_we = 0, font_we = 0, kl_prog_we = 0, kl_start = 0, kl_active;
  logic [15:0] rom_load_addr = '0;
  logic [7:0]  rom_load_data = '0, font_data = '0, kl_prog_data = '0;
  logic [11:0] font_addr = '0, kl_prog_addr = '0;
  logic [12:0] kl_num_keys = '0;
  logic        ps2_clk = 1'b1, ps2_data = 1'b1;
  logic [7:0]  sw1 = 8'hFF, sw2 = 8'hFF;
  logic        np_npi = 1'b0, speaker, motor_off, cass_data_in = 1'b0, lpen_stb = 1'b0;
  logic [1:0]  vga_r, vga_g, vga_b;
  logic        vga_hs_n, vga_vs_n;
  logic [19:0] ch_addr;
  logic [7:0]  ch_data_out;
  logic [7:0]  ch_data_in = 8'hFF;
  pc_pkg::bus_cmd_t ch_cmd;
  logic        ch_aen, ch_ale, ch_reset_drv, ch_clk, ch_osc;
  logic [7:2]  ch_irq = '0;
  logic [3:1]  ch_drq = '0;
  logic [3:0]  ch_dack_n;
  logic        ch_tc, ch_io_ch_rdy = 1'b1, ch_io_ch_ck_n = 1'b1;

  ibm5150_top dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // ---------------- speaker edge counter and time base
  longint unsigned now = 0;
  int unsigned n_edges = 0;
  logic spk_q = 1'b0;
  always @(posedge clk) begin
    now   <= now + 1;
    spk_q <= speaker;
    if (speaker && !spk_q) n_edges <= n_edges + 1;
  end

  // ---------------- processor model: byte I/O writes
  task automatic outb(input logic [15:0] port, input logic [7:0] d);
    @(posedge clk); #1;
    core_io = 1'b1; core_we = 1'b1; core_word = 1'b0; core_inta = 1'b0; core_code = 1'b0;
    core_addr = {4'h0, port}; core_wdata = {8'h00, d}; core_req = 1'b1;
    do @(posedge clk); while (!core_done);
    #1 core_req = 1'b0;
  endtask

  // time of the next rising speaker edge
  task automatic next_rise(output longint unsigned t);
    do @(posedge clk); while (!(speaker && !spk_q));
    t = now;
  endtask

  int n_tones = 0;
  task automatic play(input int f);
    int unsigned div;
    longint unsigned t1, t2, period;
    real heard;
    div = (1193182 + f / 2) / f;
    outb(16'h42, div[7:0]);
    outb(16'h42, div[15:8]);
    repeat (100) @(posedge clk);       // the new count is taken at the next counter tick
    next_rise(t1);
    next_rise(t2);
    period = t2 - t1;
    heard  = 100.0e6 / real'(period);
    check(period == longint'(div) * 84,
          $sformatf("%0d Hz: period %0d cycles, expected %0d", f, period, div * 84));
    check(heard > real'(f) * 0.995 && heard < real'(f) * 1.005,
          $sformatf("%0d Hz: heard %f Hz", f, heard));
    n_tones++;
  endtask

  int unsigned e0;
  initial begin
    #1 pwr_good = 1'b1;
    wait (!sys_reset);
    repeat (100) @(posedge clk);

    outb(16'h63, 8'h99);          // 8255 mode as the BIOS sets it
    outb(16'h43, 8'hB6);          // counter 2: LSB then MSB, mode 3, binary
    outb(16'h61, 8'h03);          // PB0 timer gate and PB1 speaker data on

    for (int f = 440; f <= 1000; f += 5) play(f);
    for (int f = 1000; f >= 440; f -= 50) play(f);
    check(n_tones == 113 + 12, $sformatf("tones played %0d", n_tones));

    // pulse train from the 8255 alone: timer gated off, PB1 toggled by hand
    outb(16'h61, 8'h00);
    repeat (1000) @(posedge clk);
    e0 = n_edges;
    for (int i = 0; i < 5; i++) begin
      outb(16'h61, 8'h02);
      repeat (200) @(posedge clk);
      outb(16'h61, 8'h00);
      repeat (200) @(posedge clk);
    end
    check(n_edges - e0 == 5, $sformatf("hand pulses %0d", n_edges - e0));

    // timer running but speaker data off: silence
    outb(16'h61, 8'h01);
    e0 = n_edges;
    repeat (300000) @(posedge clk);
    check(n_edges == e0, "speaker silent with PB1 low");

    $display("tones=%0d speaker_edges=%0d", n_tones, n_edges);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
