// tb_ibm5150_top - end-to-end test of the motherboard at its default sizes.
//
// The processor is played by this testbench: it issues byte, word and INTA
// requests on the core port the way a processor core would, one at a time,
// and services interrupts between them, so every access runs through the
// real bus interface, 8288 command timing, decoding and devices.  Around it
// sit a DMA card on channel 2 that supplies four bytes, a PS/2 keyboard that
// sends one key, the keystroke loader playing two stored keys, and an I/O
// channel check from a card.
//
// The run initialises the peripherals as the PC BIOS does (8255 = 99h, 8259
// with vector base 08h, 8253 counter 1 as the refresh timer driving DMA
// channel 0, counter 0 as the timer interrupt, counter 2 as the speaker tone)
// and then checks: RAM word write/read, a ROM read at FFFF0, one wait state
// on every I/O cycle, refresh DMA cycles and processor stalls while DMA owns
// the bus, a card DMA transfer through the page register into RAM with TC,
// timer interrupts with the right vector and period, keyboard interrupts
// with the right set-1 codes from both the PS/2 port and the loader, the NMI
// path, the switch inputs through ports A and C, the speaker frequency, and
// a full video frame with exactly one lit character cell.  Each mechanism is
// counted and a count of zero is a failure.
module tb_ibm5150_top;
  import pc_pkg::*;
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
  logic [7:0]  sw1 = 8'hA5, sw2 = 8'hF3;
  logic        np_npi = 1'b0, speaker, motor_off, cass_data_in = 1'b0, lpen_stb = 1'b0;
  logic [1:0]  vga_r, vga_g, vga_b;
  logic        vga_hs_n, vga_vs_n;
  logic [19:0] ch_addr;
  logic [7:0]  ch_data_out, ch_data_in;
  bus_cmd_t    ch_cmd;
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

  // ---------------- mechanism counters
  int unsigned now = 0, ce_count = 0;
  int n_io_wait = 0, n_refresh = 0, n_stall = 0, n_card_dma = 0, n_tc = 0;
  int n_timer_irq = 0, n_kbd_irq = 0, n_nmi = 0, n_spk_edges = 0, n_frames = 0;
  int spk_period = 0, timer_period = 0;
  int unsigned spk_last = 0, timer_last = 0;
  logic dack0_q = 1'b1, dack2_q = 1'b1, spk_q = 1'b0, vs_q = 1'b1, tc_q = 1'b0, nmi_q = 1'b0;
  int lit = 0, lit_frame [$];

  always @(posedge clk) begin
    now <= now + 1;
    if (dut.ce) begin
      ce_count <= ce_count + 1;
      if (!dut.rdy_wait && !dut.aen) n_io_wait <= n_io_wait + 1;
      if (core_req && core_halt && dut.hlda) n_stall <= n_stall + 1;
    end
    dack0_q <= ch_dack_n[0]; dack2_q <= ch_dack_n[2]; spk_q <= speaker; tc_q <= ch_tc;
    nmi_q <= core_nmi;
    if (!ch_dack_n[0] && dack0_q) n_refresh <= n_refresh + 1;
    if (ch_dack_n[2] && !dack2_q) n_card_dma <= n_card_dma + 1;
    if (ch_tc && !tc_q) n_tc <= n_tc + 1;
    if (core_nmi && !nmi_q) n_nmi <= n_nmi + 1;
    if (speaker && !spk_q) begin
      n_spk_edges <= n_spk_edges + 1;
      if (n_spk_edges == 10) spk_period <= int'(now - spk_last);
      spk_last    <= now;
    end
    if (dut.vclk_rise) begin
      vs_q <= vga_vs_n;
      if ({vga_r, vga_g, vga_b} != 6'd0) lit++;
      if (!vga_vs_n && vs_q) begin
        lit_frame.push_back(lit);
        lit = 0;
        n_frames <= n_frames + 1;
      end
    end
  end

  // ---------------- DMA card on channel 2: four bytes, then it drops DRQ2
  logic [7:0] card_data [4] = '{8'h3C, 8'hA7, 8'h51, 8'hE8};
  int card_idx = 0;
  always @(posedge clk) if (ch_dack_n[2] && !dack2_q && card_idx < 3) card_idx <= card_idx + 1;
  assign ch_data_in = (!ch_dack_n[2] && !ch_cmd.ior_n) ? card_data[card_idx] : 8'hFF;

  // ---------------- processor model
  task automatic acc(input logic io, we, word, inta, input logic [19:0] a,
                     input logic [15:0] wd, output logic [15:0] rd);
    @(posedge clk); #1;
    core_io = io; core_we = we; core_word = word; core_inta = inta; core_code = 1'b0;
    core_addr = a; core_wdata = wd; core_req = 1'b1;
    t_acc = now;
    do begin
      @(posedge clk);
      if (now - t_acc == 100000) $display("access %h io=%0d we=%0d stuck: biu=%0d dma=%0d hrq=%0d hlda=%0d dack=%b mask=%b",
                                          a, io, we, dut.u_biu.state, dut.u_dma.state, dut.hrq, dut.hlda, ch_dack_n, dut.u_dma.mask);
    end while (!core_done);
    rd = core_rdata;
    #1 core_req = 1'b0;
  endtask
  logic [15:0] junk;
  int unsigned t_acc;
  task automatic outb(input logic [15:0] port, input logic [7:0] d);
    acc(1, 1, 0, 0, {4'h0, port}, {8'h00, d}, junk);
  endtask
  task automatic inb(input logic [15:0] port, output logic [7:0] d);
    logic [15:0] r;
    acc(1, 0, 0, 0, {4'h0, port}, 16'h0, r);
    d = r[7:0];
  endtask
  task automatic memw(input logic [19:0] a, input logic [15:0] d);
    acc(0, 1, 1, 0, a, d, junk);
  endtask
  task automatic memr(input logic [19:0] a, output logic [15:0] d);
    acc(0, 0, 1, 0, a, 16'h0, d);
  endtask

  logic [7:0] pb_shadow = 8'h00;
  logic [7:0] keys [$];
  // one step of the processor: take a pending interrupt, else do a RAM read
  task automatic step();
    logic [15:0] v;
    logic [7:0]  code;
    if (core_intr) begin
      acc(0, 0, 0, 1, 20'h0, 16'h0, v);
      if (v[7:0] == 8'h08) begin
        n_timer_irq++;
        if (timer_last != 0) timer_period = int'(now - timer_last);
        timer_last = now;
      end else if (v[7:0] == 8'h09) begin
        n_kbd_irq++;
        inb(16'h60, code);
        keys.push_back(code);
        outb(16'h61, pb_shadow | 8'h80);     // acknowledge the keyboard
        outb(16'h61, pb_shadow);
      end else begin
        check(0, $sformatf("unexpected vector %h", v[7:0]));
      end
      outb(16'h20, 8'h20);                    // EOI
    end else begin
      memr(20'h00400, v);
    end
  endtask

  task automatic ps2_send(input logic [7:0] c);
    logic [10:0] fr;
    fr = {1'b1, ~(^c), c, 1'b0};
    for (int i = 0; i < 11; i++) begin
      ps2_data = fr[i]; repeat (1000) @(posedge clk);
      ps2_clk = 1'b0;   repeat (1000) @(posedge clk);
      ps2_clk = 1'b1;
    end
    ps2_data = 1'b1;
  endtask

  logic [15:0] v;
  logic [7:0]  b;
  int unsigned t0, t_mem, t_io;
  initial begin
    // ROM image bytes at FFFF0 and font: only character 41h has lit rows
    for (int i = 0; i < 16; i++) begin
      @(posedge clk); #1 rom_load_we = 1; rom_load_addr = 16'hFFF0 + 16'(i); rom_load_data = 8'(8'hE0 + i);
    end
    @(posedge clk); #1 rom_load_we = 0;
    for (int i = 0; i < 4096; i++) begin
      @(posedge clk); #1 font_we = 1; font_addr = 12'(i); font_data = (i / 16 == 'h41) ? 8'hFF : 8'h00;
    end
    @(posedge clk); #1 font_we = 0;
    kl_prog_we = 1; kl_prog_addr = 0; kl_prog_data = 8'h1E; @(posedge clk);
    #1 kl_prog_addr = 1; kl_prog_data = 8'h9E; @(posedge clk);
    #1 kl_prog_we = 0; kl_num_keys = 13'd2;
    #1 pwr_good = 1'b1;
    wait (!sys_reset);
    repeat (100) @(posedge clk);
    check(ch_reset_drv == 1'b0, "RESET DRV released");

    // ---- peripheral set-up, BIOS style
    outb(16'h63, 8'h99);                      // 8255 mode
    outb(16'h61, 8'h00);
    outb(16'hA0, 8'h00);                      // NMI masked
    outb(16'h20, 8'h13); outb(16'h21, 8'h08); outb(16'h21, 8'h09);
    outb(16'h21, 8'hFC);                      // IRQ0 and IRQ1 enabled
    outb(16'h08, 8'h00);                      // DMA command
    outb(16'h0C, 8'h00);
    outb(16'h00, 8'hFF); outb(16'h00, 8'hFF); // channel 0 address
    outb(16'h01, 8'hFF); outb(16'h01, 8'hFF); // channel 0 count
    outb(16'h0B, 8'h58);                      // single, read, autoinit, channel 0
    outb(16'h0A, 8'h00);                      // unmask channel 0
    outb(16'h43, 8'h54); outb(16'h41, 8'd18); // counter 1: refresh, divisor 18

    // ---- memory, ROM and cycle lengths
    memw(20'h01234, 16'hC0DE);
    t0 = ce_count; memr(20'h01234, v); t_mem = ce_count - t0;
    check(v == 16'hC0DE, $sformatf("RAM word read %h", v));
    memw(20'h3FFFE, 16'h1357);
    memr(20'h3FFFE, v);
    check(v == 16'h1357, "RAM top bank");
    memr(20'hFFFF0, v);
    check(v == 16'hE1E0, $sformatf("ROM read at FFFF0: %h", v));
    // shortest of several tries, so a refresh cycle in between does not count
    t_io = 1000; t_mem = 1000;
    for (int i = 0; i < 8; i++) begin
      t0 = ce_count; inb(16'h21, b);
      if (ce_count - t0 < t_io) t_io = ce_count - t0;
      t0 = ce_count; acc(0, 0, 0, 0, 20'h01234, 16'h0, v);
      if (ce_count - t0 < t_mem) t_mem = ce_count - t0;
    end
    check(b == 8'hFC, "PIC mask read back");
    check(v[7:0] == 8'hDE, "RAM byte read");
    check(t_io == t_mem + 1, $sformatf("I/O cycle %0d CLK, memory cycle %0d CLK", t_io, t_mem));

    // ---- screen: blank text, 'A' white on black in cell 0; video on
    for (int i = 0; i < 2000; i++) memw(20'hB8000 + 20'(2 * i), (i == 0) ? 16'h0F41 : 16'h0720);
    memr(20'hB8000, v);
    check(v == 16'h0F41, "screen memory read back");
    outb(16'h3D8, 8'h29);

    // ---- timer 0, speaker, card DMA, keyboard loader
    outb(16'h43, 8'h36); outb(16'h40, 8'd200); outb(16'h40, 8'd0);
    outb(16'h43, 8'hB6); outb(16'h42, 8'd100); outb(16'h42, 8'd0);
    pb_shadow = 8'h03; outb(16'h61, pb_shadow);   // gate 2 and speaker data on
    outb(16'h81, 8'h01);                          // page for channel 2
    outb(16'h0C, 8'h00);
    outb(16'h04, 8'h00); outb(16'h04, 8'h02);     // address 0200h
    outb(16'h05, 8'd3); outb(16'h05, 8'd0);       // 4 bytes
    outb(16'h0B, 8'h46);                          // single, write, channel 2
    outb(16'h0A, 8'h02);
    ch_drq[2] = 1'b1;
    @(posedge clk); #1 kl_start = 1; @(posedge clk); #1 kl_start = 0;

    // ---- run: service interrupts until two frames, the keys and the DMA are done
    t0 = now;
    while ((n_frames < 3 || kl_active || n_card_dma < 4) && now - t0 < 9_000_000) begin
      if (n_card_dma >= 4) ch_drq[2] = 1'b0;
      step();
    end
    ch_drq[2] = 1'b0;
    $display("run phase: %0d cycles, frames=%0d loader=%0d card_dma=%0d keys=%0d timer=%0d refresh=%0d",
             now - t0, n_frames, kl_active, n_card_dma, keys.size(), n_timer_irq, n_refresh);
    // one key from the PS/2 port
    fork
      ps2_send(8'h1C);
      begin t0 = now; while (now - t0 < 40000) step(); end
    join
    repeat (4) step();

    // ---- NMI from an I/O channel check
    outb(16'hA0, 8'h80);
    ch_io_ch_ck_n = 1'b0; repeat (50) @(posedge clk); ch_io_ch_ck_n = 1'b1;
    check(core_nmi, "NMI from I/O channel check");
    inb(16'h62, b);
    check(b[6], "I/O channel check seen on port C");
    pb_shadow = pb_shadow | 8'h20; outb(16'h61, pb_shadow);
    check(!core_nmi, "channel check cleared through PB5");
    pb_shadow = 8'h03; outb(16'h61, pb_shadow);
    outb(16'hA0, 8'h00);

    // ---- switches
    outb(16'h61, 8'h80);  inb(16'h60, b);
    check(b == sw1, $sformatf("SW1 on port A: %h", b));
    outb(16'h61, 8'h04);  inb(16'h62, b);
    check(b[3:0] == sw2[3:0], "SW2 1-4 on port C");
    outb(16'h61, 8'h00);  inb(16'h62, b);
    check(b[3:0] == {3'b000, sw2[4]}, "SW2 5 on port C");
    outb(16'h61, pb_shadow);

    // ---- results
    memr(20'h10200, v);
    check(v == {card_data[1], card_data[0]}, $sformatf("card DMA bytes 0-1: %h", v));
    memr(20'h10202, v);
    check(v == {card_data[3], card_data[2]}, $sformatf("card DMA bytes 2-3: %h", v));
    check(keys.size() == 3, $sformatf("%0d keystrokes", keys.size()));
    if (keys.size() == 3)
      check(keys[0] == 8'h1E && keys[1] == 8'h9E && keys[2] == 8'h1E, "keystroke codes");
    check(timer_period > 200 * 84 - 1000 && timer_period < 200 * 84 + 1000, $sformatf("timer interrupt period %0d cycles (service jitter allowed)", timer_period));
    check(spk_period == 100 * 84, $sformatf("speaker period %0d cycles", spk_period));
    check(lit_frame.size() >= 3 && lit_frame[lit_frame.size() - 1] == 8 * 16,
          $sformatf("lit pixels in last frame: %0d", lit_frame[lit_frame.size() - 1]));
    check(t_io > 0 && t_mem > 0, "cycle lengths measured");
    $display("mechanisms: io_wait=%0d refresh_dma=%0d dma_stall=%0d card_dma=%0d tc=%0d timer_irq=%0d kbd_irq=%0d nmi=%0d speaker_edges=%0d frames=%0d",
             n_io_wait, n_refresh, n_stall, n_card_dma, n_tc, n_timer_irq, n_kbd_irq, n_nmi, n_spk_edges, n_frames);
    check(n_io_wait > 0, "I/O wait states");
    check(n_refresh > 0, "refresh DMA");
    check(n_stall > 0, "processor stalled by DMA");
    check(n_card_dma == 4, "card DMA transfers");
    check(n_tc > 0, "terminal count");
    check(n_timer_irq > 0, "timer interrupts");
    check(n_kbd_irq == 3, "keyboard interrupts");
    check(n_nmi > 0, "NMI");
    check(n_spk_edges > 0, "speaker tone");
    check(n_frames > 0, "video frames");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (30_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
