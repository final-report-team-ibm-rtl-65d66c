// tb_basic_typing - the keystroke loader typing a BASIC line into the PC.
//
// The demo programs are typed into ROM BASIC by the keystroke loader rather
// than by hand.  This testbench stores the set-1 codes for the line
// `10 beep` followed by Enter (a make code and a break code per key, 16
// codes) in the loader, presses its start button, and plays the BIOS
// keyboard interrupt handler on the core port: on each INT it requests an
// acknowledge (the bus interface runs both INTA cycles), expects vector
// 09h, reads the code from port 60h, pulses PB7 to acknowledge it and sends
// a non-specific EOI.  To show that the loader
// waits for the processor, the handler waits a random time of up to 2 ms
// before acknowledging.
//
// It checks:
//   - the codes arrive complete and in order, each exactly once;
//   - the next key never comes sooner than the loader's 5 ms gap
//     (500000 board cycles) after the acknowledge, nor much later
//     (within 20000 cycles of it);
//   - no key arrives while the previous one is unacknowledged;
//   - the loader reports itself idle when it has sent all the codes.
//
// The processor is played by the testbench, so every access runs through the
// real bus interface, 8288, decoding, 8259, 8255 and keyboard latch.  All top
// parameters are at their defaults.
// The expected values are worked out here from the behaviour of the PC part
// described above; the stimulus, the random choices and the sizes are this
// testbench's own.
module tb_basic_typing;
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

  localparam int unsigned GAP = 500000;   // the loader's default gap

  int checks = 0, failures = 0;
  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // `10 beep` Enter as set-1 make codes; each is followed by its break code
  logic [7:0] make [8] = '{8'h02, 8'h0B, 8'h39, 8'h30, 8'h12, 8'h12, 8'h19, 8'h1C};
  logic [7:0] expect_q [$];

  // ---------------- time base and INT edge times
  // the acknowledge time is taken from the 8255's PB7 output itself
  longint unsigned now = 0, t_int = 0, t_ack = 0;
  int unsigned n_int = 0;
  logic intr_q = 1'b0, pb7_q = 1'b0;
  always @(posedge clk) begin
    now    <= now + 1;
    intr_q <= core_intr;
    pb7_q  <= dut.pb[7];
    if (dut.pb[7] && !pb7_q) t_ack <= now;
    if (core_intr && !intr_q && !sys_reset) begin
      t_int <= now;
      n_int <= n_int + 1;
    end
  end

  // ---------------- processor model
  task automatic acc(input logic io, we, inta, input logic [15:0] port,
                     input logic [7:0] wd, output logic [7:0] rd);
    @(posedge clk); #1;
    core_io = io; core_we = we; core_word = 1'b0; core_inta = inta; core_code = 1'b0;
    core_addr = {4'h0, port}; core_wdata = {8'h00, wd}; core_req = 1'b1;
    do @(posedge clk); while (!core_done);
    rd = core_rdata[7:0];
    #1 core_req = 1'b0;
  endtask
  logic [7:0] junk;
  task automatic outb(input logic [15:0] port, input logic [7:0] d);
    acc(1, 1, 0, port, d, junk);
  endtask
  task automatic inb(input logic [15:0] port, output logic [7:0] d);
    acc(1, 0, 0, port, 8'h00, d);
  endtask

  logic [7:0]      vec, code, exp_code;
  int unsigned     n_keys, wait_cycles, n_int_at_ack, n_int0;
  initial begin
    // keystroke memory: make, break, make, break ...
    for (int i = 0; i < 8; i++) begin
      @(posedge clk); #1 kl_prog_we = 1; kl_prog_addr = 12'(2 * i);     kl_prog_data = make[i];
      expect_q.push_back(make[i]);
      @(posedge clk); #1 kl_prog_we = 1; kl_prog_addr = 12'(2 * i + 1); kl_prog_data = make[i] | 8'h80;
      expect_q.push_back(make[i] | 8'h80);
    end
    @(posedge clk); #1 kl_prog_we = 0; kl_num_keys = 13'd16;
    #1 pwr_good = 1'b1;
    wait (!sys_reset);
    repeat (100) @(posedge clk);

    outb(16'h63, 8'h99);                      // 8255 mode
    outb(16'h61, 8'h00);
    outb(16'h20, 8'h13); outb(16'h21, 8'h08); outb(16'h21, 8'h09);
    outb(16'h21, 8'hFD);                      // only IRQ1 enabled
    check(!kl_active, "loader idle before start");

    @(posedge clk); #1 kl_start = 1; @(posedge clk); #1 kl_start = 0;
    repeat (2) @(posedge clk);
    check(kl_active, "loader active after start");

    n_keys = 0;
    n_int0 = n_int;
    while (n_keys < 16) begin
      wait (core_intr);
      @(posedge clk); #1;                     // let the edge time be recorded
      if (n_keys > 0) begin
        check(t_int >= t_ack + GAP, $sformatf("key %0d came %0d cycles after the acknowledge", n_keys, t_int - t_ack));
        check(t_int <= t_ack + GAP + 20000, $sformatf("key %0d late: %0d cycles after the acknowledge", n_keys, t_int - t_ack));
      end
      acc(0, 0, 1, 16'h0, 8'h00, vec);        // one request = both INTA cycles
      check(vec == 8'h09, $sformatf("vector %h", vec));
      inb(16'h60, code);
      exp_code = expect_q.pop_front();
      check(code == exp_code, $sformatf("key %0d: code %h, expected %h", n_keys, code, exp_code));
      // hold off the acknowledge for a while: no new key may arrive meanwhile
      wait_cycles = $urandom_range(0, 200000);
      n_int_at_ack = n_int;
      repeat (wait_cycles) @(posedge clk);
      check(n_int == n_int_at_ack, $sformatf("key %0d: new key before the acknowledge", n_keys));
      outb(16'h61, 8'h80);
      outb(16'h61, 8'h00);
      outb(16'h20, 8'h20);                    // EOI
      n_keys++;
    end
    repeat (GAP + 20000) @(posedge clk);
    check(!kl_active, "loader idle after the last key");
    check(n_int - n_int0 == 16, $sformatf("interrupts %0d", n_int - n_int0));

    $display("keys=%0d interrupts=%0d", n_keys, n_int - n_int0);
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
