// ibm5150_top - the IBM 5150 motherboard: processor bus interface, clock
// generator, bus controller, interrupt controller, interval timer, peripheral
// interface, DMA controller with page register, control logic, decoders, ROM,
// RAM, keyboard receiver and loader, and the text video unit on one 8-bit
// system bus with a 20-bit address.
//
// The processor core itself is not part of this module: its request side
// (core_*) is brought out, and cpu_bus_if turns each request into 8088 bus
// cycles.  The 8288 decodes the status into MEMR#/MEMW#/IOR#/IOW#/INTA#; while
// the DMA controller holds the bus (aen) the 8237 drives the address (with
// A19..A16 from the page register) and the command lines instead.  Memory and
// register writes take effect at the leading edge of a write command, reads
// are served while the read command is active, and registers with read side
// effects see the trailing edge.
//
// Motherboard wiring (as on the PC): IRQ0 timer channel 0, IRQ1 keyboard,
// IRQ2-7 from the I/O channel; timer channel 1 requests DMA channel 0
// (refresh) through a flip-flop cleared by DACK0; timer channel 2, gated by
// PB0, sounds the speaker through PB1; PB7 selects SW1 or the keyboard code on
// port A and acknowledges the keyboard; PB2 selects SW2 switches 1-4 or switch
// 5 on PC3..PC0; PC4 cassette data in, PC5 timer channel 2 out, PC6 I/O
// channel check, PC7 parity check.  Switch inputs are 1 for OFF.  The timer
// counts at PCLK / 2.  Everything runs on the board clock `clk` with clock
// enables from the clock generator; pwr_good low resets the system.
// The partition into motherboard sections, the PCLK / 2 timer clock, the
// switch and port wiring and the fetch-gated INTR follow the reference PC;
// OUT0 as IRQ0 and OUT1 as the refresh request, PB7 as the keyboard
// acknowledge, the edge strobes made from the command lines and the FFh
// floating-bus value are this design's choices.
module ibm5150_top
  import pc_pkg::*;
(
  input  logic        clk,            // 100 MHz board clock
  input  logic        pwr_good,       // power good
  // processor core request side
  input  logic        core_req,       // access request
  input  logic        core_io,        // I/O space
  input  logic        core_we,        // write
  input  logic        core_word,      // 16-bit access
  input  logic        core_code,      // instruction fetch
  input  logic        core_inta,      // interrupt acknowledge
  input  logic [19:0] core_addr,      // address
  input  logic [15:0] core_wdata,     // write data
  input  logic        core_fetch,     // core is in its fetch state
  input  logic        core_lock_n,    // LOCK#
  output logic [15:0] core_rdata,     // read data / vector
  output logic        core_done,      // access complete strobe
  output logic        core_halt,      // halt the core
  output logic        core_intr,      // INTR (fetch-state gated)
  output logic        core_nmi,       // NMI
  output logic        sys_reset,      // RESET to the core
  // image load ports
  input  logic        rom_load_we,    // BIOS/BASIC image write
  input  logic [15:0] rom_load_addr,  // image byte address
  input  logic [7:0]  rom_load_data,  // image byte
  input  logic        font_we,        // font write
  input  logic [11:0] font_addr,      // {character, row}
  input  logic [7:0]  font_data,      // glyph row
  input  logic        kl_prog_we,     // keystroke memory write
  input  logic [11:0] kl_prog_addr,   // keystroke memory address
  input  logic [7:0]  kl_prog_data,   // keystroke (set-1 code)
  input  logic [12:0] kl_num_keys,    // keystrokes to play
  input  logic        kl_start,       // loader button
  output logic        kl_active,      // loader running
  // keyboard, switches, speaker, cassette
  input  logic        ps2_clk,        // PS/2 clock
  input  logic        ps2_data,       // PS/2 data
  input  logic [7:0]  sw1,            // DIP switch block SW1 (1 = OFF)
  input  logic [7:0]  sw2,            // DIP switch block SW2 (1 = OFF)
  input  logic        np_npi,         // coprocessor NMI request
  output logic        speaker,        // speaker drive
  output logic        motor_off,      // cassette MOTOR OFF (PB3)
  input  logic        cass_data_in,   // cassette data in
  // video
  input  logic        lpen_stb,       // light-pen trigger
  output logic [1:0]  vga_r,          // red {R, I}
  output logic [1:0]  vga_g,          // green {G, I}
  output logic [1:0]  vga_b,          // blue {B, I}
  output logic        vga_hs_n,       // horizontal sync
  output logic        vga_vs_n,       // vertical sync
  // I/O channel
  output logic [19:0] ch_addr,        // A19..A0
  output logic [7:0]  ch_data_out,    // D7..D0 driven by the motherboard
  input  logic [7:0]  ch_data_in,     // D7..D0 driven by a card
  output bus_cmd_t    ch_cmd,         // IOR#, IOW#, MEMR#, MEMW#
  output logic        ch_aen,         // AEN
  output logic        ch_ale,         // ALE
  output logic        ch_reset_drv,   // RESET DRV
  output logic        ch_clk,         // CLK
  output logic        ch_osc,         // OSC
  input  logic [7:2]  ch_irq,         // IRQ7..IRQ2
  input  logic [3:1]  ch_drq,         // DRQ3..DRQ1
  output logic [3:0]  ch_dack_n,      // DACK3..DACK0
  output logic        ch_tc,          // T/C
  input  logic        ch_io_ch_rdy,   // I/O CH RDY
  input  logic        ch_io_ch_ck_n   // I/O CH CK#
);

  // ---------------- clocks and reset
  logic ce, pclk_rise, vclk_rise, ready, rst, rdy_wait, clk88, pclk, vclk;
  clkgen_8284 u_clk (
    .clk(clk), .pwr_good(pwr_good), .rdy(rdy_wait),
    .clk88(clk88), .clk88_rise(ce), .pclk(pclk), .pclk_rise(pclk_rise),
    .osc(ch_osc), .vclk(vclk), .vclk_rise(vclk_rise), .ready(ready), .reset(rst)
  );
  assign ch_clk    = clk88;
  assign sys_reset = rst;

  // ---------------- processor bus interface and bus controller
  bus_status_t s_n;
  logic [19:0] cpu_addr;
  logic [7:0]  cpu_dout, xd;
  logic        cpu_idle, hrq, hlda, aen, dma_wait, intr, nmi;
  cpu_bus_if u_biu (
    .clk(clk), .ce(ce), .rst(rst),
    .core_req(core_req), .core_io(core_io), .core_we(core_we), .core_word(core_word),
    .core_code(core_code), .core_inta(core_inta), .core_addr(core_addr),
    .core_wdata(core_wdata), .core_fetch(core_fetch), .intr(intr),
    .core_rdata(core_rdata), .core_done(core_done), .core_halt(core_halt),
    .core_intr(core_intr),
    .s_n(s_n), .addr(cpu_addr), .dout(cpu_dout), .din(xd), .ready(ready),
    .hold_req(dma_wait), .hlda(hlda), .bus_idle(cpu_idle)
  );

  logic ale, dtr, den, inta_n, iorc_n, aiowc_n, mrdc_n, amwc_n, cmd_oe;
  bus_ctrl_8288 u_8288 (
    .clk(clk), .ce(ce), .rst(rst), .s_n(s_n), .aen_n(aen), .cen(!aen),
    .ale(ale), .dtr(dtr), .den(den), .inta_n(inta_n), .iorc_n(iorc_n),
    .aiowc_n(aiowc_n), .mrdc_n(mrdc_n), .amwc_n(amwc_n), .cmd_oe(cmd_oe)
  );

  // ---------------- DMA controller and page register
  logic [15:0] dma_addr;
  logic [3:0]  page, dack_n;
  logic        dma_memr_n, dma_memw_n, dma_ior_n, dma_iow_n, dma_aen, eop, rdy_to_dma;
  logic [7:0]  dma_dout;
  logic        drq0;

  // ---------------- system bus
  bus_cmd_t cmd;
  always_comb begin
    if (aen) begin
      ch_addr = {page, dma_addr};
      cmd     = '{ior_n: dma_ior_n, iow_n: dma_iow_n, memr_n: dma_memr_n, memw_n: dma_memw_n};
    end else begin
      ch_addr = cpu_addr;
      cmd     = cmd_oe ? '{ior_n: iorc_n, iow_n: aiowc_n, memr_n: mrdc_n, memw_n: amwc_n}
                       : CMD_IDLE;
    end
  end
  assign ch_cmd = cmd;
  assign ch_aen = aen;
  assign ch_ale = ale;

  // command edges
  bus_cmd_t cmd_q;
  logic     inta_q;
  always_ff @(posedge clk) begin
    if (rst) begin
      cmd_q  <= CMD_IDLE;
      inta_q <= 1'b1;
    end else begin
      cmd_q  <= cmd;
      inta_q <= inta_n;
    end
  end
  wire iow_stb  = cmd_q.iow_n  && !cmd.iow_n;
  wire memw_stb = cmd_q.memw_n && !cmd.memw_n;
  wire ior_end  = !cmd_q.ior_n && cmd.ior_n;
  wire inta_stb = inta_q && !inta_n;

  // ---------------- decode
  logic rom_sel, ram_sel, vid_mem_sel, dma_cs, pic_cs, pit_cs, ppi_cs, dmapg_wr, nmi_wr, vid_io_sel;
  logic [7:0] rom_cs;
  logic [3:0] ram_bank;
  addr_decode u_dec (
    .a(ch_addr), .aen(aen), .memr_n(cmd.memr_n), .iow_n(cmd.iow_n),
    .rom_sel(rom_sel), .rom_cs(rom_cs), .ram_sel(ram_sel), .ram_bank(ram_bank),
    .vid_mem_sel(vid_mem_sel), .dma_cs(dma_cs), .pic_cs(pic_cs), .pit_cs(pit_cs),
    .ppi_cs(ppi_cs), .dmapg_wr(dmapg_wr), .nmi_wr(nmi_wr), .vid_io_sel(vid_io_sel)
  );

  // ---------------- peripherals
  logic [7:0] pic_dout, pit_dout, ppi_dout, vid_io_dout, vid_mem_dout, rom_dout, ram_dout;
  logic       pic_oe, kbd_irq, parity_err, io_ch_ck, allow_nmi;
  logic [2:0] pit_out;
  logic [7:0] pb, pa_in, pc_in, ppi_mode, kbd_code;
  logic       kbd_busy, inj_stb;
  logic [7:0] inj_code;

  pic_8259 u_pic (
    .clk(clk), .rst(rst), .cs(pic_cs), .a0(ch_addr[0]), .wr(iow_stb), .din(cpu_dout),
    .dout(pic_dout), .dout_oe(pic_oe), .ir({ch_irq, kbd_irq, pit_out[0]}),
    .inta_stb(inta_stb), .inta_act(!inta_n), .int_out(intr)
  );

  // timer clock: PCLK / 2
  logic tdiv;
  always_ff @(posedge clk) begin
    if (rst)            tdiv <= 1'b0;
    else if (pclk_rise) tdiv <= ~tdiv;
  end
  wire tick = pclk_rise && tdiv;

  pit_8253 u_pit (
    .clk(clk), .rst(rst), .tick(tick), .cs(pit_cs), .a(ch_addr[1:0]), .wr(iow_stb),
    .rd(ior_end), .din(cpu_dout), .dout(pit_dout), .gate({pb[0], 1'b1, 1'b1}), .out(pit_out)
  );

  assign pa_in = pb[7] ? sw1 : kbd_code;
  assign pc_in = {parity_err, io_ch_ck, pit_out[2], cass_data_in,
                  pb[2] ? sw2[3:0] : {3'b000, sw2[4]}};
  ppi_8255 u_ppi (
    .clk(clk), .rst(rst), .cs(ppi_cs), .a(ch_addr[1:0]), .wr(iow_stb), .din(cpu_dout),
    .dout(ppi_dout), .pa_in(pa_in), .pc_in(pc_in), .pb_out(pb), .mode_word(ppi_mode)
  );
  assign speaker   = pit_out[2] && pb[1];
  assign motor_off = pb[3];

  kbd_ps2_rx u_kbd (
    .clk(clk), .rst(rst), .ps2_clk(ps2_clk), .ps2_data(ps2_data), .ack(pb[7]),
    .inj_stb(inj_stb), .inj_code(inj_code), .scan_code(kbd_code), .irq(kbd_irq), .busy(kbd_busy)
  );

  kbd_loader u_kl (
    .clk(clk), .rst(rst), .start(kl_start), .num_keys(kl_num_keys), .kbd_busy(kbd_busy),
    .ack(pb[7]), .inj_stb(inj_stb), .inj_code(inj_code), .active(kl_active),
    .prog_we(kl_prog_we), .prog_addr(kl_prog_addr), .prog_data(kl_prog_data)
  );

  // refresh request: timer channel 1 rising edge, cleared by DACK0
  logic out1_q;
  always_ff @(posedge clk) begin
    if (rst) begin
      out1_q <= 1'b0;
      drq0   <= 1'b0;
    end else begin
      out1_q <= pit_out[1];
      if (!dack_n[0])                  drq0 <= 1'b0;
      else if (pit_out[1] && !out1_q)  drq0 <= 1'b1;
    end
  end

  dma_8237 u_dma (
    .clk(clk), .ce(ce), .rst(rst), .cs(dma_cs), .a(ch_addr[3:0]), .wr(iow_stb), .rd(ior_end),
    .din(cpu_dout), .dout(dma_dout), .dreq({ch_drq, drq0}), .dack_n(dack_n), .hrq(hrq),
    .hlda(hlda), .rdy(rdy_to_dma), .eop(eop), .aen(dma_aen), .addr(dma_addr),
    .memr_n(dma_memr_n), .memw_n(dma_memw_n), .ior_n(dma_ior_n), .iow_n(dma_iow_n)
  );
  assign ch_dack_n = dack_n;
  assign ch_tc     = eop;

  dma_page_reg u_page (
    .clk(clk), .rst(rst), .wr(dmapg_wr && iow_stb), .wa(ch_addr[1:0]), .din(cpu_dout[3:0]),
    .dack2_n(dack_n[2]), .dack3_n(dack_n[3]), .page(page)
  );

  mb_control u_ctl (
    .clk(clk), .ce(ce), .reset(rst), .lock_n(core_lock_n), .cpu_idle(cpu_idle),
    .io_cmd(!aen && (!iorc_n || !aiowc_n)), .io_ch_rdy(ch_io_ch_rdy), .hrq(hrq),
    .nmi_reg_wr(nmi_wr && iow_stb), .xd7(cpu_dout[7]), .pck(parity_err),
    .io_ch_ck_n(ch_io_ch_ck_n), .enable_io_ck_n(pb[5]), .np_npi(np_npi),
    .np_instl_sw(sw1[1]), .rdy_wait(rdy_wait), .rdy_to_dma(rdy_to_dma), .hlda(hlda),
    .aen(aen), .dma_wait(dma_wait), .allow_nmi(allow_nmi), .io_ch_ck(io_ch_ck),
    .nmi(nmi), .reset_drv(ch_reset_drv)
  );
  assign core_nmi = nmi;

  // ---------------- memories
  logic [7:0] bd;   // data written on this cycle
  rom_bios u_rom (
    .clk(clk), .cs(rom_cs), .a(ch_addr[12:0]), .dout(rom_dout),
    .load_we(rom_load_we), .load_addr(rom_load_addr), .load_data(rom_load_data)
  );
  ram_256k u_ram (
    .clk(clk), .bank_sel(ram_bank), .a(ch_addr[15:0]), .we(memw_stb && ram_sel),
    .din(bd), .dout(ram_dout), .parity_err(parity_err)
  );

  vdu_text u_vdu (
    .clk(clk), .rst(rst), .vclk_en(vclk_rise),
    .mem_sel(vid_mem_sel), .mem_addr(ch_addr[11:0]), .mem_we(memw_stb), .mem_din(bd),
    .mem_dout(vid_mem_dout), .io_sel(vid_io_sel), .io_addr(ch_addr[3:0]), .io_wr(iow_stb),
    .io_din(cpu_dout), .io_dout(vid_io_dout), .lpen_stb(lpen_stb),
    .font_we(font_we), .font_addr(font_addr), .font_data(font_data),
    .red(vga_r), .green(vga_g), .blue(vga_b), .hsync_n(vga_hs_n), .vsync_n(vga_vs_n)
  );

  // ---------------- read data
  always_comb begin
    if (pic_oe)                xd = pic_dout;
    else if (!cmd.ior_n) begin
      if (dma_cs)              xd = dma_dout;
      else if (pic_cs)         xd = pic_dout;
      else if (pit_cs)         xd = pit_dout;
      else if (ppi_cs)         xd = ppi_dout;
      else if (vid_io_sel)     xd = vid_io_dout;
      else                     xd = ch_data_in;
    end else if (!cmd.memr_n) begin
      if (rom_sel)             xd = rom_dout;
      else if (ram_sel)        xd = ram_dout;
      else if (vid_mem_sel)    xd = vid_mem_dout;
      else                     xd = ch_data_in;
    end else                   xd = 8'hFF;
  end

  // CPU writes drive the processor's data; during DMA the bus carries what the
  // reading side put on it (I/O device for a write transfer, memory for a read)
  assign bd          = aen ? xd : cpu_dout;
  assign ch_data_out = bd;

  wire unused_ok = &{1'b0, dtr, den, dma_aen, allow_nmi, ppi_mode, pclk, vclk};

endmodule
