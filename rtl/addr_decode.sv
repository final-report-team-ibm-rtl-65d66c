// addr_decode - memory and I/O decoding of schematic section 3, plus the
// decode of the video adapter that sits on the I/O channel.
//
// Memory (20-bit system address A19..A0):
//   A19..A16 = 1111  ROM ADDR SEL; ROM chip selects CS0..CS7 from A15..A13,
//                    active while MEMR# is low (the ROM is never written)
//   A19..A18 = 00    RAM ADDR SEL; RAM bank 0..3 from A17..A16 (256 KB)
//   B8000-B8FFF      video character/attribute RAM (I/O channel card)
// I/O (XA9..XA0, only while AEN is low, i.e. not during DMA):
//   XA9 = XA8 = 0, XA7..XA5 select: 0 DMA CS (0x00), 1 INTR CS (0x20),
//   2 T/C CS (0x40), 3 PPI CS (0x60), 4 DMA page register write (0x80),
//   5 NMI mask register write (0xA0); the last two only with IOW#
//   0x3D0-0x3DF      video adapter registers
// All outputs are active high and purely combinational.  The assignment of
// 0x80 to the page register and 0xA0 to the NMI mask follows the PC's port
// map; the video decode is this design's own, the adapter being a card.
module addr_decode
  import pc_pkg::*;
(
  input  logic [19:0] a,            // system address
  input  logic        aen,          // DMA owns the bus
  input  logic        memr_n,       // MEMR#
  input  logic        iow_n,        // IOW#
  output logic        rom_sel,      // ROM ADDR SEL
  output logic [7:0]  rom_cs,       // ROM chip selects CS7..CS0 (MEMR# qualified)
  output logic        ram_sel,      // RAM ADDR SEL
  output logic [3:0]  ram_bank,     // RAM bank selects
  output logic        vid_mem_sel,  // video RAM window
  output logic        dma_cs,       // 8237
  output logic        pic_cs,       // 8259
  output logic        pit_cs,       // 8253
  output logic        ppi_cs,       // 8255
  output logic        dmapg_wr,     // DMA page register write (with IOW#)
  output logic        nmi_wr,       // NMI mask register write (with IOW#)
  output logic        vid_io_sel    // video adapter registers
);

  wire io_en = !aen && (a[9:8] == 2'b00);
  wire [2:0] grp = a[7:5];

  always_comb begin
    rom_sel     = (a[19:16] == 4'hF);
    rom_cs      = '0;
    if (rom_sel && !memr_n) rom_cs[a[15:13]] = 1'b1;
    ram_sel     = (a[19:18] == 2'b00);
    ram_bank    = '0;
    if (ram_sel) ram_bank[a[17:16]] = 1'b1;
    vid_mem_sel = (a[19:12] == VIDEO_BASE[19:12]);
    dma_cs      = io_en && grp == 3'd0;
    pic_cs      = io_en && grp == 3'd1;
    pit_cs      = io_en && grp == 3'd2;
    ppi_cs      = io_en && grp == 3'd3;
    dmapg_wr    = io_en && grp == 3'd4 && !iow_n;
    nmi_wr      = io_en && grp == 3'd5 && !iow_n;
    vid_io_sel  = !aen && (a[9:4] == IO_CGA[9:4]);
  end

endmodule
