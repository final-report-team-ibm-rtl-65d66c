// vdu_text - colour text video unit: 80 x 25 characters on a VGA monitor.
//
// Screen memory is two dual-ported RAMs of CELLS bytes, one for character
// codes and one for attributes.  The processor sees them through a 4 KB window
// at B8000 (mem_*): even addresses are characters, odd addresses attributes,
// and it can read and write at any time on port A while the display reads
// port B.  Glyphs come from a font memory of 256 characters x CHAR_H rows,
// one byte per row, bit 7 leftmost; the font image is written through the
// font_* port.
//
// Display: a 640 x 480 frame at 60 Hz (800 x 525 pixel clocks, negative
// syncs) with the 640 x 400 text area at the top, 8 x 16 pixels per cell.
// Each pixel clock (vclk_en) a three-stage pipeline fetches the cell
// (character and attribute), then the glyph row, then picks the pixel; syncs
// and blanking are delayed to match.  Attribute bits: 7 background intensity,
// 6..4 background R G B, 3 foreground intensity, 2..0 foreground R G B.  Each
// colour leaves as two bits {colour, intensity} for a two-resistor DAC.
//
// Register file (I/O, A3..A0 of 0x3D0-0x3DF): 4 index, 5 data of the CRT
// controller registers R0..R17; R10/R11 cursor start/end row (R10 bits 6..5 =
// 01 hides the cursor), R12/R13 display start address, R14/R15 cursor
// address, R16/R17 light-pen address (read-only, latched by lpen_stb).
// 8 mode control (bit 3 video enable; 0 blanks the screen), 9 colour select
// (stored only), A status: bit 0 display inactive, bit 3 vertical retrace.
// The frame timing, the pipeline and the register subset are this design's
// choices for a VGA monitor; the memory organisation and attribute bits
// follow the colour adapter.
module vdu_text #(
  parameter int unsigned COLS     = 80,   // characters per row
  parameter int unsigned ROWS     = 25,   // character rows
  parameter int unsigned CHAR_H   = 16,   // pixel rows per character
  parameter int unsigned CELLS    = 2048, // bytes in each screen RAM
  parameter int unsigned H_VIS    = 640,
  parameter int unsigned H_FP     = 16,
  parameter int unsigned H_SYNC   = 96,
  parameter int unsigned H_BP     = 48,
  parameter int unsigned V_VIS    = 480,
  parameter int unsigned V_FP     = 10,
  parameter int unsigned V_SYNC   = 2,
  parameter int unsigned V_BP     = 33
) (
  input  logic        clk,        // board clock
  input  logic        rst,        // reset
  input  logic        vclk_en,    // pixel clock enable (25 MHz)
  // processor side: screen memory
  input  logic        mem_sel,    // window selected
  input  logic [11:0] mem_addr,   // offset in the window
  input  logic        mem_we,     // write strobe
  input  logic [7:0]  mem_din,    // write data
  output logic [7:0]  mem_dout,   // read data (one board clock later)
  // processor side: registers
  input  logic        io_sel,     // register block selected
  input  logic [3:0]  io_addr,    // A3..A0
  input  logic        io_wr,      // write strobe
  input  logic [7:0]  io_din,     // write data
  output logic [7:0]  io_dout,    // read data
  input  logic        lpen_stb,   // light-pen trigger
  // font image load
  input  logic        font_we,    // font write strobe
  input  logic [11:0] font_addr,  // {character, row}
  input  logic [7:0]  font_data,  // glyph row, bit 7 leftmost
  // monitor
  output logic [1:0]  red,        // {R, I}
  output logic [1:0]  green,      // {G, I}
  output logic [1:0]  blue,       // {B, I}
  output logic        hsync_n,    // horizontal sync, active low
  output logic        vsync_n     // vertical sync, active low
);

  localparam int unsigned H_TOT = H_VIS + H_FP + H_SYNC + H_BP;
  localparam int unsigned V_TOT = V_VIS + V_FP + V_SYNC + V_BP;
  localparam int unsigned CW    = $clog2(CELLS);

  // ---------------- memories
  logic [7:0] cmem [CELLS];
  logic [7:0] amem [CELLS];
  logic [7:0] font [256*CHAR_H];

  wire [CW-1:0] cpu_cell = mem_addr[CW:1];
  logic [7:0] cq, aq;
  logic       odd_q;

  always_ff @(posedge clk) begin
    if (mem_sel && mem_we && !mem_addr[0]) cmem[cpu_cell] <= mem_din;
    if (mem_sel && mem_we &&  mem_addr[0]) amem[cpu_cell] <= mem_din;
    cq    <= cmem[cpu_cell];
    aq    <= amem[cpu_cell];
    odd_q <= mem_addr[0];
    if (font_we) font[font_addr[$clog2(256*CHAR_H)-1:0]] <= font_data;
  end
  assign mem_dout = odd_q ? aq : cq;

  // ---------------- registers
  logic [4:0] idx;
  logic [7:0] crtc [18];
  logic [7:0] mode_reg, color_reg;

  // ---------------- raster counters
  logic [9:0] hc, vc;
  logic [5:0] frame;
  wire  de0 = (32'(hc) < H_VIS) && (32'(vc) < V_VIS);
  wire  hs0 = (32'(hc) >= H_VIS + H_FP) && (32'(hc) < H_VIS + H_FP + H_SYNC);
  wire  vs0 = (32'(vc) >= V_VIS + V_FP) && (32'(vc) < V_VIS + V_FP + V_SYNC);
  wire  vblank = (32'(vc) >= V_VIS);
  wire [4:0] row  = 5'(vc / 10'(CHAR_H));
  wire [3:0] line = 4'(vc % 10'(CHAR_H));
  wire [6:0] col  = hc[9:3];
  wire  text0 = de0 && (32'(row) < ROWS) && (32'(col) < COLS);
  wire [13:0] cell0 = {crtc[12][5:0], crtc[13]} + 14'(row) * 14'(COLS) + 14'(col);
  wire [13:0] cursor_addr = {crtc[14][5:0], crtc[15]};

  always_ff @(posedge clk) begin
    if (rst) begin
      hc <= '0; vc <= '0; frame <= '0;
    end else if (vclk_en) begin
      if (32'(hc) == H_TOT - 1) begin
        hc <= '0;
        if (32'(vc) == V_TOT - 1) begin
          vc    <= '0;
          frame <= frame + 1'b1;
        end else begin
          vc <= vc + 1'b1;
        end
      end else begin
        hc <= hc + 1'b1;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      idx <= '0; mode_reg <= 8'h00; color_reg <= 8'h00;
      for (int i = 0; i < 18; i++) crtc[i] <= 8'h00;
      crtc[10] <= 8'h0E;
      crtc[11] <= 8'h0F;
    end else begin
      if (io_sel && io_wr) begin
        unique case (io_addr)
          4'h4: idx <= io_din[4:0];
          4'h5: if (idx < 5'd16) crtc[idx] <= io_din;
          4'h8: mode_reg  <= io_din;
          4'h9: color_reg <= io_din;
          default: ;
        endcase
      end
      if (lpen_stb) begin
        crtc[16] <= {2'b00, cell0[13:8]};
        crtc[17] <= cell0[7:0];
      end
    end
  end

  always_comb begin
    unique case (io_addr)
      4'h5:    io_dout = (idx < 5'd18) ? crtc[idx] : 8'h00;
      4'hA:    io_dout = {4'b0000, vblank, 2'b00, !de0};
      default: io_dout = 8'hFF;
    endcase
  end

  // ---------------- display pipeline
  logic [7:0] ch1, at1, at2, glyph2;
  logic [3:0] line1;
  logic [2:0] xb1, xb2;
  logic [2:0] hs_d, vs_d, de_d, tx_d;
  logic       cur1, cur2;

  wire cursor_shown = (crtc[10][6:5] != 2'b01) && frame[4];

  always_ff @(posedge clk) begin
    if (vclk_en) begin
      // stage 1: screen memory
      ch1   <= cmem[cell0[CW-1:0]];
      at1   <= amem[cell0[CW-1:0]];
      line1 <= line;
      xb1   <= hc[2:0];
      cur1  <= cursor_shown && (cell0 == cursor_addr) &&
               ({1'b0, line} >= crtc[10][4:0]) && ({1'b0, line} <= crtc[11][4:0]);
      // stage 2: glyph row
      glyph2 <= font[{ch1, line1}];
      at2    <= at1;
      xb2    <= xb1;
      cur2   <= cur1;
      // delayed raster signals
      hs_d <= {hs_d[1:0], hs0};
      vs_d <= {vs_d[1:0], vs0};
      de_d <= {de_d[1:0], de0};
      tx_d <= {tx_d[1:0], text0};
    end
  end

  // stage 3: pixel and colour
  logic [3:0] irgb;
  logic       pix;
  always_ff @(posedge clk) begin
    if (rst) begin
      red <= '0; green <= '0; blue <= '0; hsync_n <= 1'b1; vsync_n <= 1'b1;
    end else if (vclk_en) begin
      hsync_n <= !hs_d[1];
      vsync_n <= !vs_d[1];
      if (de_d[1] && tx_d[1] && mode_reg[3]) begin
        red   <= {irgb[2], irgb[3]};
        green <= {irgb[1], irgb[3]};
        blue  <= {irgb[0], irgb[3]};
      end else begin
        red <= '0; green <= '0; blue <= '0;
      end
    end
  end

  always_comb begin
    pix  = glyph2[3'd7 - xb2] || cur2;
    irgb = pix ? at2[3:0] : at2[7:4];
  end

  wire unused_ok = &{1'b0, color_reg, de_d[2], hs_d[2], vs_d[2], tx_d[2]};

endmodule
