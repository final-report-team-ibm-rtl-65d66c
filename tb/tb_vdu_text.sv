// tb_vdu_text - fills the screen memory and the font with random data through
// the processor and font ports, switches the video on, and checks a whole
// frame pixel by pixel against a reference model of the text display
// (cell = row * 80 + column + start address, glyph row from the font, pixel =
// foreground or background colour of the attribute, {colour, intensity} per
// gun).  Also checks the sync timing (800 pixel clocks per line with a
// 96-clock pulse, 525 lines per frame with a 2-line pulse), blanking while
// video is disabled, a scrolled frame after changing the start address,
// register and memory read-back and the vertical-retrace status bit.  The
// pixel clock enable is on every board clock to keep the run short.
module tb_vdu_text;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic rst = 1'b1, vclk_en = 1'b1;
  logic mem_sel = 1'b0, mem_we = 1'b0, io_sel = 1'b0, io_wr = 1'b0, lpen_stb = 1'b0, font_we = 1'b0;
  logic [11:0] mem_addr = '0, font_addr = '0;
  logic [7:0] mem_din = '0, mem_dout, io_din = '0, io_dout, font_data = '0;
  logic [3:0] io_addr = '0;
  logic [1:0] red, green, blue;
  logic hsync_n, vsync_n;
  int checks = 0, failures = 0;

  vdu_text dut (.*);

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  logic [7:0] chars [2048], attrs [2048], glyphs [4096];
  int start_addr = 0;

  task automatic io_write(input logic [3:0] ad, input logic [7:0] d);
    @(posedge clk); #1 io_sel = 1; io_addr = ad; io_din = d; io_wr = 1;
    @(posedge clk); #1 io_sel = 0; io_wr = 0;
  endtask

  // ---- output position tracker, synchronised by the sync pulses
  int x = -1, y = -1, line_len = 0, hs_len = 0, vs_lines = 0, frame_lines = 0;
  logic hs_q = 1'b1, vs_q = 1'b1;
  int vs_pulse = 0, pix_err = 0, pix_checked = 0, lit = 0, hs_period = 0, vs_period = 0;
  bit compare = 0;
  logic [3:0] irgb;
  logic [1:0] er, eg, eb;
  logic [7:0] c, at, g;
  int cidx;
  always @(posedge clk) begin
    if (!rst && vclk_en) begin
      hs_q <= hsync_n; vs_q <= vsync_n;
      line_len <= line_len + 1;
      if (!hsync_n) hs_len <= hs_len + 1;
      if (!hsync_n && hs_q) begin
        hs_period = line_len; line_len <= 1;
        x = 656;
        if (y >= 0) y = (y == 524) ? 0 : y + 1;
        frame_lines <= frame_lines + 1;
        if (!vsync_n) vs_lines <= vs_lines + 1;
      end else if (x >= 0) begin
        x = (x == 799) ? 0 : x + 1;
      end
      if (hsync_n && !hs_q) hs_len <= 0;
      if (vsync_n && !vs_q) vs_pulse = vs_lines;
      if (!vsync_n && vs_q) begin
        vs_period = frame_lines; frame_lines <= 0; vs_lines <= 0;
        y = 490;
      end
      if (compare && x >= 0 && y >= 0 && x < 640 && y < 480) begin
        if (y < 400) begin
          cidx = (start_addr + (y / 16) * 80 + x / 8) % 2048;
          c = chars[cidx]; at = attrs[cidx]; g = glyphs[{c, 4'(y % 16)}];
          irgb = g[7 - x % 8] ? at[3:0] : at[7:4];
          er = {irgb[2], irgb[3]}; eg = {irgb[1], irgb[3]}; eb = {irgb[0], irgb[3]};
        end else begin
          er = 0; eg = 0; eb = 0;
        end
        pix_checked++;
        if (red != 2'b00) lit++;
        if ({red, green, blue} != {er, eg, eb}) begin
          if (pix_err < 5) $display("pixel mismatch x=%0d y=%0d got %b%b%b exp %b%b%b", x, y, red, green, blue, er, eg, eb);
          pix_err++;
        end
      end
    end
  end

  task automatic wait_frame();
    @(negedge vsync_n);
    repeat (2) @(posedge clk);
  endtask

  logic [7:0] v;
  initial begin
    repeat (5) @(posedge clk); #1 rst = 0;
    // screen memory and font
    for (int i = 0; i < 4096; i++) begin
      @(posedge clk); #1 font_we = 1; font_addr = 12'(i); font_data = 8'($urandom); glyphs[i] = font_data;
    end
    @(posedge clk); #1 font_we = 0;
    for (int i = 0; i < 4096; i++) begin
      @(posedge clk); #1 mem_sel = 1; mem_we = 1; mem_addr = 12'(i); mem_din = 8'($urandom);
      if (i[0]) attrs[i / 2] = mem_din; else chars[i / 2] = mem_din;
    end
    @(posedge clk); #1 mem_we = 0; mem_addr = 12'd7;
    @(posedge clk); @(posedge clk); #1;
    check(mem_dout == attrs[3], "attribute read back");
    mem_addr = 12'd200; @(posedge clk); @(posedge clk); #1;
    check(mem_dout == chars[100], "character read back");
    mem_sel = 0;
    io_write(4'h4, 8'd10); io_write(4'h5, 8'h20);         // cursor off
    io_addr = 4'h5; #1 check(io_dout == 8'h20, "CRTC register read back");
    // video disabled: all black
    wait_frame(); wait_frame();
    check(hs_period == 800, $sformatf("line length %0d", hs_period));
    check(vs_period == 525, $sformatf("frame length %0d lines", vs_period));
    check(vs_pulse == 2, $sformatf("vsync %0d lines", vs_pulse));
    check(hs_len == 0 || hs_len == 96, "hsync pulse length");
    lit = 0; wait_frame();
    check(lit == 0, "blank while video disabled");
    io_write(4'h8, 8'h08);                                  // video on
    wait_frame();
    pix_err = 0; pix_checked = 0; compare = 1;
    wait_frame();
    compare = 0;
    check(pix_checked == 640 * 480, $sformatf("%0d pixels compared", pix_checked));
    check(pix_err == 0, $sformatf("%0d pixel mismatches", pix_err));
    check(lit > 1000, "something was displayed");
    // scroll one row through the start address
    io_write(4'h4, 8'd12); io_write(4'h5, 8'd0);
    io_write(4'h4, 8'd13); io_write(4'h5, 8'd80);
    start_addr = 80;
    wait_frame();
    pix_err = 0; pix_checked = 0; compare = 1;
    wait_frame();
    compare = 0;
    check(pix_err == 0, $sformatf("%0d pixel mismatches after scroll", pix_err));
    io_addr = 4'hA;
    @(negedge vsync_n); #1 check(io_dout[3] == 1'b1, "retrace status during vsync");
    @(posedge clk iff (x == 100 && y == 100)); #1 check(io_dout[3] == 1'b0, "no retrace status in the picture");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (4000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
