// kbd_ps2_rx - keyboard receive path: PS/2 receiver, scan-code set 2 to set 1
// translation and the IRQ1 data latch of the PC keyboard interface.
//
// The PS/2 keyboard sends 11-bit frames (start 0, eight data bits LSB first,
// odd parity, stop 1), data valid on the falling edge of the keyboard clock.
// Both lines are synchronised to the board clock and a frame is shifted in on
// falling clock edges; a frame with bad start, parity or stop bit is dropped,
// and a clock that stays high for FRAME_TIMEOUT board cycles restarts the
// frame.  Received set-2 codes are translated to set 1, the code set of the
// original PC keyboard: 0xF0 marks the next code as a key release, which in
// set 1 is the make code with bit 7 set; 0xE0 prefixes are dropped, so
// extended keys map onto their 83-key counterparts; codes with no 83-key
// equivalent are ignored.
//
// A translated code, or a code injected by the keyboard loader (inj_stb), is
// held in the data latch and IRQ1 is raised.  The processor reads the code
// from 8255 port A and acknowledges by setting PB7 (ack = 1), which clears the
// latch and IRQ1; no new code is latched while ack is high.  Codes that arrive
// while the latch is full are dropped.  busy tells the loader that the latch
// is full or a frame is being received.
// Receiving PS/2 directly, translating set 2 to set 1 and the acknowledge
// handshake follow the reference design; the frame time-out, dropping codes
// while the latch is full and ignoring keys the 83-key keyboard lacked are
// this design's choices.
module kbd_ps2_rx #(
  parameter int unsigned FRAME_TIMEOUT = 10000  // 100 us at 100 MHz
) (
  input  logic       clk,       // board clock
  input  logic       rst,       // reset
  input  logic       ps2_clk,   // PS/2 clock from the keyboard
  input  logic       ps2_data,  // PS/2 data from the keyboard
  input  logic       ack,       // PB7: clear IRQ1 and the data latch
  input  logic       inj_stb,   // inject a set-1 code (keyboard loader)
  input  logic [7:0] inj_code,  // injected set-1 code
  output logic [7:0] scan_code, // set-1 code in the data latch
  output logic       irq,       // IRQ1
  output logic       busy       // latch full or frame in progress
);

  // set 2 make code -> set 1 make code for the 83 keys of the PC keyboard
  function automatic logic [7:0] set2_to_set1(logic [7:0] c);
    unique case (c)
      8'h76: return 8'h01; 8'h16: return 8'h02; 8'h1E: return 8'h03; 8'h26: return 8'h04;
      8'h25: return 8'h05; 8'h2E: return 8'h06; 8'h36: return 8'h07; 8'h3D: return 8'h08;
      8'h3E: return 8'h09; 8'h46: return 8'h0A; 8'h45: return 8'h0B; 8'h4E: return 8'h0C;
      8'h55: return 8'h0D; 8'h66: return 8'h0E; 8'h0D: return 8'h0F; 8'h15: return 8'h10;
      8'h1D: return 8'h11; 8'h24: return 8'h12; 8'h2D: return 8'h13; 8'h2C: return 8'h14;
      8'h35: return 8'h15; 8'h3C: return 8'h16; 8'h43: return 8'h17; 8'h44: return 8'h18;
      8'h4D: return 8'h19; 8'h54: return 8'h1A; 8'h5B: return 8'h1B; 8'h5A: return 8'h1C;
      8'h14: return 8'h1D; 8'h1C: return 8'h1E; 8'h1B: return 8'h1F; 8'h23: return 8'h20;
      8'h2B: return 8'h21; 8'h34: return 8'h22; 8'h33: return 8'h23; 8'h3B: return 8'h24;
      8'h42: return 8'h25; 8'h4B: return 8'h26; 8'h4C: return 8'h27; 8'h52: return 8'h28;
      8'h0E: return 8'h29; 8'h12: return 8'h2A; 8'h5D: return 8'h2B; 8'h1A: return 8'h2C;
      8'h22: return 8'h2D; 8'h21: return 8'h2E; 8'h2A: return 8'h2F; 8'h32: return 8'h30;
      8'h31: return 8'h31; 8'h3A: return 8'h32; 8'h41: return 8'h33; 8'h49: return 8'h34;
      8'h4A: return 8'h35; 8'h59: return 8'h36; 8'h7C: return 8'h37; 8'h11: return 8'h38;
      8'h29: return 8'h39; 8'h58: return 8'h3A; 8'h05: return 8'h3B; 8'h06: return 8'h3C;
      8'h04: return 8'h3D; 8'h0C: return 8'h3E; 8'h03: return 8'h3F; 8'h0B: return 8'h40;
      8'h83: return 8'h41; 8'h0A: return 8'h42; 8'h01: return 8'h43; 8'h09: return 8'h44;
      8'h77: return 8'h45; 8'h7E: return 8'h46; 8'h6C: return 8'h47; 8'h75: return 8'h48;
      8'h7D: return 8'h49; 8'h7B: return 8'h4A; 8'h6B: return 8'h4B; 8'h73: return 8'h4C;
      8'h74: return 8'h4D; 8'h79: return 8'h4E; 8'h69: return 8'h4F; 8'h72: return 8'h50;
      8'h7A: return 8'h51; 8'h70: return 8'h52; 8'h71: return 8'h53;
      default: return 8'h00;   // no 83-key equivalent
    endcase
  endfunction

  logic [2:0]  clk_sync, dat_sync;
  logic [3:0]  bitcnt;
  logic [9:0]  shreg;           // data, parity, stop (start is checked on entry)
  logic [$clog2(FRAME_TIMEOUT+1)-1:0] idle_cnt;
  logic        brk;             // F0 seen
  logic        full;

  wire fall   = clk_sync[2] & ~clk_sync[1];
  wire ps2_d  = dat_sync[1];

  // frame receiver
  logic       frame_ok;
  logic [7:0] frame_byte;

  always_ff @(posedge clk) begin
    if (rst) begin
      clk_sync <= 3'b111; dat_sync <= 3'b111;
      bitcnt <= '0; shreg <= '0; idle_cnt <= '0;
      frame_ok <= 1'b0; frame_byte <= '0;
    end else begin
      clk_sync <= {clk_sync[1:0], ps2_clk};
      dat_sync <= {dat_sync[1:0], ps2_data};
      frame_ok <= 1'b0;
      if (fall) begin
        idle_cnt <= '0;
        if (bitcnt == 4'd0) begin
          if (!ps2_d) bitcnt <= 4'd1;          // start bit
        end else begin
          shreg <= {ps2_d, shreg[9:1]};
          if (bitcnt == 4'd10) begin
            bitcnt <= '0;
            // shreg[9:1] now holds data[7:0], parity; ps2_d is the stop bit
            if (ps2_d && (^shreg[9:1]) == 1'b1) begin
              frame_ok   <= 1'b1;
              frame_byte <= shreg[8:1];
            end
          end else begin
            bitcnt <= bitcnt + 4'd1;
          end
        end
      end else if (bitcnt != 4'd0) begin
        if (32'(idle_cnt) == FRAME_TIMEOUT) bitcnt <= '0;
        else idle_cnt <= idle_cnt + 1'b1;
      end
    end
  end

  // translation and IRQ1 latch
  wire [7:0] xlat = set2_to_set1(frame_byte);

  always_ff @(posedge clk) begin
    if (rst) begin
      brk <= 1'b0; full <= 1'b0; scan_code <= '0;
    end else if (ack) begin
      full <= 1'b0; scan_code <= '0;
      if (frame_ok) brk <= (frame_byte == 8'hF0) ? 1'b1 : (frame_byte == 8'hE0) ? brk : 1'b0;
    end else begin
      if (frame_ok) begin
        if (frame_byte == 8'hF0) begin
          brk <= 1'b1;
        end else if (frame_byte != 8'hE0) begin
          brk <= 1'b0;
          if (!full && xlat != 8'h00) begin
            scan_code <= {brk, xlat[6:0]};
            full      <= 1'b1;
          end
        end
      end else if (inj_stb && !full) begin
        scan_code <= inj_code;
        full      <= 1'b1;
      end
    end
  end

  assign irq  = full;
  assign busy = full || (bitcnt != 4'd0);

endmodule
