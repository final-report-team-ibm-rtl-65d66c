// pit_8253 - Intel 8253 programmable interval timer, three channels.
//
// Ports at A1..A0: 0..2 counter data, 3 control word.  Control word fields:
// SC (D7..D6) selects the counter, RL (D5..D4) the access order (00 latches
// the count), M (D3..D1) the mode, D0 BCD (ignored: counting is binary only).
// Only the modes the PC BIOS programs are built: 0 (interrupt on terminal
// count), 2 (rate generator) and 3 (square wave), see pit_counter.
//
// On the PC the counters are clocked at 1.19 MHz (PCLK / 2) given here as the
// `tick` enable; channel 0 (18.2 Hz square wave, count 65536) drives IRQ0,
// channel 1 (rate generator, count 18, about 66 kHz) requests the refresh DMA,
// and channel 2 (square wave, 896 Hz with count 1331) drives the speaker with
// its GATE from the 8255.  Register accesses are one-clock strobes; reads
// return data combinationally while the chip is selected.
//
// The three modes, binary-only counting and the channel roles follow the
// PC's use of the chip; the register strobes and the shared tick enable are
// this design's choices.
module pit_8253 (
  input  logic       clk,    // board clock
  input  logic       rst,    // reset
  input  logic       tick,   // counter clock enable
  input  logic       cs,     // chip select (T/C CS)
  input  logic [1:0] a,      // A1..A0
  input  logic       wr,     // write strobe
  input  logic       rd,     // read strobe (end of read)
  input  logic [7:0] din,    // write data
  output logic [7:0] dout,   // read data
  input  logic [2:0] gate,   // GATE2..GATE0
  output logic [2:0] out     // OUT2..OUT0
);

  logic [7:0] cnt_dout [3];
  wire        ctrl = cs && wr && (a == 2'd3);

  for (genvar i = 0; i < 3; i++) begin : g_cnt
    pit_counter u_cnt (
      .clk       (clk),
      .rst       (rst),
      .tick      (tick),
      .gate      (gate[i]),
      .ctrl_wr   (ctrl && din[7:6] == 2'(i) && din[5:4] != 2'b00),
      .latch_cmd (ctrl && din[7:6] == 2'(i) && din[5:4] == 2'b00),
      .rl        (din[5:4]),
      .mode      (din[3:1]),
      .wr        (cs && wr && a == 2'(i)),
      .rd        (cs && rd && a == 2'(i)),
      .din       (din),
      .dout      (cnt_dout[i]),
      .out       (out[i])
    );
  end

  assign dout = (a == 2'd3) ? 8'hFF : cnt_dout[a];

endmodule
