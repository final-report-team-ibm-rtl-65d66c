// clkgen_8284 - clock generator in the role of the Intel 8284A.
//
// All clocks are derived from the 100 MHz board clock by counters, as on the
// original design the PC clocks come from one crystal.  With a 10 ns base
// period the outputs are:
//   CLK   210 ns, high 70 ns (33 % duty) - 4.77 MHz processor/bus clock
//   PCLK  420 ns, 50 % duty               - peripheral clock (CLK / 2)
//   OSC    70 ns, high 40 ns (57.1 %)     - stands in for the 14.318 MHz oscillator
//   VCLK   40 ns, 50 % duty               - pixel clock for the video unit
// The periods and duty cycles are those the design calls for; the exact high
// times of CLK and OSC within the period are this design's choice.  The rest of
// the system runs on the board clock and uses the one-cycle *_rise strobes as
// clock enables rather than the derived clocks themselves.
//
// READY is the RDY input registered at the start of each CLK period, so a
// wait request seen during T3 holds the processor for whole CLK periods.
// RESET is asserted while PWR GOOD is low and is released at the start of a
// CLK period after PWR GOOD has been high for RESET_HOLD CLK periods.
module clkgen_8284 #(
  parameter int unsigned CLK_DIV    = 21, // board cycles per CLK period (210 ns)
  parameter int unsigned CLK_HIGH   = 7,  // board cycles CLK is high (33 %)
  parameter int unsigned OSC_DIV    = 7,  // board cycles per OSC period (70 ns)
  parameter int unsigned OSC_HIGH   = 4,  // board cycles OSC is high (57.1 %)
  parameter int unsigned VCLK_DIV   = 4,  // board cycles per VCLK period (40 ns)
  parameter int unsigned RESET_HOLD = 4   // CLK periods RESET outlasts PWR GOOD
) (
  input  logic clk,        // 100 MHz board clock
  input  logic pwr_good,   // power good; low resets the system
  input  logic rdy,        // ready request from the wait-state logic (RDY/WAIT)
  output logic clk88,      // CLK, processor clock
  output logic clk88_rise, // one board cycle strobe at each CLK rising edge
  output logic pclk,       // PCLK, peripheral clock
  output logic pclk_rise,  // strobe at each PCLK rising edge
  output logic osc,        // OSC output
  output logic vclk,       // VCLK video clock
  output logic vclk_rise,  // strobe at each VCLK rising edge
  output logic ready,      // READY to the processor
  output logic reset       // RESET to the processor and system, active high
);

  logic [$clog2(CLK_DIV)-1:0]  clk_cnt;
  logic [$clog2(OSC_DIV)-1:0]  osc_cnt;
  logic [$clog2(VCLK_DIV)-1:0] vclk_cnt;
  logic [$clog2(RESET_HOLD+1):0] rst_cnt;
  logic pclk_q;

  wire clk_wrap  = (32'(clk_cnt)  == CLK_DIV - 1);
  wire osc_wrap  = (32'(osc_cnt)  == OSC_DIV - 1);
  wire vclk_wrap = (32'(vclk_cnt) == VCLK_DIV - 1);

  always_ff @(posedge clk) begin
    clk_cnt  <= clk_wrap  ? '0 : clk_cnt + 1'b1;
    osc_cnt  <= osc_wrap  ? '0 : osc_cnt + 1'b1;
    vclk_cnt <= vclk_wrap ? '0 : vclk_cnt + 1'b1;
    if (clk_wrap) pclk_q <= ~pclk_q;
  end

  // READY and RESET change only at CLK period boundaries
  always_ff @(posedge clk) begin
    if (!pwr_good) begin
      rst_cnt <= '0;
      reset   <= 1'b1;
      ready   <= 1'b0;
    end else if (clk_wrap) begin
      ready <= rdy;
      if (32'(rst_cnt) != RESET_HOLD)
        rst_cnt <= rst_cnt + 1'b1;
      else
        reset <= 1'b0;
    end
  end

  assign clk88      = (32'(clk_cnt) < CLK_HIGH);
  assign clk88_rise = clk_wrap;
  assign pclk       = pclk_q;
  assign pclk_rise  = clk_wrap & ~pclk_q;
  assign osc        = (32'(osc_cnt) < OSC_HIGH);
  assign vclk       = (32'(vclk_cnt) < VCLK_DIV / 2);
  assign vclk_rise  = vclk_wrap;

endmodule
