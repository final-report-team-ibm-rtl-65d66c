// ppi_8255 - Intel 8255A peripheral interface reduced to the one configuration
// the PC BIOS uses: control word 0x99, mode 0, port A input, port B output,
// port C (upper and lower) input.
//
// Ports at A1..A0: 0 reads PA, 1 writes/reads the PB output latch, 2 reads PC,
// 3 is the control register.  A control word with D7 = 1 is stored and can be
// checked on mode_word (the BIOS writes 0x99 once at start-up); the port
// directions do not follow it, they stay fixed as above.  A bit set/reset word
// (D7 = 0) addresses port C, which is all input here, so it changes nothing.
// Reset clears PB, like the 8255's reset clears its output latches.  Writes
// are one-clock strobes; reads are combinational.
// Fixing the directions to the BIOS's control word 99h follows the reference
// design; storing other mode words without effect is this design's choice.
module ppi_8255 (
  input  logic       clk,        // board clock
  input  logic       rst,        // reset
  input  logic       cs,         // chip select (PPI CS)
  input  logic [1:0] a,          // A1..A0
  input  logic       wr,         // write strobe
  input  logic [7:0] din,        // write data
  output logic [7:0] dout,       // read data
  input  logic [7:0] pa_in,      // port A inputs
  input  logic [7:0] pc_in,      // port C inputs
  output logic [7:0] pb_out,     // port B output latch
  output logic [7:0] mode_word   // last mode-set control word
);

  always_ff @(posedge clk) begin
    if (rst) begin
      pb_out    <= 8'h00;
      mode_word <= 8'h9B;   // 8255 reset state: all ports input, mode 0
    end else if (cs && wr) begin
      unique case (a)
        2'd1: pb_out <= din;
        2'd3: if (din[7]) begin
                mode_word <= din;
                pb_out    <= 8'h00;  // a mode set clears the output latches
              end
        default: ;
      endcase
    end
  end

  always_comb begin
    unique case (a)
      2'd0:    dout = pa_in;
      2'd1:    dout = pb_out;
      2'd2:    dout = pc_in;
      default: dout = 8'hFF;
    endcase
  end

endmodule
