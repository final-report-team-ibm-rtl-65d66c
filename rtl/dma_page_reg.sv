// dma_page_reg - the 74LS670 4 x 4 register file that supplies address bits
// A19..A16 during DMA transfers (the 8237 itself only counts 16 bits).
//
// The CPU writes a page with OUT to ports 0x80-0x83 (wr strobe, index from
// XA1..XA0, data XD3..XD0).  During a transfer the read index is formed from
// the DACK2 and DACK3 lines, {DACK2#, DACK3#}, so channel 2 reads entry 1
// (port 0x81), channel 3 entry 2 (0x82) and channels 0 and 1 entry 3 (0x83).
// That index wiring follows the PC's port assignment for the DMA pages; the
// register file has no read-back to the CPU, as on the motherboard.
module dma_page_reg (
  input  logic       clk,      // board clock
  input  logic       rst,      // reset
  input  logic       wr,       // write strobe (WRT DMA PG REG)
  input  logic [1:0] wa,       // write index XA1..XA0
  input  logic [3:0] din,      // XD3..XD0
  input  logic       dack2_n,  // DACK2, active low
  input  logic       dack3_n,  // DACK3, active low
  output logic [3:0] page      // A19..A16 for the current transfer
);

  logic [3:0] regs [4];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < 4; i++) regs[i] <= 4'h0;
    end else if (wr) begin
      regs[wa] <= din;
    end
  end

  assign page = regs[{dack2_n, dack3_n}];

endmodule
