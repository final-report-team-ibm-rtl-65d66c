// ram_256k - system RAM, 256 KB in four 64 KB banks at 00000-3FFFF.
//
// The decoder selects a bank from A17..A16; within it A15..A0 address a byte.
// A write happens on the board clock where `we` (the leading edge of MEMW#) is
// high; reads give the byte one board clock after the address (block memory).
// The row/column strobes and the ninth parity bit of the original DRAM banks
// are not built: parity is never stored and parity_err is always 0, which
// the 8255 and the NMI logic read as "no parity error".
//
// Size and banking follow the PC with all four banks fitted; block memory in
// place of DRAM and the missing parity store follow the simplifications of
// the reference design.
module ram_256k #(
  parameter int unsigned BANKS      = 4,      // 64 KB banks
  parameter int unsigned BANK_BYTES = 65536   // bytes per bank
) (
  input  logic                          clk,        // board clock
  input  logic [BANKS-1:0]              bank_sel,   // bank selects
  input  logic [$clog2(BANK_BYTES)-1:0] a,          // A15..A0
  input  logic                          we,         // write strobe
  input  logic [7:0]                    din,        // write data
  output logic [7:0]                    dout,       // read data
  output logic                          parity_err  // memory parity check (PCK)
);

  logic [7:0] mem [BANKS*BANK_BYTES];
  logic [$clog2(BANKS)-1:0] bank;
  logic [7:0] q;
  logic       sel_q;

  always_comb begin
    bank = '0;
    for (int i = 0; i < int'(BANKS); i++)
      if (bank_sel[i]) bank = i[$clog2(BANKS)-1:0];
  end

  always_ff @(posedge clk) begin
    if (we && |bank_sel) mem[{bank, a}] <= din;
    q     <= mem[{bank, a}];
    sel_q <= |bank_sel;
  end

  assign dout       = sel_q ? q : 8'hFF;
  assign parity_err = 1'b0;

endmodule
