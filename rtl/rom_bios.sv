// rom_bios - the 64 KB system ROM at F0000-FFFFF holding BIOS and BASIC,
// built as eight 8 KB banks selected by the decoder's CS0..CS7 (A15..A13).
//
// The processor can only read it: a bank answers when its chip select is
// active, with the byte at A12..A0, one board clock after the address (block
// memory read).  dout is 0xFF when no bank is selected.  The image is put in
// before the system is released from reset through the load port (load_we,
// 16-bit load_addr), which stands for programming the ROM image into the
// memory; on the PC banks 0 and 1 (F0000-F3FFF) are empty sockets and a 64 KB
// image leaves them free.
//
// Size and banking follow the PC (eight 8 KB chips); the load port, the
// registered read and the FFh idle value are this design's choices.
module rom_bios #(
  parameter int unsigned BANKS      = 8,     // 8 KB banks
  parameter int unsigned BANK_BYTES = 8192   // bytes per bank
) (
  input  logic                            clk,       // board clock
  input  logic [BANKS-1:0]                cs,        // bank chip selects
  input  logic [$clog2(BANK_BYTES)-1:0]   a,         // A12..A0
  output logic [7:0]                      dout,      // read data
  input  logic                            load_we,   // image load strobe
  input  logic [$clog2(BANKS*BANK_BYTES)-1:0] load_addr, // image byte address
  input  logic [7:0]                      load_data  // image byte
);


  logic [7:0]         mem [BANKS*BANK_BYTES];
  logic [7:0]         q;
  logic               any_q;
  logic [$clog2(BANKS)-1:0] bank;

  always_comb begin
    bank = '0;
    for (int i = 0; i < int'(BANKS); i++)
      if (cs[i]) bank = i[$clog2(BANKS)-1:0];
  end

  always_ff @(posedge clk) begin
    if (load_we) mem[load_addr] <= load_data;
    q     <= mem[{bank, a}];
    any_q <= |cs;
  end

  assign dout = any_q ? q : 8'hFF;


endmodule
