// pc_pkg - types and constants shared by the IBM 5150 motherboard modules.
//
// The 8088 announces each bus cycle on three active-low status lines S2..S0; the
// encoding below is the one the 8288 bus controller decodes.  The I/O base
// addresses are those of the IBM PC motherboard decoder (XA9..XA5, 32 ports per
// chip select) and of the colour text adapter on the I/O channel.  The
// interrupt vector base 0x08 is the value the PC BIOS programs into the 8259;
// the interrupt controller here takes it as a constant.
// The status encoding and the address map follow the PC; the struct and
// enum names are this design's own.
package pc_pkg;

  // 8088 status S2 S1 S0 (active low), as decoded by the 8288
  typedef enum logic [2:0] {
    ST_INTA    = 3'b000,
    ST_IOR     = 3'b001,
    ST_IOW     = 3'b010,
    ST_HALT    = 3'b011,
    ST_CODE    = 3'b100,
    ST_MEMR    = 3'b101,
    ST_MEMW    = 3'b110,
    ST_PASSIVE = 3'b111
  } bus_status_t;

  // System bus command strobes, all active low as on the I/O channel
  typedef struct packed {
    logic ior_n;
    logic iow_n;
    logic memr_n;
    logic memw_n;
  } bus_cmd_t;

  localparam bus_cmd_t CMD_IDLE = '{ior_n: 1'b1, iow_n: 1'b1, memr_n: 1'b1, memw_n: 1'b1};

  // Motherboard I/O chip-select bases (XA9 = XA8 = 0, selected by XA7..XA5)
  localparam logic [9:0] IO_DMA    = 10'h000;
  localparam logic [9:0] IO_PIC    = 10'h020;
  localparam logic [9:0] IO_PIT    = 10'h040;
  localparam logic [9:0] IO_PPI    = 10'h060;
  localparam logic [9:0] IO_DMAPG  = 10'h080;
  localparam logic [9:0] IO_NMI    = 10'h0A0;
  // Colour text adapter registers on the I/O channel
  localparam logic [9:0] IO_CGA    = 10'h3D0;

  // Memory map
  localparam logic [19:0] VIDEO_BASE = 20'hB8000;

  // 8259 vector base programmed by the PC BIOS (ICW2)
  localparam logic [7:0] PIC_VECTOR_BASE = 8'h08;

endpackage
