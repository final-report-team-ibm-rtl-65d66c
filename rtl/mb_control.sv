// mb_control - motherboard control logic of schematic section 2: wait states,
// DMA bus arbitration, the NMI mask register and NMI sources, the I/O channel
// check latch and RESET DRV.
//
// Wait states: rdy_wait (to the 8284 RDY input) goes low for one CLK period at
// the start of every I/O read or write command, giving each processor I/O
// cycle one wait state as on the PC, and stays low while an I/O channel card
// pulls I/O CH RDY low.  rdy_to_dma passes I/O CH RDY to the DMA controller.
//
// Arbitration: HRQ from the 8237 is granted (hlda, aen) at a CLK edge when the
// processor is not locking the bus and its bus interface is idle; the grant is
// dropped at the first CLK edge after HRQ falls.  dma_wait holds the
// processor's bus interface while the grant is pending or held.
//
// NMI: the mask flip-flop ALLOW NMI takes XD7 on every write to port 0xA0 and
// is cleared by reset.  NMI = ALLOW NMI and (memory parity error, or the
// latched I/O channel check, or the coprocessor's NMI request when the
// coprocessor-installed switch says it is present).  The channel-check latch
// is set by I/O CH CK# low while PB5 (ENABLE I/O CK#) is low and cleared
// while PB5 is high.  The combination follows the schematic's gates; turning
// its latches and one-shots into clocked logic is this design's choice.
module mb_control (
  input  logic clk,          // board clock
  input  logic ce,           // CLK rising-edge strobe
  input  logic reset,        // RESET from the 8284
  input  logic lock_n,       // LOCK# from the processor
  input  logic cpu_idle,     // processor bus interface idle
  input  logic io_cmd,       // an I/O read or write command is active
  input  logic io_ch_rdy,    // I/O CH RDY from the channel
  input  logic hrq,          // HRQ from the 8237
  input  logic nmi_reg_wr,   // write strobe for the NMI mask register
  input  logic xd7,          // data bit 7
  input  logic pck,          // memory parity error
  input  logic io_ch_ck_n,   // I/O CH CK# from the channel
  input  logic enable_io_ck_n, // PB5: enable I/O channel check, active low
  input  logic np_npi,       // coprocessor NMI request
  input  logic np_instl_sw,  // coprocessor installed switch
  output logic rdy_wait,     // to the 8284 RDY input
  output logic rdy_to_dma,   // ready to the 8237
  output logic hlda,         // hold acknowledge to the 8237
  output logic aen,          // DMA owns the address/command bus
  output logic dma_wait,     // hold the processor's bus interface
  output logic allow_nmi,    // NMI mask flip-flop
  output logic io_ch_ck,     // latched I/O channel check (to PC6 of the 8255)
  output logic nmi,          // NMI to the processor
  output logic reset_drv     // RESET DRV to the system
);

  logic io_wait_done;

  always_ff @(posedge clk) begin
    if (reset) begin
      io_wait_done <= 1'b0;
      hlda         <= 1'b0;
      reset_drv    <= 1'b1;
    end else if (ce) begin
      reset_drv    <= 1'b0;
      io_wait_done <= io_cmd;
      if (!hlda && hrq && lock_n && cpu_idle) hlda <= 1'b1;
      else if (hlda && !hrq)                  hlda <= 1'b0;
    end
  end

  always_ff @(posedge clk) begin
    if (reset)           allow_nmi <= 1'b0;
    else if (nmi_reg_wr) allow_nmi <= xd7;
  end

  always_ff @(posedge clk) begin
    if (reset || enable_io_ck_n) io_ch_ck <= 1'b0;
    else if (!io_ch_ck_n)        io_ch_ck <= 1'b1;
  end

  assign rdy_wait   = !(io_cmd && !io_wait_done) && io_ch_rdy;
  assign rdy_to_dma = io_ch_rdy;
  assign aen        = hlda;
  assign dma_wait   = hlda || hrq;
  assign nmi        = allow_nmi && (pck || io_ch_ck || (np_npi && np_instl_sw));

endmodule
