// pic_8259 - Intel 8259A interrupt controller in the configuration the PC BIOS
// sets up: single controller, edge-triggered requests, fixed priority (IR0
// highest), normal end-of-interrupt, vector base 0x08.
//
// A rising edge on IRn sets IRR bit n whatever the mask.  INT is raised while
// some unmasked IRR bit has higher priority than every bit in service.  The
// first INTA pulse moves the highest unmasked request from IRR to ISR; the
// second INTA pulse puts the vector 0x08 + n on dout (dout_oe = 1 while INTA
// is low).  An EOI command clears the ISR bit.
//
// Register interface (A0 is the port's low address bit, 0x20/0x21 on the PC):
//   write A0=1            OCW1: interrupt mask register
//   write A0=0, D4=1      ICW1: clears IRR, IMR and ISR and starts the ICW
//                         sequence; the ICW2/ICW4 writes that follow are
//                         accepted and ignored, the vector base and modes
//                         being fixed
//   write A0=0, D4..3=00  OCW2: 0x20 non-specific EOI, 0x60+n specific EOI
//   write A0=0, D4..3=01  OCW3: D1..0 = 10 read IRR, 11 read ISR
//   read  A0=1            IMR;  read A0=0  IRR or ISR as OCW3 chose
// Accesses are synchronous: wr and inta_stb are one-clock strobes at the
// start of the command.  The words swallowed after ICW1 (ICW2, and ICW4 when
// ICW1 bit 0 asks for it; ICW3 never, as the controller is single) follow the
// 8259A data sheet; the fixed configuration itself is the BIOS's.
// Configuring itself with vector base 08h instead of obeying the ICWs follows
// the reference design; keeping IRR edges while masked follows the 8259A.
module pic_8259
  import pc_pkg::*;
(
  input  logic       clk,       // board clock
  input  logic       rst,       // reset
  input  logic       cs,        // chip select (INTR CS)
  input  logic       a0,        // address bit 0
  input  logic       wr,        // write strobe, one clock
  input  logic [7:0] din,       // write data
  output logic [7:0] dout,      // register read data or vector
  output logic       dout_oe,   // 1 while the vector is on the bus
  input  logic [7:0] ir,        // interrupt requests IR7..IR0
  input  logic       inta_stb,  // one-clock strobe at the start of each INTA
  input  logic       inta_act,  // INTA command is active (low on the bus)
  output logic       int_out    // INT to the processor
);

  logic [7:0] irr, imr, isr, ir_q;
  logic       read_isr;
  logic       second_inta;
  logic       vec_out;      // second INTA in progress: vector on the bus
  logic [2:0] level;        // level chosen by the first INTA
  logic [1:0] icw_left;     // ICW words still to swallow
  logic       icw4_needed;

  // highest-priority bit of a vector (bit 0 is highest)
  function automatic logic [3:0] first_set(logic [7:0] v);
    for (int i = 0; i < 8; i++)
      if (v[i]) return {1'b1, 3'(i)};
    return 4'b0000;
  endfunction

  wire [3:0] req_pick = first_set(irr & ~imr);
  wire [3:0] isr_pick = first_set(isr);
  wire       pending  = req_pick[3] && (!isr_pick[3] || (req_pick[2:0] < isr_pick[2:0]));

  always_ff @(posedge clk) begin
    if (rst) begin
      irr <= '0; imr <= '0; isr <= '0; ir_q <= '0;
      read_isr <= 1'b0; second_inta <= 1'b0; vec_out <= 1'b0; level <= '0;
      icw_left <= '0; icw4_needed <= 1'b0;
    end else begin
      ir_q <= ir;
      // edge-triggered requests
      irr <= irr | (ir & ~ir_q);
      if (inta_stb) begin
        if (!second_inta) begin
          // first INTA: freeze the level, move it into service
          level <= req_pick[2:0];
          if (req_pick[3]) begin
            isr[req_pick[2:0]] <= 1'b1;
            irr[req_pick[2:0]] <= 1'b0;
          end
          second_inta <= 1'b1;
        end else begin
          second_inta <= 1'b0;
          vec_out     <= 1'b1;
        end
      end else if (!inta_act) begin
        vec_out <= 1'b0;
      end
      if (cs && wr) begin
        if (a0) begin
          if (icw_left != 0) begin
            // ICW2 / ICW4: fixed configuration, nothing to store
            icw_left <= (icw_left == 2'd2 && icw4_needed) ? 2'd1 : 2'd0;
          end else begin
            imr <= din;
          end
        end else if (din[4]) begin
          // ICW1
          imr <= '0; isr <= '0; irr <= '0; read_isr <= 1'b0;
          icw_left <= 2'd2; icw4_needed <= din[0];
        end else if (!din[3]) begin
          // OCW2
          unique case (din[7:5])
            3'b001: if (isr_pick[3]) isr[isr_pick[2:0]] <= 1'b0;   // non-specific EOI
            3'b011: isr[din[2:0]] <= 1'b0;                          // specific EOI
            default: ;
          endcase
        end else begin
          // OCW3
          if (din[1]) read_isr <= din[0];
        end
      end
    end
  end

  assign int_out = pending;
  assign dout_oe = inta_act && vec_out;

  always_comb begin
    if (inta_act)  dout = PIC_VECTOR_BASE + {5'd0, level};
    else if (a0)   dout = imr;
    else           dout = read_isr ? isr : irr;
  end

endmodule
