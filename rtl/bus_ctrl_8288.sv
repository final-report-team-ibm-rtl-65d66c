// bus_ctrl_8288 - Intel 8288 bus controller, system-bus mode only.
//
// The processor's status S2..S0 selects one command: 000 INTA, 001 I/O read,
// 010 I/O write, 100 code fetch and 101 memory read (both MRDC), 110 memory
// write; 011 (halt) and 111 (passive) issue none.  A cycle starts when the
// status leaves passive: at the next CLK edge (T1) ALE pulses for one CLK
// period and the status is held; from the following CLK edge (T2) the command
// and DEN are active until the CLK edge after the status returns to passive
// (T4).  DT/R is low for reads and INTA, high otherwise.
//
// AEN_N high forces every command inactive (high); CEN low stands for the
// 8288 releasing its outputs, shown by cmd_oe = 0 so the motherboard can let
// the DMA controller drive the command lines.  The I/O-bus strap, the late
// write strobes MWTC/IOWC and MCE/PDEN are not built, as on the PC they are
// tied off or unused.  Everything is clocked by the board clock with the CLK
// rising-edge strobe as enable.
module bus_ctrl_8288
  import pc_pkg::*;
(
  input  logic        clk,       // board clock
  input  logic        ce,        // CLK rising-edge strobe
  input  logic        rst,       // system reset
  input  bus_status_t s_n,       // S2..S0 from the processor
  input  logic        aen_n,     // address enable (low: commands allowed)
  input  logic        cen,       // command enable (low: outputs released)
  output logic        ale,       // address latch enable, T1
  output logic        dtr,       // data transmit (1) / receive (0)
  output logic        den,       // data enable, active high
  output logic        inta_n,    // interrupt acknowledge
  output logic        iorc_n,    // I/O read command
  output logic        aiowc_n,   // advanced I/O write command
  output logic        mrdc_n,    // memory read command
  output logic        amwc_n,    // advanced memory write command
  output logic        cmd_oe     // 1 while the 8288 drives the command lines
);

  typedef enum logic [1:0] {P_IDLE, P_T1, P_CMD} phase_t;
  phase_t      phase;
  bus_status_t st_q;

  always_ff @(posedge clk) begin
    if (rst) begin
      phase <= P_IDLE;
      st_q  <= ST_PASSIVE;
    end else if (ce) begin
      unique case (phase)
        P_IDLE: if (s_n != ST_PASSIVE) begin
                  phase <= P_T1;
                  st_q  <= s_n;
                end
        P_T1:   phase <= P_CMD;
        P_CMD:  if (s_n == ST_PASSIVE) phase <= P_IDLE;
        default: phase <= P_IDLE;
      endcase
    end
  end

  wire active = (phase == P_CMD) && !aen_n;

  always_comb begin
    inta_n  = 1'b1;
    iorc_n  = 1'b1;
    aiowc_n = 1'b1;
    mrdc_n  = 1'b1;
    amwc_n  = 1'b1;
    if (active) begin
      unique case (st_q)
        ST_INTA:           inta_n  = 1'b0;
        ST_IOR:            iorc_n  = 1'b0;
        ST_IOW:            aiowc_n = 1'b0;
        ST_CODE, ST_MEMR:  mrdc_n  = 1'b0;
        ST_MEMW:           amwc_n  = 1'b0;
        default: ;
      endcase
    end
  end

  assign ale    = (phase == P_T1);
  assign den    = active && (st_q != ST_HALT) && (st_q != ST_PASSIVE);
  assign dtr    = !(st_q == ST_INTA || st_q == ST_IOR || st_q == ST_CODE || st_q == ST_MEMR);
  assign cmd_oe = cen;

endmodule
