// cpu_bus_if - 8088 bus interface wrapped around a 16-bit processor core.
//
// The core asks for one memory or I/O access at a time (byte or word) and is
// halted (core_halt = 1) until the access is done.  The wrapper turns each
// request into 8-bit 8088 bus cycles: a word becomes two byte cycles, low byte
// at the address and high byte at address + 1.  An interrupt acknowledge
// request becomes the two INTA cycles of the 8088; the vector read in the
// second one is returned in core_rdata[7:0].
//
// Cycle timing in CLK periods (all state changes on the CLK strobe `ce`):
//   S_TS    status S2..S0 and the address have just been put out (S_IDLE
//           does this for the first byte, S_STAT for the second); the 8288
//           sees them at the next edge
//   S_T1    ALE from the 8288
//   S_T2    command active
//   S_T3    READY is sampled at the end; while it is low the wrapper stays in
//           S_T3 (wait states) and read data is captured when it is high
//   S_T4    status passive; the 8288 ends the command
// A new cycle is not started while the DMA controller requests or holds the
// bus (hold_req or hlda).  INTR reaches the core only while the core reports
// it is in its instruction-fetch state, so an interrupt can never be taken in
// the middle of a long execute phase.
//
// Halting the core for each access, splitting words into two byte cycles
// and gating INTR to the fetch state follow the reference design; the
// request/done handshake and the exact state sequence are this design's.
module cpu_bus_if
  import pc_pkg::*;
(
  input  logic        clk,          // board clock
  input  logic        ce,           // CLK rising-edge strobe
  input  logic        rst,          // system reset
  // core side
  input  logic        core_req,     // access request, held until core_done
  input  logic        core_io,      // 1: I/O space, 0: memory
  input  logic        core_we,      // 1: write
  input  logic        core_word,    // 1: 16-bit access
  input  logic        core_code,    // 1: instruction fetch (status 100)
  input  logic        core_inta,    // 1: interrupt acknowledge sequence
  input  logic [19:0] core_addr,    // byte address (I/O: low 16 bits)
  input  logic [15:0] core_wdata,   // write data
  input  logic        core_fetch,   // core is in its fetch state
  input  logic        intr,         // INTR from the 8259
  output logic [15:0] core_rdata,   // read data / interrupt vector
  output logic        core_done,    // one-cycle strobe: access complete
  output logic        core_halt,    // halt the core while an access runs
  output logic        core_intr,    // INTR gated to the fetch state
  // 8088 bus side
  output bus_status_t s_n,          // S2..S0
  output logic [19:0] addr,         // address A19..A0
  output logic [7:0]  dout,         // write data D7..D0
  input  logic [7:0]  din,          // read data D7..D0
  input  logic        ready,        // READY from the 8284
  input  logic        hold_req,     // DMA requests the bus
  input  logic        hlda,         // DMA holds the bus
  output logic        bus_idle      // between bus cycles (DMA may take the bus)
);

  typedef enum logic [2:0] {S_IDLE, S_STAT, S_TS, S_T1, S_T2, S_T3, S_T4, S_DONE} state_t;
  state_t      state;
  logic        second;   // working on the second byte / second INTA
  logic [15:0] rdata;

  wire         two_cycles = core_inta | core_word;

  function automatic bus_status_t status_of(logic io, logic we, logic code, logic inta);
    if (inta)      return ST_INTA;
    else if (io)   return we ? ST_IOW : ST_IOR;
    else if (we)   return ST_MEMW;
    else if (code) return ST_CODE;
    else           return ST_MEMR;
  endfunction

  always_ff @(posedge clk) begin
    if (rst) begin
      state     <= S_IDLE;
      second    <= 1'b0;
      rdata     <= '0;
      s_n       <= ST_PASSIVE;
      addr      <= '0;
      dout      <= '0;
      core_done <= 1'b0;
    end else begin
      core_done <= 1'b0;
      if (ce) begin
        unique case (state)
          S_IDLE: if (core_req && !hold_req && !hlda) begin
                    s_n    <= status_of(core_io, core_we, core_code, core_inta);
                    addr   <= core_io ? {4'h0, core_addr[15:0]} : core_addr;
                    dout   <= core_wdata[7:0];
                    second <= 1'b0;
                    state  <= S_TS;
                  end
          S_STAT: if (!hold_req && !hlda) begin
                    s_n   <= status_of(core_io, core_we, core_code, core_inta);
                    addr  <= core_inta ? addr : (core_io ? {4'h0, core_addr[15:0] + 16'd1}
                                                         : core_addr + 20'd1);
                    dout  <= core_wdata[15:8];
                    state <= S_TS;
                  end
          S_TS:   state <= S_T1;
          S_T1:   state <= S_T2;
          S_T2:   state <= S_T3;
          S_T3:   if (ready) begin
                    if (second) rdata[15:8] <= din;
                    else        rdata[7:0]  <= din;
                    s_n   <= ST_PASSIVE;
                    state <= S_T4;
                  end
          S_T4:   if (two_cycles && !second) begin
                    second <= 1'b1;
                    state  <= S_STAT;
                  end else begin
                    state     <= S_DONE;
                    core_done <= 1'b1;
                  end
          S_DONE: state <= S_IDLE;   // one CLK for the core to drop its request
          default: state <= S_IDLE;
        endcase
      end
    end
  end

  // The vector comes in the second INTA cycle; a byte access leaves the high byte 0
  always_comb begin
    if (core_inta)      core_rdata = {8'h00, rdata[15:8]};
    else if (core_word) core_rdata = rdata;
    else                core_rdata = {8'h00, rdata[7:0]};
  end

  assign core_halt = core_req && !core_done;
  assign core_intr = intr && core_fetch;
  assign bus_idle  = (state == S_IDLE) || (state == S_STAT) || (state == S_DONE);

endmodule
