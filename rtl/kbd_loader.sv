// kbd_loader - plays a stored list of set-1 keystrokes into the keyboard path,
// so that a BASIC program can be "typed" into the interpreter at the press of
// a button.
//
// The keystroke memory (DEPTH bytes) is written through the prog_* port before
// use.  After a press of `start` the FSM repeats, for each of num_keys codes:
//   WAIT_IDLE  wait until the keyboard receiver is idle (kbd_busy = 0)
//   SEND       inject the code as if it came from the keyboard (inj_stb)
//   WAIT_ACK   wait for the processor's acknowledge (PB7 high)
//   GAP        count GAP_CYCLES board cycles, so that the BIOS keyboard buffer
//              is not overrun, then move to the next code
// and returns to idle when all have been sent.  The gap length is a
// calibration value; the default here (5 ms) is this design's choice.
module kbd_loader #(
  parameter int unsigned DEPTH      = 4096,    // keystroke memory size
  parameter int unsigned GAP_CYCLES = 500000   // pause after each acknowledge
) (
  input  logic                     clk,        // board clock
  input  logic                     rst,        // reset
  input  logic                     start,      // front-panel button
  input  logic [$clog2(DEPTH):0]   num_keys,   // number of keystrokes to send
  input  logic                     kbd_busy,   // keyboard receiver not idle
  input  logic                     ack,        // PB7 acknowledge from the CPU
  output logic                     inj_stb,    // inject strobe to the receiver
  output logic [7:0]               inj_code,   // code to inject
  output logic                     active,     // a load is in progress
  input  logic                     prog_we,    // keystroke memory write
  input  logic [$clog2(DEPTH)-1:0] prog_addr,  // keystroke memory address
  input  logic [7:0]               prog_data   // keystroke memory data
);

  typedef enum logic [2:0] {L_IDLE, L_WAIT_IDLE, L_SEND, L_WAIT_ACK, L_GAP} lstate_t;
  lstate_t state;

  logic [7:0]                 mem [DEPTH];
  logic [$clog2(DEPTH):0]     idx;
  logic [$clog2(GAP_CYCLES+1)-1:0] gap;
  logic [7:0]                 code_q;

  always_ff @(posedge clk) begin
    if (prog_we) mem[prog_addr] <= prog_data;
    code_q <= mem[idx[$clog2(DEPTH)-1:0]];
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= L_IDLE; idx <= '0; gap <= '0; inj_stb <= 1'b0; inj_code <= '0;
    end else begin
      inj_stb <= 1'b0;
      unique case (state)
        L_IDLE:      if (start && num_keys != 0) begin
                       idx   <= '0;
                       state <= L_WAIT_IDLE;
                     end
        L_WAIT_IDLE: if (!kbd_busy && !ack) state <= L_SEND;
        L_SEND:      begin
                       inj_stb  <= 1'b1;
                       inj_code <= code_q;
                       state    <= L_WAIT_ACK;
                     end
        L_WAIT_ACK:  if (ack) begin
                       gap   <= '0;
                       state <= L_GAP;
                     end
        L_GAP:       if (32'(gap) >= GAP_CYCLES) begin
                       if (idx + 1'b1 == num_keys) state <= L_IDLE;
                       else                        state <= L_WAIT_IDLE;
                       idx <= idx + 1'b1;
                     end else begin
                       gap <= gap + 1'b1;
                     end
        default:     state <= L_IDLE;
      endcase
    end
  end

  assign active = (state != L_IDLE);

endmodule
