// pit_counter - one 16-bit counter of the 8253 interval timer.
//
// Binary count-down only (no BCD), in the three modes the PC uses:
//   mode 0  interrupt on terminal count: OUT goes low when the mode is written,
//           counting starts on the tick after the count is written and OUT
//           goes high when the count reaches zero; GATE low pauses counting
//   mode 2  rate generator: OUT is high and goes low for one tick when the
//           count reaches 1, then the count reloads
//   mode 3  square wave: the count steps by 2; OUT is high for ceil(N/2) ticks
//           and low for floor(N/2) ticks
// In modes 2 and 3 GATE low forces OUT high and stops counting, and a rising
// GATE reloads the count.  A count of 0 stands for 65536.  Modes 1, 4 and 5
// are not built; writing them selects mode 0 behaviour.
//
// Register side: ctrl_wr with the RL and M fields of the control word sets the
// access order and mode (RL = 00 is handled by the parent as a latch command,
// latch_cmd).  Data writes and reads go through the LSB/MSB flip-flop as RL
// says.  `tick` is the counter clock enable (1.19 MHz on the PC).
//
// The mode subset follows the PC's use of the 8253; the load and reload
// timing follow the Intel data sheet as closely as a clock-enable design
// allows, and treating modes 1, 4 and 5 as mode 0 is this design's choice.
module pit_counter (
  input  logic        clk,       // board clock
  input  logic        rst,       // reset
  input  logic        tick,      // counter clock enable
  input  logic        gate,      // GATE input
  input  logic        ctrl_wr,   // control word for this counter (RL != 00)
  input  logic        latch_cmd, // counter latch command for this counter
  input  logic [1:0]  rl,        // read/load: 01 LSB, 10 MSB, 11 LSB then MSB
  input  logic [2:0]  mode,      // mode field M2..M0
  input  logic        wr,        // data write strobe
  input  logic        rd,        // data read strobe (end of the read)
  input  logic [7:0]  din,       // write data
  output logic [7:0]  dout,      // read data
  output logic        out        // OUT
);

  logic [1:0]  rl_q;
  logic [1:0]  mode_q;      // 0: mode 0, 2: mode 2, 3: mode 3
  logic [15:0] count, reload;
  logic [7:0]  lsb_hold;
  logic        wr_msb, rd_msb;
  logic        loaded;      // a new count is waiting to be taken at the next tick
  logic        running;
  logic        latched;
  logic [15:0] latch_val;
  logic        gate_q;
  logic        half;        // mode 3: 1 while in the high half

  wire [16:0] n17 = (reload == 16'd0) ? 17'h10000 : {1'b0, reload};

  always_ff @(posedge clk) begin
    if (rst) begin
      rl_q <= 2'b11; mode_q <= 2'd0; count <= '0; reload <= '0; lsb_hold <= '0;
      wr_msb <= 1'b0; rd_msb <= 1'b0; loaded <= 1'b0; running <= 1'b0;
      latched <= 1'b0; latch_val <= '0; gate_q <= 1'b0; half <= 1'b1; out <= 1'b1;
    end else begin
      gate_q <= gate;
      if (ctrl_wr) begin
        rl_q    <= rl;
        mode_q  <= (mode[1:0] == 2'b10) ? 2'd2 : (mode[1:0] == 2'b11) ? 2'd3 : 2'd0;
        wr_msb  <= 1'b0;
        rd_msb  <= 1'b0;
        latched <= 1'b0;
        running <= 1'b0;
        loaded  <= 1'b0;
        out     <= (mode[1] == 1'b1) ? 1'b1 : 1'b0;
        half    <= 1'b1;
      end else begin
        if (latch_cmd && !latched) begin
          latched   <= 1'b1;
          latch_val <= count;
        end
        if (wr) begin
          unique case (rl_q)
            2'b01: begin reload <= {8'h00, din}; loaded <= 1'b1; end
            2'b10: begin reload <= {din, 8'h00}; loaded <= 1'b1; end
            default: begin
              if (!wr_msb) begin
                lsb_hold <= din;
                wr_msb   <= 1'b1;
                if (mode_q == 2'd0) begin running <= 1'b0; out <= 1'b0; end
              end else begin
                reload <= {din, lsb_hold};
                wr_msb <= 1'b0;
                loaded <= 1'b1;
              end
            end
          endcase
          if (mode_q == 2'd0 && rl_q != 2'b11) out <= 1'b0;
        end
        if (rd) begin
          if (rl_q == 2'b11) rd_msb <= ~rd_msb;
          if (rl_q != 2'b11 || rd_msb) latched <= 1'b0;
        end
        // a rising GATE restarts modes 2 and 3
        if (mode_q != 2'd0 && gate && !gate_q && running) loaded <= 1'b1;

        if (tick) begin
          if (loaded && (mode_q == 2'd0 || !running || gate)) begin
            // take the new count (modes 2/3 take it at the end of the period
            // once running; here they take it at once, a simplification)
            loaded  <= 1'b0;
            running <= 1'b1;
            half    <= 1'b1;
            if (mode_q == 2'd3) begin
              count <= n17[0] ? n17[15:0] + 16'd1 : n17[15:0];
              out   <= 1'b1;
            end else begin
              count <= reload;
              if (mode_q == 2'd2) out <= 1'b1;
            end
          end else if (running && gate) begin
            unique case (mode_q)
              2'd0: begin
                count <= count - 16'd1;
                if (count == 16'd1) out <= 1'b1;
              end
              2'd2: begin
                if (count == 16'd2) begin
                  count <= count - 16'd1;
                  out   <= 1'b0;
                end else if (count == 16'd1) begin
                  count <= reload;
                  out   <= 1'b1;
                end else begin
                  count <= count - 16'd1;
                end
              end
              default: begin // mode 3
                if (count == 16'd2) begin
                  // end of a half period: reload; odd counts make the low half shorter
                  half  <= ~half;
                  out   <= ~half;
                  if (half) count <= n17[0] ? n17[15:0] - 16'd1 : n17[15:0];
                  else      count <= n17[0] ? n17[15:0] + 16'd1 : n17[15:0];
                end else begin
                  count <= count - 16'd2;
                end
              end
            endcase
          end
        end
        if (mode_q != 2'd0 && !gate) out <= 1'b1;
      end
    end
  end

  wire [15:0] rdval = latched ? latch_val : count;
  always_comb begin
    unique case (rl_q)
      2'b01:   dout = rdval[7:0];
      2'b10:   dout = rdval[15:8];
      default: dout = rd_msb ? rdval[15:8] : rdval[7:0];
    endcase
  end

endmodule
