// dma_8237 - Intel 8237A DMA controller, four channels.
//
// Each channel has its own base/current address, base/current word count and
// mode register.  Channel requests (DREQ high, or the software request bit)
// that are not masked compete by fixed priority, channel 0 highest.  The
// winner raises HRQ; once HLDA comes back the controller owns the bus (aen)
// and runs transfers through states S1..S4, one state per CLK period:
//   S1  DACK and the address are out
//   S2  read strobe: MEMR# for a read transfer (memory to I/O),
//       IOR# for a write transfer (I/O to memory)
//   S3  write strobe added: IOW# or MEMW#; stays in S3 while rdy is low
//   S4  strobes off; address +1 or -1, count -1; when the count passes zero
//       TC is reported on eop and in the status register, and the channel
//       reloads from its base registers (autoinitialise) or masks itself
// Verify transfers run the same states without strobes.  Single mode gives
// the bus back after every transfer (HRQ low for one CLK, so the processor
// can run a cycle), block mode keeps it until TC and demand mode while DREQ
// stays high.  Cascade, memory-to-memory and rotating priority are not built.
//
// Register map (A3..A0): 0-7 address/count of channel A2..A1 through the
// byte-pointer flip-flop; 8 command (write) / status (read, clears TC bits);
// 9 request; A single mask bit; B mode; C clear flip-flop; D master clear
// (read: temporary register, always 0 here); E clear mask; F write all masks.
// Register accesses are one-clock strobes; `ce` is the DMA clock enable.
//
// One register set per channel follows the reference design (the Intel part
// shares one set); demand mode, verify and autoinitialise, the fixed
// priority and the one-CLK-per-state timing are this design's choices.
module dma_8237 (
  input  logic        clk,      // board clock
  input  logic        ce,       // DMA clock enable (CLK period)
  input  logic        rst,      // reset
  // register interface
  input  logic        cs,       // chip select (DMA CS)
  input  logic [3:0]  a,        // A3..A0
  input  logic        wr,       // write strobe
  input  logic        rd,       // read strobe (end of read)
  input  logic [7:0]  din,      // write data
  output logic [7:0]  dout,     // read data
  // channel handshake
  input  logic [3:0]  dreq,     // DREQ3..DREQ0, active high
  output logic [3:0]  dack_n,   // DACK3..DACK0, active low
  output logic        hrq,      // hold request to the arbitration logic
  input  logic        hlda,     // hold acknowledge
  input  logic        rdy,      // ready (RDY TO DMA)
  output logic        eop,      // terminal count
  // bus side while the controller owns the bus
  output logic        aen,      // the controller drives the bus
  output logic [15:0] addr,     // A15..A0
  output logic        memr_n,   // memory read
  output logic        memw_n,   // memory write
  output logic        ior_n,    // I/O read
  output logic        iow_n     // I/O write
);

  typedef enum logic [2:0] {SI, S0, S1, S2, S3, S4} dstate_t;
  dstate_t state;

  logic [15:0] base_addr [4], cur_addr [4], base_cnt [4], cur_cnt [4];
  logic [5:0]  mode [4];       // D7..D2 of the mode word
  logic [7:0]  command;
  logic [3:0]  mask, sw_req, tc_stat;
  logic        ff;
  logic [1:0]  ch;             // channel being served

  wire [3:0] req_vec = (dreq | sw_req) & ~mask;

  function automatic logic [2:0] prio(logic [3:0] v);
    for (int i = 0; i < 4; i++)
      if (v[i]) return {1'b1, 2'(i)};
    return 3'b000;
  endfunction
  wire [2:0] pick = prio(req_vec);

  wire [1:0] xfer  = mode[ch][1:0];   // 00 verify, 01 write, 10 read
  wire [1:0] msel  = mode[ch][5:4];   // 00 demand, 01 single, 10 block
  wire       decr  = mode[ch][3];
  wire       autoi = mode[ch][2];

  always_ff @(posedge clk) begin
    if (rst || (cs && wr && a == 4'hD)) begin
      command <= '0; mask <= 4'hF; sw_req <= '0; tc_stat <= '0; ff <= 1'b0;
      state   <= SI; ch <= 2'd0;
      if (rst) begin
        for (int i = 0; i < 4; i++) begin
          base_addr[i] <= '0; cur_addr[i] <= '0; base_cnt[i] <= '0; cur_cnt[i] <= '0;
          mode[i] <= '0;
        end
      end
    end else begin
      // ---- register writes and read side effects
      if (cs && wr) begin
        unique case (a)
          4'h0, 4'h2, 4'h4, 4'h6: begin
            if (ff) begin base_addr[a[2:1]][15:8] <= din; cur_addr[a[2:1]][15:8] <= din; end
            else    begin base_addr[a[2:1]][7:0]  <= din; cur_addr[a[2:1]][7:0]  <= din; end
            ff <= ~ff;
          end
          4'h1, 4'h3, 4'h5, 4'h7: begin
            if (ff) begin base_cnt[a[2:1]][15:8] <= din; cur_cnt[a[2:1]][15:8] <= din; end
            else    begin base_cnt[a[2:1]][7:0]  <= din; cur_cnt[a[2:1]][7:0]  <= din; end
            ff <= ~ff;
          end
          4'h8: command <= din;
          4'h9: sw_req[din[1:0]] <= din[2];
          4'hA: mask[din[1:0]] <= din[2];
          4'hB: mode[din[1:0]] <= din[7:2];
          4'hC: ff <= 1'b0;
          4'hE: mask <= 4'h0;
          4'hF: mask <= din[3:0];
          default: ;
        endcase
      end
      if (cs && rd) begin
        if (a[3] == 1'b0) ff <= ~ff;
        if (a == 4'h8)    tc_stat <= '0;
      end

      // ---- transfer engine
      if (ce) begin
        unique case (state)
          SI: if (!command[2] && pick[2]) begin
                ch    <= pick[1:0];
                state <= S0;
              end
          S0: if (hlda) state <= S1;
          S1: state <= S2;
          S2: state <= S3;
          S3: if (rdy) state <= S4;
          S4: begin
                cur_addr[ch] <= decr ? cur_addr[ch] - 16'd1 : cur_addr[ch] + 16'd1;
                cur_cnt[ch]  <= cur_cnt[ch] - 16'd1;
                if (cur_cnt[ch] == 16'd0) begin
                  tc_stat[ch] <= 1'b1;
                  sw_req[ch]  <= 1'b0;
                  if (autoi) begin
                    cur_addr[ch] <= base_addr[ch];
                    cur_cnt[ch]  <= base_cnt[ch];
                  end else begin
                    mask[ch] <= 1'b1;
                  end
                  state <= SI;
                end else if (msel == 2'b10 || (msel == 2'b00 && dreq[ch])) begin
                  state <= S1;
                end else begin
                  state <= SI;
                end
              end
          default: state <= SI;
        endcase
      end
    end
  end

  wire in_xfer = (state == S1) || (state == S2) || (state == S3) || (state == S4);
  wire rd_ph   = (state == S2) || (state == S3);
  wire wr_ph   = (state == S3);

  assign hrq    = (state != SI);
  assign aen    = in_xfer;
  assign addr   = cur_addr[ch];
  assign memr_n = !(rd_ph && xfer == 2'b10);
  assign ior_n  = !(rd_ph && xfer == 2'b01);
  assign iow_n  = !(wr_ph && xfer == 2'b10);
  assign memw_n = !(wr_ph && xfer == 2'b01);
  assign eop    = (state == S4) && (cur_cnt[ch] == 16'd0);

  always_comb begin
    dack_n = 4'hF;
    if (in_xfer) dack_n[ch] = 1'b0;
  end

  always_comb begin
    unique case (a)
      4'h0, 4'h2, 4'h4, 4'h6: dout = ff ? cur_addr[a[2:1]][15:8] : cur_addr[a[2:1]][7:0];
      4'h1, 4'h3, 4'h5, 4'h7: dout = ff ? cur_cnt[a[2:1]][15:8]  : cur_cnt[a[2:1]][7:0];
      4'h8:    dout = {dreq | sw_req, tc_stat};
      default: dout = 8'h00;
    endcase
  end

endmodule
