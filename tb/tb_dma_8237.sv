// tb_dma_8237 - programs the DMA controller through its registers and runs
// transfers against a behavioural memory and I/O device, with HLDA answered
// one CLK after HRQ.  Checks a block-mode write transfer (I/O to memory) of
// count+1 bytes at rising addresses, TC status and the channel masking itself
// at the end, a single-mode read transfer (memory to I/O) with
// autoinitialise that gives the bus back after each byte, fixed priority
// between two requests, a verify transfer with no strobes, a decrementing
// address, wait states from RDY, and reading the current address back.
// In block mode a byte must move every 4 CLK (states S1-S4).
// The expected values are worked out here from the behaviour of the PC part
// described above; the stimulus, the random choices and the sizes are this
// testbench's own.
module tb_dma_8237;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic ce = 1'b0, rst = 1'b1, cs = 1'b0, wr = 1'b0, rd = 1'b0, hlda = 1'b0, rdy = 1'b1;
  logic [3:0] a = '0, dreq = '0, dack_n;
  logic [7:0] din = '0, dout;
  logic hrq, eop, aen, memr_n, memw_n, ior_n, iow_n;
  logic [15:0] addr;
  int checks = 0, failures = 0;

  dma_8237 dut (.*);

  int unsigned div = 0;
  always_ff @(posedge clk) begin
    div <= (div == 2) ? 0 : div + 1;
    ce  <= (div == 1);
  end
  // HLDA follows HRQ one CLK later
  always_ff @(posedge clk) if (ce) hlda <= hrq;

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // bus observers: one record per write strobe
  logic [7:0] mem [256];
  logic [15:0] wr_addr [$];
  logic [1:0]  wr_kind [$];   // 1 memory write, 2 I/O write
  int unsigned wr_clk [$];    // CLK count at each write strobe
  int unsigned n_clk = 0;
  int n_strobe = 0, n_eop = 0, n_hrq_drop = 0, wait_clks = 0;
  logic memw_q = 1'b1, iow_q = 1'b1, memr_q = 1'b1, ior_q = 1'b1, hrq_q = 1'b0;
  always_ff @(posedge clk) begin
    if (ce) n_clk <= n_clk + 1;
    if (!memw_n && memw_q) wr_clk.push_back(n_clk);
    memw_q <= memw_n; iow_q <= iow_n; memr_q <= memr_n; ior_q <= ior_n; hrq_q <= hrq;
    if (!memw_n && memw_q) begin wr_addr.push_back(addr); wr_kind.push_back(2'd1); mem[addr[7:0]] <= 8'hC3; end
    if (!iow_n && iow_q)   begin wr_addr.push_back(addr); wr_kind.push_back(2'd2); end
    if ((!memr_n && memr_q) || (!ior_n && ior_q)) n_strobe <= n_strobe + 1;
    if (ce && eop) n_eop <= n_eop + 1;
    if (hrq_q && !hrq) n_hrq_drop <= n_hrq_drop + 1;
    if (ce && !rdy && dut.state == dut.S3) wait_clks <= wait_clks + 1;
  end

  task automatic write(input logic [3:0] ad, input logic [7:0] d);
    @(posedge clk); #1 cs = 1; a = ad; din = d; wr = 1;
    @(posedge clk); #1 cs = 0; wr = 0;
  endtask
  task automatic read(input logic [3:0] ad, output logic [7:0] d);
    @(posedge clk); #1 cs = 1; a = ad; #1 d = dout; rd = 1;
    @(posedge clk); #1 cs = 0; rd = 0;
  endtask
  task automatic setup(input int c, input logic [15:0] ad, input logic [15:0] cnt, input logic [7:0] md);
    write(4'hC, 0);
    write(4'(2 * c), ad[7:0]); write(4'(2 * c), ad[15:8]);
    write(4'(2 * c + 1), cnt[7:0]); write(4'(2 * c + 1), cnt[15:8]);
    write(4'hB, md | 8'(c));
  endtask
  task automatic idle_wait();
    do @(posedge clk); while (hrq || dreq != 0 || aen);
    repeat (10) @(posedge clk);
  endtask

  logic [7:0] v, v2;
  int seen_first;
  initial begin
    repeat (5) @(posedge clk); #1 rst = 0;
    check(!hrq && dack_n == 4'hF, "idle after reset");
    write(4'h8, 8'h00);
    // channel 2: block mode, write transfer, increment, count 3 -> 4 bytes
    setup(2, 16'h0010, 16'd3, 8'b1000_0100);
    write(4'hA, 8'h02);                      // unmask channel 2
    #1 dreq[2] = 1;
    @(negedge dack_n[2]); #1 dreq[2] = 0;
    idle_wait();
    check(wr_addr.size() == 4, $sformatf("block transfer wrote %0d bytes", wr_addr.size()));
    for (int i = 0; i < wr_addr.size(); i++)
      check(wr_addr[i] == 16'h0010 + 16'(i) && wr_kind[i] == 2'd1, $sformatf("block byte %0d at %h", i, wr_addr[i]));
    // transfer rate: one byte every 4 CLK (S1-S4) in block mode
    for (int i = 1; i < wr_clk.size(); i++)
      check(wr_clk[i] - wr_clk[i-1] == 4, $sformatf("block byte %0d after %0d CLK", i, wr_clk[i] - wr_clk[i-1]));
    check(n_eop == 1, "one TC");
    check(n_strobe == 4, "IOR# for every byte");
    read(4'h8, v);
    check(v[2], "TC status for channel 2");
    read(4'h8, v);
    check(!v[2], "status read clears TC");
    write(4'hC, 0); read(4'h4, v); read(4'h4, v2);
    check({v2, v} == 16'h0014, $sformatf("current address %h", {v2, v}));
    #1 dreq[2] = 1; repeat (30) @(posedge clk);
    check(!hrq, "channel masked itself at TC");
    #1 dreq[2] = 0;
    wr_addr.delete(); wr_kind.delete(); n_eop = 0; n_hrq_drop = 0;
    // channel 0: single mode, read transfer, autoinit, count 1 -> 2 bytes per run
    setup(0, 16'h0100, 16'd1, 8'b0101_1000);
    write(4'hA, 8'h00);
    #1 dreq[0] = 1;
    repeat (150) @(posedge clk);
    #1 dreq[0] = 0;
    idle_wait();
    check(wr_addr.size() >= 4, $sformatf("single mode moved %0d bytes", wr_addr.size()));
    check(wr_addr[0] == 16'h0100 && wr_addr[1] == 16'h0101 && wr_addr[2] == 16'h0100,
          "autoinitialise reloads the address");
    check(wr_kind[0] == 2'd2, "read transfer strobes IOW#");
    check(n_hrq_drop >= wr_addr.size(), "bus given back after every single transfer");
    check(n_eop >= 2, "TC with autoinitialise");
    write(4'hA, 8'h04);                        // mask channel 0
    wr_addr.delete(); wr_kind.delete();
    // priority: channels 1 and 3 together, single mode
    setup(1, 16'h0200, 16'd0, 8'b0100_0100);
    setup(3, 16'h0300, 16'd0, 8'b0100_0100);
    write(4'hF, 8'b0101);                      // unmask 1 and 3
    @(posedge clk); #1 dreq[1] = 1; dreq[3] = 1;
    @(negedge dack_n[1] or negedge dack_n[3]);
    seen_first = dack_n[1] ? 3 : 1;
    check(seen_first == 1, "channel 1 before channel 3");
    #1 dreq[1] = 0;
    @(negedge dack_n[3]); #1 dreq[3] = 0;
    idle_wait();
    check(wr_addr.size() == 2 && wr_addr[0] == 16'h0200 && wr_addr[1] == 16'h0300, "both served in order");
    wr_addr.delete(); wr_kind.delete(); n_strobe = 0;
    // verify transfer, decrement, with wait states
    setup(1, 16'h0050, 16'd2, 8'b1010_0000);
    write(4'hA, 8'h01);
    rdy = 0;
    #1 dreq[1] = 1;
    @(negedge dack_n[1]); #1 dreq[1] = 0;
    repeat (12) @(posedge clk); #1 rdy = 1;
    idle_wait();
    check(wr_addr.size() == 0 && n_strobe == 0, "verify has no strobes");
    check(wait_clks >= 2, $sformatf("RDY low held S3 for %0d CLK", wait_clks));
    write(4'hC, 0); read(4'h2, v); read(4'h2, v2);
    check({v2, v} == 16'h004D, $sformatf("decremented address %h", {v2, v}));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
