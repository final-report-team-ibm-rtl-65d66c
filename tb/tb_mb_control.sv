// tb_mb_control - checks the motherboard control logic with a CLK strobe
// every 3 board cycles: an I/O command pulls the 8284 RDY input low for
// exactly one CLK period, I/O CH RDY low holds it low, a DMA request is
// granted only when the processor bus is idle and not locked and released
// after HRQ drops, the NMI mask register gates every NMI source, the I/O
// channel check latch is set and cleared through PB5, and RESET DRV follows
// reset.
module tb_mb_control;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic ce = 1'b0, reset = 1'b1, lock_n = 1'b1, cpu_idle = 1'b1, io_cmd = 1'b0, io_ch_rdy = 1'b1;
  logic hrq = 1'b0, nmi_reg_wr = 1'b0, xd7 = 1'b0, pck = 1'b0, io_ch_ck_n = 1'b1;
  logic enable_io_ck_n = 1'b1, np_npi = 1'b0, np_instl_sw = 1'b0;
  logic rdy_wait, rdy_to_dma, hlda, aen, dma_wait, allow_nmi, io_ch_ck, nmi, reset_drv;
  int checks = 0, failures = 0;

  mb_control dut (.*);

  int unsigned div = 0;
  always_ff @(posedge clk) begin
    div <= (div == 2) ? 0 : div + 1;
    ce  <= (div == 1);
  end

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic next_ce();
    do @(posedge clk); while (!ce);
    #1;
  endtask

  task automatic set_nmi_mask(input logic v);
    @(posedge clk); #1 nmi_reg_wr = 1; xd7 = v;
    @(posedge clk); #1 nmi_reg_wr = 0;
  endtask

  int low;
  initial begin
    repeat (6) @(posedge clk);
    check(reset_drv, "RESET DRV during reset");
    #1 reset = 0;
    next_ce(); next_ce();
    check(!reset_drv, "RESET DRV released");
    // one wait state per I/O command
    check(rdy_wait, "ready when idle");
    next_ce(); io_cmd = 1; #1;
    low = 0;
    for (int i = 0; i < 6; i++) begin
      if (!rdy_wait) low++;
      next_ce();
    end
    io_cmd = 0;
    check(low == 1, $sformatf("I/O command: RDY low for %0d CLK", low));
    next_ce();
    // I/O CH RDY stretches
    io_ch_rdy = 0; #1;
    check(!rdy_wait && !rdy_to_dma, "I/O CH RDY low pulls RDY low");
    io_ch_rdy = 1; #1;
    // DMA arbitration
    cpu_idle = 0; hrq = 1;
    next_ce(); next_ce();
    check(!hlda && dma_wait, "no grant while processor busy");
    cpu_idle = 1; lock_n = 0;
    next_ce(); next_ce();
    check(!hlda, "no grant while locked");
    lock_n = 1;
    next_ce();
    check(hlda && aen, "grant when idle and unlocked");
    hrq = 0;
    next_ce();
    check(!hlda && !aen && !dma_wait, "grant released after HRQ drops");
    // NMI
    pck = 1; #1;
    check(!nmi, "parity NMI masked");
    set_nmi_mask(1);
    check(allow_nmi && nmi, "parity NMI when allowed");
    pck = 0; #1;
    check(!nmi, "no NMI without a source");
    io_ch_ck_n = 0; @(posedge clk); @(posedge clk); #1;
    check(!io_ch_ck, "channel check ignored while disabled");
    enable_io_ck_n = 0; @(posedge clk); @(posedge clk); #1;
    io_ch_ck_n = 1; @(posedge clk); #1;
    check(io_ch_ck && nmi, "channel check latched and gives NMI");
    enable_io_ck_n = 1; @(posedge clk); #1;
    check(!io_ch_ck && !nmi, "PB5 high clears the latch");
    np_npi = 1; #1;
    check(!nmi, "coprocessor NMI ignored when not installed");
    np_instl_sw = 1; #1;
    check(nmi, "coprocessor NMI when installed");
    set_nmi_mask(0);
    check(!nmi, "mask clears NMI");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
