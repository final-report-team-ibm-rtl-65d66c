// tb_addr_decode - sweeps random memory and I/O addresses through the decoder
// and compares every select with a reference written from the PC memory and
// I/O maps: ROM at F0000-FFFFF in eight 8 KB chips, RAM banks of 64 KB in
// the low 256 KB, the text window at B8000, and the motherboard I/O groups
// of 32 ports from 000h upwards, all disabled while AEN is high.
module tb_addr_decode;
  logic [19:0] a = '0;
  logic aen = 1'b0, memr_n = 1'b1, iow_n = 1'b1;
  logic rom_sel, ram_sel, vid_mem_sel, dma_cs, pic_cs, pit_cs, ppi_cs, dmapg_wr, nmi_wr, vid_io_sel;
  logic [7:0] rom_cs;
  logic [3:0] ram_bank;
  int checks = 0, failures = 0;

  addr_decode dut (.*);

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s a=%h", msg, a); end
  endtask

  initial begin
    for (int n = 0; n < 3000; n++) begin
      a = 20'($urandom);
      if (n % 3 == 0) a[19:10] = 10'h000;       // bias towards the I/O range
      if (n % 5 == 0) a[19:16] = 4'hF;
      aen = ($urandom % 4 == 0);
      memr_n = 1'($urandom); iow_n = 1'($urandom);
      #1;
      check(rom_sel == (a >= 20'hF0000), "ROM select");
      check(rom_cs == ((a >= 20'hF0000 && !memr_n) ? 8'(1 << ((a - 20'hF0000) / 8192)) : 8'h00), "ROM chip select");
      check(ram_sel == (a < 20'h40000), "RAM select");
      check(ram_bank == ((a < 20'h40000) ? 4'(1 << (a / 65536)) : 4'h0), "RAM bank");
      check(vid_mem_sel == (a >= 20'hB8000 && a < 20'hB9000), "video window");
      check(dma_cs  == (!aen && a[9:0] < 10'h020), "DMA CS");
      check(pic_cs  == (!aen && a[9:0] >= 10'h020 && a[9:0] < 10'h040), "PIC CS");
      check(pit_cs  == (!aen && a[9:0] >= 10'h040 && a[9:0] < 10'h060), "PIT CS");
      check(ppi_cs  == (!aen && a[9:0] >= 10'h060 && a[9:0] < 10'h080), "PPI CS");
      check(dmapg_wr == (!aen && !iow_n && a[9:0] >= 10'h080 && a[9:0] < 10'h0A0), "page register write");
      check(nmi_wr  == (!aen && !iow_n && a[9:0] >= 10'h0A0 && a[9:0] < 10'h0C0), "NMI mask write");
      check(vid_io_sel == (!aen && a[9:0] >= 10'h3D0 && a[9:0] < 10'h3E0), "video registers");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
