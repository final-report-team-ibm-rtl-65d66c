// tb_rom_bios - loads a generated image into the ROM through the load port,
// then reads random addresses through the chip selects and checks the data
// one clock after the address, and FFh when no chip is selected.  Runs with
// two banks of 256 bytes to keep the image small.
// The expected values are worked out here from the behaviour of the PC part
// described above; the stimulus, the random choices and the sizes are this
// testbench's own.
module tb_rom_bios;
  localparam int unsigned BANKS = 2, BANK_BYTES = 256;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [BANKS-1:0] cs = '0;
  logic [7:0] a = '0, dout, load_data = '0;
  logic load_we = 1'b0;
  logic [8:0] load_addr = '0;
  int checks = 0, failures = 0;

  rom_bios #(.BANKS(BANKS), .BANK_BYTES(BANK_BYTES)) dut (.*);

  function automatic logic [7:0] image(int i);
    return 8'(i * 13 + (i >> 8) * 5 + 1);
  endfunction

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  int b, x;
  initial begin
    for (int i = 0; i < 512; i++) begin
      @(posedge clk); #1 load_we = 1; load_addr = 9'(i); load_data = image(i);
    end
    @(posedge clk); #1 load_we = 0;
    for (int n = 0; n < 200; n++) begin
      b = $urandom % 3; x = $urandom % 256;
      cs = (b == 2) ? 2'b00 : 2'(1 << b); a = 8'(x);
      @(posedge clk); #1;
      check(dout == ((b == 2) ? 8'hFF : image(b * 256 + x)), $sformatf("read bank %0d addr %0d", b, x));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
