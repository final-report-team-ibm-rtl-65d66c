// tb_ram_256k - writes random bytes to random banks and addresses, keeps a
// reference copy, and reads them all back one clock after the address; an
// access with no bank selected must neither write nor return data (FFh).
// Runs with four banks of 1 KB.
module tb_ram_256k;
  localparam int unsigned BANKS = 4, BANK_BYTES = 1024;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [BANKS-1:0] bank_sel = '0;
  logic [9:0] a = '0;
  logic we = 1'b0, parity_err;
  logic [7:0] din = '0, dout;
  logic [7:0] model [BANKS*BANK_BYTES];
  int checks = 0, failures = 0;

  ram_256k #(.BANKS(BANKS), .BANK_BYTES(BANK_BYTES)) dut (.*);

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  int b, x;
  initial begin
    // fill everything first so every read has a known value
    for (int i = 0; i < BANKS * BANK_BYTES; i++) begin
      @(posedge clk); #1 bank_sel = 4'(1 << (i / BANK_BYTES)); a = 10'(i); we = 1; din = 8'($urandom);
      model[i] = din;
    end
    for (int n = 0; n < 2000; n++) begin
      b = $urandom % 5; x = $urandom % BANK_BYTES;
      @(posedge clk); #1;
      bank_sel = (b == 4) ? 4'b0000 : 4'(1 << b); a = 10'(x);
      we = 1'($urandom); din = 8'($urandom);
      if (we && b != 4) model[b * BANK_BYTES + x] = din;
      if (!we) begin
        @(posedge clk); #1;
        check(dout == ((b == 4) ? 8'hFF : model[b * BANK_BYTES + x]), "read back");
      end
    end
    we = 0;
    for (int i = 0; i < BANKS * BANK_BYTES; i += 7) begin
      @(posedge clk); #1 bank_sel = 4'(1 << (i / BANK_BYTES)); a = 10'(i);
      @(posedge clk); #1 check(dout == model[i], "final sweep");
    end
    check(!parity_err, "no parity error");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
