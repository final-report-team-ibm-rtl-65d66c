// tb_ppi_8255 - writes the PC's control word (99h), then checks that port A
// and port C read the inputs, that port B latches what is written and reads
// it back, that a mode-set word is stored and clears port B, and that a
// control word with bit 7 low leaves the mode alone.
// The expected values are worked out here from the behaviour of the PC part
// described above; the stimulus, the random choices and the sizes are this
// testbench's own.
module tb_ppi_8255;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic rst = 1'b1, cs = 1'b0, wr = 1'b0;
  logic [1:0] a = '0;
  logic [7:0] din = '0, dout, pa_in = '0, pc_in = '0, pb_out, mode_word;
  int checks = 0, failures = 0;

  ppi_8255 dut (.*);

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic write(input logic [1:0] ad, input logic [7:0] d);
    @(posedge clk); #1 cs = 1; a = ad; din = d; wr = 1;
    @(posedge clk); #1 cs = 0; wr = 0;
  endtask

  logic [7:0] v;
  initial begin
    repeat (3) @(posedge clk); #1 rst = 0;
    check(mode_word == 8'h9B && pb_out == 8'h00, "reset state");
    write(3, 8'h99);
    check(mode_word == 8'h99, "mode word stored");
    for (int i = 0; i < 20; i++) begin
      pa_in = 8'($urandom); pc_in = 8'($urandom); v = 8'($urandom);
      write(1, v);
      check(pb_out == v, "port B latch");
      a = 2'd0; #1 check(dout == pa_in, "port A reads input");
      a = 2'd2; #1 check(dout == pc_in, "port C reads input");
      a = 2'd1; #1 check(dout == v, "port B reads back");
    end
    write(3, 8'h05);
    check(mode_word == 8'h99 && pb_out == v, "bit-set word leaves mode and port B");
    write(3, 8'h99);
    check(pb_out == 8'h00, "mode set clears port B");
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
