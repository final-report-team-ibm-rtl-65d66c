// tb_dma_page_reg - writes the four page registers and checks that the
// register chosen by the DACK2#/DACK3# pair drives A19..A16: index 0 while
// both are low (unused), 1 for DACK2# low (channel 3 active), 2 for DACK3#
// low (channel 2 active) and 3 when neither is active (channels 0 and 1).
// The expected values are worked out here from the behaviour of the PC part
// described above; the stimulus, the random choices and the sizes are this
// testbench's own.
module tb_dma_page_reg;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic rst = 1'b1, wr = 1'b0, dack2_n = 1'b1, dack3_n = 1'b1;
  logic [1:0] wa = '0;
  logic [3:0] din = '0, page;
  logic [3:0] model [4];
  int checks = 0, failures = 0;

  dma_page_reg dut (.*);

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (3) @(posedge clk); #1 rst = 0;
    for (int i = 0; i < 4; i++) model[i] = 4'h0;
    for (int n = 0; n < 40; n++) begin
      @(posedge clk); #1 wr = 1; wa = 2'($urandom); din = 4'($urandom);
      model[wa] = din;
      @(posedge clk); #1 wr = 0;
      for (int k = 0; k < 4; k++) begin
        {dack2_n, dack3_n} = 2'(k); #1;
        check(page == model[k], $sformatf("page for DACK2#/DACK3# = %b", 2'(k)));
      end
    end
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
