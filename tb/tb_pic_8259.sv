// tb_pic_8259 - programs the interrupt controller the way the PC BIOS does
// (ICW1 = 13h, ICW2 = 08h, ICW4 = 09h), then raises requests and runs INTA
// sequences by hand.  Checks edge-triggered request latching, INT output,
// the vector 08h + level returned on the second INTA, fixed priority with the
// in-service register blocking equal and lower levels, non-specific and
// specific EOI, the mask register and reading IRR/ISR through OCW3.
// The expected values are worked out here from the behaviour of the PC part
// described above; the stimulus, the random choices and the sizes are this
// testbench's own.
module tb_pic_8259;
  import pc_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic rst = 1'b1, cs = 1'b0, a0 = 1'b0, wr = 1'b0, inta_stb = 1'b0, inta_act = 1'b0;
  logic [7:0] din = '0, dout, ir = '0;
  logic dout_oe, int_out;
  int checks = 0, failures = 0;

  pic_8259 dut (.*);

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic write(input logic a, input logic [7:0] d);
    @(posedge clk); #1 cs = 1; a0 = a; din = d; wr = 1;
    @(posedge clk); #1 cs = 0; wr = 0;
  endtask

  task automatic inta(output logic [7:0] vec);
    @(posedge clk); #1 inta_stb = 1; inta_act = 1;
    @(posedge clk); #1 inta_stb = 0;
    repeat (3) @(posedge clk); #1 inta_act = 0;
    repeat (2) @(posedge clk); #1 inta_stb = 1; inta_act = 1;
    @(posedge clk); #1 inta_stb = 0;
    repeat (2) @(posedge clk);
    vec = dout;
    check(dout_oe, "vector driven during second INTA");
    #1 inta_act = 0;
    @(posedge clk); #1;
  endtask

  logic [7:0] v;
  initial begin
    repeat (4) @(posedge clk); #1 rst = 0;
    write(0, 8'h13); write(1, 8'h08); write(1, 8'h09);
    write(1, 8'h00);                       // OCW1: nothing masked
    check(!int_out, "no INT after init");
    // IR1 then IR0 together
    #1 ir = 8'b0000_0011; repeat (3) @(posedge clk);
    check(int_out, "INT on request");
    inta(v);
    check(v == 8'h08, $sformatf("vector for IR0: %h", v));
    check(int_out == 1'b0, "IR1 blocked while IR0 in service");
    write(0, 8'h0A);                        // OCW3 read IRR
    @(posedge clk); #1 check(dout[1:0] == 2'b10, "IRR shows IR1 pending");
    write(0, 8'h0B);                        // OCW3 read ISR
    @(posedge clk); #1 check(dout[1:0] == 2'b01, "ISR shows IR0");
    write(0, 8'h20);                        // non-specific EOI
    @(posedge clk); #1 check(int_out, "IR1 raises INT after EOI");
    inta(v);
    check(v == 8'h09, $sformatf("vector for IR1: %h", v));
    write(0, 8'h61);                        // specific EOI level 1
    @(posedge clk); #1 check(dout == 8'h00, "ISR empty after specific EOI");
    // level held high does not re-request (edge triggered)
    repeat (4) @(posedge clk);
    check(!int_out, "held level does not re-trigger");
    ir = 8'h00; repeat (2) @(posedge clk);
    // mask IR5
    write(1, 8'h20);
    #1 ir = 8'h20; repeat (3) @(posedge clk);
    check(!int_out, "masked IR5 gives no INT");
    write(1, 8'h00);
    @(posedge clk); #1 check(int_out, "unmasked IR5 gives INT");
    // higher priority arrives while IR5 in service: nests
    inta(v);
    check(v == 8'h0D, $sformatf("vector for IR5: %h", v));
    #1 ir = 8'h24; repeat (3) @(posedge clk);
    check(int_out, "IR2 interrupts IR5 service");
    inta(v);
    check(v == 8'h0A, $sformatf("vector for IR2: %h", v));
    write(0, 8'h20);
    write(0, 8'h20);
    write(0, 8'h0B);
    @(posedge clk); #1 check(dout == 8'h00, "both EOIs cleared ISR");
    write(1, 8'h5A);
    #1 a0 = 1; #1 check(dout == 8'h5A, "IMR read back");
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
