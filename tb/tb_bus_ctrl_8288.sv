// tb_bus_ctrl_8288 - runs one bus cycle for every status code and checks that
// exactly the expected command goes low, that ALE pulses for one CLK period
// before it, that DT/R and DEN are right, that the command ends after the
// status returns to passive, and that AEN#/CEN gate the outputs.
// The expected values are worked out here from the behaviour of the PC part
// described above; the stimulus, the random choices and the sizes are this
// testbench's own.
module tb_bus_ctrl_8288;
  import pc_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic ce = 1'b0, rst = 1'b1, aen_n = 1'b0, cen = 1'b1;
  bus_status_t s_n = ST_PASSIVE;
  logic ale, dtr, den, inta_n, iorc_n, aiowc_n, mrdc_n, amwc_n, cmd_oe;
  int checks = 0, failures = 0;

  bus_ctrl_8288 dut (.*);

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // one CLK period = 4 board cycles, ce in the last one
  task automatic clk_period();
    repeat (3) @(posedge clk);
    #1 ce = 1'b1; @(posedge clk); #1; ce = 1'b0;
  endtask

  function automatic logic [4:0] cmds();
    return {inta_n, iorc_n, aiowc_n, mrdc_n, amwc_n};
  endfunction

  function automatic logic [4:0] expect_cmd(bus_status_t s);
    case (s)
      ST_INTA: return 5'b01111;
      ST_IOR:  return 5'b10111;
      ST_IOW:  return 5'b11011;
      ST_CODE, ST_MEMR: return 5'b11101;
      ST_MEMW: return 5'b11110;
      default: return 5'b11111;
    endcase
  endfunction

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bus_status_t s;
    repeat (3) @(posedge clk); #1; rst = 1'b0;
    clk_period();
    for (int k = 0; k < 7; k++) begin
      s = bus_status_t'(k);
      s_n = s;                       // status out (before T1)
      clk_period();                  // T1
      check(ale == 1'b1, $sformatf("ALE in T1 for status %0d", k));
      check(cmds() == 5'b11111, $sformatf("no command in T1 for status %0d", k));
      clk_period();                  // T2
      check(ale == 1'b0, "ALE one period only");
      check(cmds() == expect_cmd(s), $sformatf("command for status %0d: %b", k, cmds()));
      check(dtr == !(s == ST_INTA || s == ST_IOR || s == ST_CODE || s == ST_MEMR), "DT/R");
      check(den == (s != ST_HALT), "DEN");
      clk_period();                  // T3
      check(cmds() == expect_cmd(s), "command held in T3");
      s_n = ST_PASSIVE;
      clk_period();                  // T4
      check(cmds() == 5'b11111, "command ends after passive status");
      clk_period();
    end
    // AEN# high blocks the command, CEN low releases the outputs
    aen_n = 1'b1;
    s_n = ST_MEMR; clk_period(); clk_period();
    check(mrdc_n == 1'b1, "AEN# high keeps MRDC# high");
    aen_n = 1'b0; #1;
    check(mrdc_n == 1'b0, "AEN# low lets MRDC# through");
    cen = 1'b0; #1;
    check(cmd_oe == 1'b0, "CEN low releases the command lines");
    s_n = ST_PASSIVE; clk_period(); clk_period();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
