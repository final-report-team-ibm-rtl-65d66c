// tb_cpu_bus_if - drives the core side of the bus wrapper like a processor
// would and answers its 8088 bus cycles from a small behavioural memory and
// I/O space.  Checks byte and word reads and writes (low byte first, address
// + 1 for the high byte), the two-cycle INTA sequence returning the vector of
// the second cycle, the status codes put out for each kind of access, the
// cycle length of four CLK periods plus one per wait state, that no cycle
// starts while the DMA controller requests the bus, and that INTR is only
// passed to the core in its fetch state.
// The expected values are worked out here from the behaviour of the PC part
// described above; the stimulus, the random choices and the sizes are this
// testbench's own.
module tb_cpu_bus_if;
  import pc_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic rst = 1'b1, ce = 1'b0;
  logic core_req = 0, core_io = 0, core_we = 0, core_word = 0, core_code = 0, core_inta = 0;
  logic [19:0] core_addr = '0;
  logic [15:0] core_wdata = '0;
  logic core_fetch = 0, intr = 0;
  logic [15:0] core_rdata;
  logic core_done, core_halt, core_intr;
  bus_status_t s_n;
  logic [19:0] addr;
  logic [7:0] dout, din;
  logic ready = 1'b1, hold_req = 1'b0, hlda = 1'b0, bus_idle;
  int checks = 0, failures = 0;

  cpu_bus_if dut (.*);

  // CLK strobe every 3 board cycles
  int unsigned div = 0;
  always_ff @(posedge clk) begin
    div <= (div == 2) ? 0 : div + 1;
    ce  <= (div == 1);
  end
  int unsigned ce_count = 0;
  always_ff @(posedge clk) if (ce) ce_count <= ce_count + 1;

  // behavioural memory, I/O space and vector source
  logic [7:0] mem [256];
  logic [7:0] io  [256];
  bus_status_t seen_status [$];
  logic [19:0] seen_addr [$];
  bus_status_t prev_s = ST_PASSIVE;
  int wait_states = 0, waits_left = 0;
  always_comb begin
    if (s_n == ST_INTA)                       din = 8'h4C;
    else if (s_n == ST_IOR)                   din = io[addr[7:0]];
    else                                      din = mem[addr[7:0]];
  end
  always @(posedge clk) begin
    if (ce) begin
      if (s_n != ST_PASSIVE && prev_s == ST_PASSIVE) begin
        seen_status.push_back(s_n);
        seen_addr.push_back(addr);
        if (s_n == ST_MEMW) mem[addr[7:0]] <= dout;
        if (s_n == ST_IOW)  io[addr[7:0]]  <= dout;
        waits_left = wait_states;
      end
      prev_s <= s_n;
    end
  end
  // READY low for `wait_states` CLK periods once the cycle reaches T3; the
  // measured length runs from the request to core_done, one CLK more than
  // the four-period bus cycle plus the status-out period
  always @(posedge clk) begin
    if (ce) begin
      if (dut.state == dut.S_T3 && waits_left > 0) begin
        ready <= 1'b0;
        waits_left = waits_left - 1;
      end else if (dut.state == dut.S_T2 && waits_left > 0) begin
        ready <= 1'b0;
        waits_left = waits_left - 1;
      end
      else ready <= 1'b1;
    end
  end

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic access(input logic io_, we, word, code, inta, input logic [19:0] a,
                        input logic [15:0] wd, output logic [15:0] rd, output int clks);
    int unsigned start;
    @(posedge clk); #1;
    core_io = io_; core_we = we; core_word = word; core_code = code; core_inta = inta;
    core_addr = a; core_wdata = wd; core_req = 1'b1;
    start = ce_count;
    do @(posedge clk); while (!core_done);
    rd = core_rdata;
    clks = int'(ce_count - start);
    #1 core_req = 1'b0;
    repeat (8) @(posedge clk);
  endtask

  logic [15:0] rd;
  int clks, base;
  initial begin
    for (int i = 0; i < 256; i++) begin mem[i] = 8'(i * 7 + 3); io[i] = 8'(i ^ 8'hA5); end
    repeat (10) @(posedge clk);
    #1 rst = 1'b0;

    // byte memory read
    access(0, 0, 0, 0, 0, 20'h00010, 0, rd, clks);
    check(rd == 16'(mem[8'h10]), "byte read data");
    check(seen_status.pop_front() == ST_MEMR, "MEMR status");
    check(seen_addr.pop_front() == 20'h00010, "read address");
    base = clks;
    // code fetch status
    access(0, 0, 0, 1, 0, 20'h00020, 0, rd, clks);
    check(seen_status.pop_front() == ST_CODE, "code fetch status");
    void'(seen_addr.pop_front());
    // word read: two cycles, low byte first
    access(0, 0, 1, 0, 0, 20'h00030, 0, rd, clks);
    check(rd == {mem[8'h31], mem[8'h30]}, "word read data");
    check(seen_addr.pop_front() == 20'h00030 && seen_addr.pop_front() == 20'h00031, "word addresses");
    void'(seen_status.pop_front()); void'(seen_status.pop_front());
    // word write
    access(0, 1, 1, 0, 0, 20'h00040, 16'hBEEF, rd, clks);
    repeat (4) @(posedge clk);
    check(mem[8'h40] == 8'hEF && mem[8'h41] == 8'hBE, "word write bytes");
    check(seen_status.pop_front() == ST_MEMW, "MEMW status");
    void'(seen_status.pop_front()); void'(seen_addr.pop_front()); void'(seen_addr.pop_front());
    // I/O read and write
    access(1, 1, 0, 0, 0, 20'h00061, 16'h005A, rd, clks);
    repeat (4) @(posedge clk);
    check(io[8'h61] == 8'h5A, "I/O write");
    check(seen_status.pop_front() == ST_IOW, "IOW status");
    void'(seen_addr.pop_front());
    access(1, 0, 0, 0, 0, 20'h00062, 0, rd, clks);
    check(rd == 16'(io[8'h62]), "I/O read");
    check(seen_status.pop_front() == ST_IOR, "IOR status");
    void'(seen_addr.pop_front());
    // INTA: two cycles, vector from the second
    access(0, 0, 0, 0, 1, 20'h0, 0, rd, clks);
    check(rd == 16'h004C, "INTA vector");
    check(seen_status.pop_front() == ST_INTA && seen_status.pop_front() == ST_INTA, "two INTA cycles");
    void'(seen_addr.pop_front()); void'(seen_addr.pop_front());
    // wait states lengthen the cycle one CLK each
    wait_states = 2;
    access(0, 0, 0, 0, 0, 20'h00050, 0, rd, clks);
    check(clks == base + 2, $sformatf("two wait states: %0d vs %0d", clks, base));
    check(rd == 16'(mem[8'h50]), "read data after wait states");
    wait_states = 0;
    void'(seen_status.pop_front()); void'(seen_addr.pop_front());
    // no cycle while the DMA requests the bus
    hold_req = 1'b1;
    @(posedge clk); #1 core_req = 1'b1; core_io = 0; core_we = 0; core_word = 0; core_inta = 0;
    repeat (60) @(posedge clk);
    check(bus_idle && s_n == ST_PASSIVE, "no cycle during hold request");
    check(core_halt, "core halted while waiting");
    #1 hold_req = 1'b0;
    do @(posedge clk); while (!core_done);
    #1 core_req = 1'b0;
    check(seen_status.size() == 1, "cycle runs after hold released");
    // INTR gating
    intr = 1'b1; core_fetch = 1'b0; #1;
    check(!core_intr, "INTR blocked outside fetch");
    core_fetch = 1'b1; #1;
    check(core_intr, "INTR passed in fetch");
    check(base == 6, $sformatf("zero-wait cycle length %0d CLK", base));

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
