// tb_stream_out: self-checking test of the decoupled output stream port. A
// random producer writes words; the port writes them behind to a memory
// model with random ready at the addresses of its program (a loop of
// strided packets). Checks every memory write (address and data), that
// `full` was seen (a stall) while memory was slow, and `idle` at the end.
// A second phase switches to coupled mode and writes 16 words, each to a
// random address given with it, checking address and data in memory.
module tb_stream_out;
  import rapid_pkg::*;
  logic clk = 0, rst_n = 0, ag_wr = 0, en = 1, wr = 0, full, idle;
  logic [5:0] ag_addr = 0;
  logic [15:0] ag_data = 0, din = 0, mem_addr, mem_wdata;
  logic mem_req, mem_ready;
  logic [31:0] expq [$];
  int checks = 0, failures = 0, stalls = 0, n = 0;
  bit produce = 0;
  logic coupled = 0;
  logic [15:0] caddr = 0;
  int nmax = 24;

  stream_out dut (.*);
  always #5 clk = ~clk;

  // memory: random ready, checks writes
  always @(posedge clk) #0.5 mem_ready = ($urandom_range(0, 2) == 0);
  always @(negedge clk) if (rst_n && mem_req && mem_ready) begin
    checks++;
    if (expq.size() == 0 || {mem_addr, mem_wdata} !== expq[0]) begin
      failures++; $display("FAIL write %h %h", mem_addr, mem_wdata);
    end
    if (expq.size() > 0) void'(expq.pop_front());
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic wrc(int a, int d);
    @(negedge clk); ag_wr = 1; ag_addr = 6'(a); ag_data = 16'(d);
    @(negedge clk); ag_wr = 0;
  endtask
  task automatic load(int k, logic [31:0] ins);
    wrc(2 * k, ins[15:0]); wrc(2 * k + 1, ins[31:16]);
  endtask

  logic [15:0] addrs [$];
  always @(negedge clk) begin
    wr = produce && n < nmax && 1'($urandom);
    din = 16'($urandom);
    caddr = 16'($urandom);
    if (coupled) addrs[n] = caddr;
    if (wr && full) stalls++;
    if (wr && !full) begin
      expq.push_back({addrs[n], din});
      n++;
    end else wr = 0;
  end

  initial begin
    repeat (2) @(posedge clk); rst_n = 1;
    load(0, ag_loop(3, 2));
    load(1, ag_pkt(8, 4, 0));
    load(2, ag_addb(1));
    load(3, ag_end());
    wrc(32, 16'h0200);
    for (int j = 0; j < 3; j++) for (int i = 0; i < 8; i++) addrs.push_back(16'h200 + 16'(j + 4 * i));
    wrc(33, 0);
    produce = 1;
    wait (n == 24 && expq.size() == 0);
    repeat (3) @(negedge clk);
    checks++; if (!idle) begin failures++; $display("FAIL not idle"); end
    checks++; if (stalls == 0) begin failures++; $display("FAIL never full"); end
    // coupled mode
    produce = 0;
    for (int i = 0; i < 16; i++) addrs.push_back(16'h0);
    @(negedge clk); coupled = 1; nmax = 40; produce = 1;
    wait (n == 40 && expq.size() == 0);
    repeat (3) @(negedge clk);
    checks++; if (!idle) begin failures++; $display("FAIL not idle (coupled)"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
