// tb_stream_in: self-checking test of the decoupled input stream port with a
// memory model (random ready, two-cycle latency). The address generator runs
// two packets; a random consumer pops words, each checked against the
// memory's known content at the expected address. Also checks that the port
// read ahead until its buffer was full while the consumer was idle, that the
// consumer saw `empty` (a stall) at least once, and that `idle` rises at the
// end. A second phase switches to coupled mode: the test plays the datapath,
// pushing 30 random read addresses (held back while `afull`), and checks the
// words against them; it also checks that the address queue filled.
module tb_stream_in;
  import rapid_pkg::*;
  logic clk = 0, rst_n = 0, ag_wr = 0, en = 1, rd = 0, empty, idle;
  logic [5:0] ag_addr = 0;
  logic [15:0] ag_data = 0, dout, mem_addr, mem_rdata;
  logic mem_req, mem_ready, mem_rvalid;
  logic [15:0] expq [$];
  int checks = 0, failures = 0, stalls = 0, fullseen = 0;
  bit consume = 0;
  logic coupled = 0, aw = 0, afull;
  logic [15:0] caddr = 0;
  int naddr = 0, afull_seen = 0;

  stream_in dut (.*);
  mem_model #(.NP(1)) u_mem (.clk, .hold(1'b0), .req(mem_req), .we(1'b0), .addr(mem_addr), .wdata(16'h0),
                             .ready(mem_ready), .rvalid(mem_rvalid), .rdata(mem_rdata));
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic wr(int a, int d);
    @(negedge clk); ag_wr = 1; ag_addr = 6'(a); ag_data = 16'(d);
    @(negedge clk); ag_wr = 0;
  endtask
  task automatic load(int k, logic [31:0] ins);
    wr(2 * k, ins[15:0]); wr(2 * k + 1, ins[31:16]);
  endtask

  always @(negedge clk) begin
    if (dut.fcount == 3'd4) fullseen++;
    rd = consume && ($urandom_range(0, 3) != 0);
    if (rd && empty) stalls++;
    if (rd && !empty) begin
      checks++;
      if (expq.size() == 0 || dout !== u_mem.init_word(expq[0])) begin
        failures++; $display("FAIL dout %h", dout);
      end
      if (expq.size() > 0) void'(expq.pop_front());
    end
    if (rd && empty) rd = 0;   // a stalled datapath does not pop
    aw = coupled && naddr > 0 && 1'($urandom);
    if (aw && afull) begin afull_seen++; aw = 0; end
    if (aw) begin
      caddr = 16'($urandom_range(0, 32767));
      expq.push_back(caddr);
      naddr--;
    end
  end

  initial begin
    repeat (2) @(posedge clk); rst_n = 1;
    load(0, ag_pkt(12, 1, 0));
    load(1, ag_pkt(8, -2, 100));
    load(2, ag_end());
    wr(32, 16'h0040);
    for (int i = 0; i < 12; i++) expq.push_back(16'h40 + 16'(i));
    for (int i = 0; i < 8; i++) expq.push_back(16'h40 + 16'd100 - 16'(2 * i));
    wr(33, 0);
    repeat (20) @(negedge clk);   // consumer idle: the port must read ahead
    consume = 1;
    wait (expq.size() == 0);
    repeat (3) @(negedge clk);
    checks++; if (!idle) begin failures++; $display("FAIL not idle"); end
    checks++; if (fullseen == 0) begin failures++; $display("FAIL no read-ahead"); end
    checks++; if (stalls == 0) begin failures++; $display("FAIL no empty stall"); end
    // coupled mode
    consume = 0;
    @(negedge clk); coupled = 1; naddr = 30;
    repeat (20) @(negedge clk);
    consume = 1;
    wait (naddr == 0 && expq.size() == 0);
    repeat (3) @(negedge clk);
    checks++; if (!idle) begin failures++; $display("FAIL not idle (coupled)"); end
    checks++; if (afull_seen == 0) begin failures++; $display("FAIL address queue never full"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
