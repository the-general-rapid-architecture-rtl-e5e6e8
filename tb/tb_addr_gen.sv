// tb_addr_gen: self-checking test of the stream address generator. Loads a
// program with a loop around a packet and a base update, two nested loops
// sharing their last instruction, and END; checks every packet emitted
// (with random back-pressure) against the expected list, then rewrites one
// instruction, restarts, and checks that the new program runs. Finally runs
// triangular loops in both modes (inner count 1..N and N..1 from the
// enclosing loop, and the fallback count with no enclosing loop).
module tb_addr_gen;
  import rapid_pkg::*;
  logic clk = 0, rst_n = 0, wr_en = 0, pkt_valid, pkt_ready = 0, running, done;
  logic [5:0] wr_addr = 0;
  logic [15:0] wr_data = 0, pkt_start, pkt_stride;
  logic [9:0] pkt_count;
  logic [41:0] expq [$];
  int checks = 0, failures = 0, got = 0;

  addr_gen dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  always @(posedge clk) #0.5 pkt_ready = 1'($urandom);
  always @(negedge clk) if (rst_n && pkt_valid && pkt_ready) begin
    checks++; got++;
    if (expq.size() == 0 || {pkt_start, pkt_stride, pkt_count} !== expq[0]) begin
      failures++; $display("FAIL packet %h %h %0d", pkt_start, pkt_stride, pkt_count);
    end
    if (expq.size() > 0) void'(expq.pop_front());
  end

  task automatic wr(int a, int d);
    @(negedge clk); wr_en = 1; wr_addr = 6'(a); wr_data = 16'(d);
    @(negedge clk); wr_en = 0;
  endtask
  task automatic load(int k, logic [31:0] ins);
    wr(2 * k, ins[15:0]); wr(2 * k + 1, ins[31:16]);
  endtask

  initial begin
    repeat (2) @(posedge clk); rst_n = 1;
    load(0, ag_loop(3, 2));
    load(1, ag_pkt(4, 2, 0));
    load(2, ag_addb(16));
    load(3, ag_loop(2, 5));
    load(4, ag_loop(2, 5));
    load(5, ag_pkt(1, 0, -1));
    load(6, ag_end());
    wr(32, 16'h0100);
    for (int i = 0; i < 3; i++) expq.push_back({16'h0100 + 16'(16 * i), 16'd2, 10'd4});
    for (int i = 0; i < 4; i++) expq.push_back({16'h012f, 16'd0, 10'd1});
    wr(33, 0);
    wait (done);
    checks++; if (expq.size() != 0 || got != 7) begin failures++; $display("FAIL got %0d", got); end
    // reprogram: packet with negative stride, then restart
    load(1, ag_pkt(5, -3, 8));
    got = 0;
    for (int i = 0; i < 3; i++) expq.push_back({16'h0108 + 16'(16 * i), 16'hfffd, 10'd5});
    for (int i = 0; i < 4; i++) expq.push_back({16'h012f, 16'd0, 10'd1});
    wr(33, 0);
    @(negedge clk);
    wait (done);
    checks++; if (expq.size() != 0 || got != 7) begin failures++; $display("FAIL got %0d after restart", got); end
    // triangular loops
    for (int mode = 1; mode <= 2; mode++) begin
      load(0, ag_loop(3, 3));
      load(1, ag_tloop(mode, 2));
      load(2, ag_pkt(2, 1, 0));
      load(3, ag_addb(16));
      load(4, ag_tloop(mode, 5));
      load(5, ag_pkt(1, 0, -1));
      load(6, ag_end());
      got = 0;
      for (int i = 0; i < 3; i++)
        for (int j = 0; j < (mode == 1 ? i + 1 : 3 - i); j++)
          expq.push_back({16'h0100 + 16'(16 * i), 16'd1, 10'd2});
      expq.push_back({16'h012f, 16'd0, 10'd1});
      wr(33, 0);
      @(negedge clk);
      wait (done);
      checks++; if (expq.size() != 0 || got != 7) begin failures++; $display("FAIL triangular mode %0d got %0d", mode, got); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
