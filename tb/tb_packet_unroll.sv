// tb_packet_unroll: self-checking test of the packet unroller: random
// packets with random output back-pressure; every address is compared with
// start + i*stride, and back-to-back packets must give one address per
// cycle when the consumer is always ready.
module tb_packet_unroll;
  logic clk = 0, rst_n = 0, in_valid = 0, in_ready, out_valid, out_ready = 0;
  logic [15:0] in_start = 0, in_stride = 0, out_addr;
  logic [9:0] in_count = 0;
  logic [15:0] expq [$];
  int checks = 0, failures = 0, produced = 0, total = 0;
  bit random_ready = 1;

  packet_unroll dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  always @(negedge clk) if (rst_n && out_valid && out_ready) begin
    checks++; produced++;
    if (expq.size() == 0 || out_addr !== expq[0]) begin
      failures++; $display("FAIL addr %h exp %h n=%0d t=%0t", out_addr, expq.size() ? expq[0] : 16'hx, expq.size(), $time);
    end
    if (expq.size() > 0) void'(expq.pop_front());
  end
  always @(posedge clk) #0.5 out_ready = random_ready ? 1'($urandom) : 1'b1;

  task automatic send(logic [15:0] s, logic [15:0] st, int n);
    in_valid = 1; in_start = s; in_stride = st; in_count = 10'(n);
    for (int i = 0; i < n; i++) expq.push_back(s + 16'(i) * st);
    total += n;
    #0.1 while (!in_ready) @(negedge clk);
    @(posedge clk); #1 in_valid = 0;
  endtask

  initial begin
    int t0;
    repeat (2) @(posedge clk); rst_n = 1;
    @(negedge clk);
    for (int i = 0; i < 40; i++) send(16'($urandom), 16'($urandom_range(0, 20)) - 16'd10, $urandom_range(1, 12));
    wait (produced == total);
    // throughput: three packets of 5, always ready -> 15 addresses in 15 cycles
    random_ready = 0;
    @(negedge clk);
    t0 = produced;
    fork
      begin send(16'h100, 16'd1, 5); send(16'h200, 16'd2, 5); send(16'h300, 16'd3, 5); end
      begin @(posedge clk); repeat (15) @(posedge clk); #1 checks++; end
    join
    #0;
    if (produced - t0 != 15) begin failures++; $display("FAIL throughput %0d", produced - t0); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
