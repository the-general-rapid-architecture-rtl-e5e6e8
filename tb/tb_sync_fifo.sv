// tb_sync_fifo: self-checking test of the FIFO against a queue model with
// random pushes and pops, never pushing when full or popping when empty;
// checks the head word, the count and the empty/full flags every cycle.
module tb_sync_fifo;
  logic clk = 0, rst_n = 0, push = 0, pop = 0;
  logic [15:0] din = 0, dout;
  logic empty, full;
  logic [2:0] count;
  logic [15:0] q [$];
  int checks = 0, failures = 0, fulls = 0;

  sync_fifo #(.WIDTH(16), .DEPTH(4)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (2) @(posedge clk); rst_n = 1;
    for (int i = 0; i < 1000; i++) begin
      @(negedge clk);
      checks++;
      if (empty !== (q.size() == 0) || full !== (q.size() == 4) || count !== 3'(q.size()) ||
          (q.size() > 0 && dout !== q[0])) begin
        failures++; $display("FAIL i=%0d size=%0d count=%0d", i, q.size(), count);
      end
      if (full) fulls++;
      push = !full && ($urandom_range(0, 9) < (i < 500 ? 7 : 3));
      pop  = !empty && ($urandom_range(0, 9) < (i < 500 ? 3 : 7));
      din  = 16'($urandom);
      @(posedge clk);
      if (pop) void'(q.pop_front());
      if (push) q.push_back(din);
    end
    checks++; if (fulls == 0) begin failures++; $display("FAIL never full"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
