// tb_dp_ram: self-checking test of the datapath memory in both modes:
// addressed random writes and reads against a reference array, then the
// shift-register mode with several lengths, checking that each output is the
// input from len+1 shifts earlier.
module tb_dp_ram;
  logic clk = 0, rst_n = 0, en = 1, mode = 0, we = 0, ren = 0;
  logic [4:0] len = 0;
  logic [15:0] a = 0, b = 0, y;
  logic [15:0] ref_mem [32];
  int checks = 0, failures = 0;

  dp_ram dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [15:0] hist [$];
    repeat (2) @(posedge clk); rst_n = 1;
    // memory mode: fill, then random traffic
    for (int i = 0; i < 32; i++) begin
      @(negedge clk); we = 1; a = 16'(i); b = 16'($urandom); ref_mem[i] = b;
    end
    @(negedge clk); we = 0;
    for (int i = 0; i < 300; i++) begin
      @(negedge clk);
      a = 16'($urandom_range(0, 31)); b = 16'($urandom);
      we = 1'($urandom); ren = 1; en = ($urandom_range(0, 7) != 0);
      @(posedge clk);
      if (en) begin
        #1;
        checks++;
        if (y !== ref_mem[a[4:0]]) begin failures++; $display("FAIL read %0d y=%h exp=%h", a, y, ref_mem[a[4:0]]); end
        if (we) ref_mem[a[4:0]] = b;
      end
    end
    // shift-register mode
    en = 1;
    for (int L = 0; L < 12; L += 3) begin
      @(negedge clk); we = 0; ren = 0; mode = 1; len = 5'(L);
      rst_n = 0; @(negedge clk); rst_n = 1;
      hist.delete();
      for (int i = 0; i < 40; i++) begin
        @(negedge clk); ren = 1; b = 16'($urandom);
        hist.push_back(b);
        @(posedge clk); #1;
        if (i > L) begin
          checks++;
          if (y !== hist[i - L - 1]) begin failures++; $display("FAIL shift L=%0d i=%0d y=%h exp=%h", L, i, y, hist[i-L-1]); end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
