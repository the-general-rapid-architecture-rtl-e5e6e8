// tb_cfg_regs: self-checking test of the configuration memory: reset value,
// random writes checked through the read port and the parallel outputs.
module tb_cfg_regs;
  logic clk = 0, rst_n = 0, wr = 0;
  logic [5:0] waddr = 0, raddr = 0;
  logic [15:0] wdata = 0, rdata;
  logic [63:0][15:0] q;
  logic [15:0] model [64];
  int checks = 0, failures = 0;

  cfg_regs #(.NREG(64)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (3000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (2) @(posedge clk); rst_n = 1;
    for (int i = 0; i < 64; i++) model[i] = 0;
    for (int i = 0; i < 500; i++) begin
      @(negedge clk);
      wr = 1'($urandom); waddr = 6'($urandom); wdata = 16'($urandom); raddr = 6'($urandom);
      #1 checks++;
      if (rdata !== model[raddr]) begin failures++; $display("FAIL read %0d", raddr); end
      @(posedge clk);
      if (wr) model[waddr] = wdata;
    end
    @(negedge clk);
    for (int i = 0; i < 64; i++) begin
      checks++; if (q[i] !== model[i]) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
