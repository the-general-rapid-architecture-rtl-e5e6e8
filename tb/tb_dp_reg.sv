// tb_dp_reg: self-checking test of the datapath register: loads only when
// both `en` and `we` are high, holds otherwise.
module tb_dp_reg;
  logic clk = 0, rst_n = 0, en = 0, we = 0;
  logic [15:0] d = 0, q, model;
  int checks = 0, failures = 0;

  dp_reg dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (2) @(posedge clk); rst_n = 1; model = 0;
    @(negedge clk); checks++; if (q !== 0) failures++;
    for (int i = 0; i < 400; i++) begin
      en = 1'($urandom); we = 1'($urandom); d = 16'($urandom);
      if (en && we) model = d;
      @(negedge clk);
      checks++;
      if (q !== model) begin failures++; $display("FAIL q=%h exp=%h", q, model); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
