// tb_fu_shift: self-checking test of the shifter unit: left, logical right
// and arithmetic right shifts by random amounts.
module tb_fu_shift;
  logic clk = 0, rst_n = 0, en = 1, out_reg = 1, we = 0, right = 0, arith = 0;
  logic [15:0] a = 0, b = 0, y;
  int checks = 0, failures = 0;

  fu_shift dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [15:0] e;
    int s;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int i = 0; i < 300; i++) begin
      @(negedge clk);
      a = 16'($urandom); s = $urandom_range(0, 15); b = 16'(s) | 16'hfff0 & 16'($urandom);
      right = 1'($urandom); arith = 1'($urandom); we = 1;
      if (!right) e = a << s;
      else if (arith) begin
        e = a >> s;
        for (int k = 0; k < s; k++) e[15 - k] = a[15];
      end else e = a >> s;
      @(negedge clk); we = 0;
      checks++;
      if (y !== e) begin failures++; $display("FAIL a=%h s=%0d r=%0d ar=%0d y=%h exp=%h", a, s, right, arith, y, e); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
