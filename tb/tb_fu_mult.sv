// tb_fu_mult: self-checking test of the multiplier unit: random signed
// operands, low and high halves of the product, registered and
// combinational output, hold when `we` is low.
module tb_fu_mult;
  logic clk = 0, rst_n = 0, en = 1, out_reg = 1, we = 0, hi = 0;
  logic [15:0] a = 0, b = 0, y;
  int checks = 0, failures = 0;

  fu_mult dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic signed [31:0] p;
    logic [15:0] e;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int i = 0; i < 300; i++) begin
      @(negedge clk);
      a = 16'($urandom); b = 16'($urandom); hi = 1'($urandom); we = 1;
      p = $signed(a) * $signed(b);
      e = hi ? p[31:16] : p[15:0];
      @(negedge clk); we = 0;
      checks++;
      if (y !== e) begin failures++; $display("FAIL %h*%h hi=%0d y=%h exp=%h", a, b, hi, y, e); end
    end
    e = y; a = 3; b = 5; hi = 0;
    @(negedge clk); checks++; if (y !== e) failures++;
    out_reg = 0; #1 checks++; if (y !== 16'd15) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
