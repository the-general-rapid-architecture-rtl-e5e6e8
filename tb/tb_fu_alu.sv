// tb_fu_alu: self-checking test of the ALU function unit.
// Drives random operands and operations, compares the registered output and
// the registered sign/zero/carry flags with a reference computed here, checks
// that the register holds when `we` or `en` is low, and checks the
// combinational path when the output register is configured off.
module tb_fu_alu;
  import rapid_pkg::*;
  logic clk = 0, rst_n = 0, en, out_reg, we;
  alu_op_e op;
  logic [15:0] a, b, y;
  logic st_n, st_z, st_c;
  int checks = 0, failures = 0;

  fu_alu dut (.*);
  always #5 clk = ~clk;

  function automatic logic [16:0] ref_alu(alu_op_e o, logic [15:0] x, logic [15:0] z);
    case (o)
      ALU_ADD:   return {1'b0, x} + {1'b0, z};
      ALU_SUB:   return {1'b0, x} - {1'b0, z};
      ALU_AND:   return {1'b0, x & z};
      ALU_OR:    return {1'b0, x | z};
      ALU_XOR:   return {1'b0, x ^ z};
      ALU_PASSA: return {1'b0, x};
      ALU_PASSB: return {1'b0, z};
      default:   return {1'b0, z} - {1'b0, x};
    endcase
  endfunction

  task automatic chk(logic ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [16:0] r;
    logic [15:0] held;
    en = 1; out_reg = 1; we = 0; op = ALU_ADD; a = 0; b = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 300; i++) begin
      @(negedge clk);
      op = alu_op_e'($urandom_range(0, 7));
      a = 16'($urandom); b = 16'($urandom);
      if (i % 7 == 0) b = a;   // exercise zero results
      we = 1;
      r = ref_alu(op, a, b);
      @(negedge clk);
      we = 0;
      chk(y == r[15:0], $sformatf("y op=%0d a=%h b=%h y=%h exp=%h", op, a, b, y, r[15:0]));
      chk(st_n == r[15] && st_z == (r[15:0] == 0) && st_c == r[16], "flags");
    end
    // hold when en is low
    held = y;
    @(negedge clk); en = 0; we = 1; a = ~a; op = ALU_PASSA;
    @(negedge clk); chk(y == held, "hold with en=0");
    en = 1; we = 0;
    @(negedge clk); chk(y == held, "hold with we=0");
    // combinational output
    out_reg = 0; op = ALU_XOR; a = 16'h1234; b = 16'h00ff;
    #1 chk(y == 16'h12cb, "combinational path");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
