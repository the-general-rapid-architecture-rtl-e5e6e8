// tb_risc_datapath: self-checking test of the RISC register file and ALU:
// random register writes through ALU and external data, reads of R0 and the
// FIFO register, ALU results with register and immediate operands, and the
// Z/N/C condition codes, all against a model kept here.
module tb_risc_datapath;
  import rapid_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [3:0] rs, rt, rd;
  logic [15:0] r15_val, imm, ext_data, rs_val, rd_val, alu_y;
  logic use_imm, flags_we, wb_en, wb_ext;
  risc_alu_e alu_op;
  logic flag_z, flag_n, flag_c;
  logic [15:0] m [16];
  int checks = 0, failures = 0;

  risc_datapath dut (.*);
  always #5 clk = ~clk;

  function automatic logic [15:0] rv(logic [3:0] a);
    return a == 0 ? 16'h0 : a == 15 ? r15_val : m[a];
  endfunction

  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [16:0] r;
    logic [15:0] b;
    rs = 0; rt = 0; rd = 0; imm = 0; ext_data = 0; use_imm = 0; flags_we = 0; wb_en = 0; wb_ext = 0;
    alu_op = RA_ADD; r15_val = 16'hbeef;
    repeat (2) @(posedge clk); rst_n = 1;
    // initialise registers through the external-data path
    for (int i = 1; i < 15; i++) begin
      @(negedge clk); rd = 4'(i); wb_en = 1; wb_ext = 1; ext_data = 16'($urandom); m[i] = ext_data;
    end
    for (int i = 0; i < 600; i++) begin
      @(negedge clk);
      rs = 4'($urandom); rt = 4'($urandom); rd = 4'($urandom);
      use_imm = 1'($urandom); imm = 16'($urandom); r15_val = 16'($urandom);
      alu_op = risc_alu_e'($urandom_range(0, 6)); wb_ext = ($urandom_range(0, 3) == 0);
      ext_data = 16'($urandom); wb_en = 1; flags_we = 1;
      b = use_imm ? imm : rv(rt);
      case (alu_op)
        RA_ADD: r = {1'b0, rv(rs)} + {1'b0, b};
        RA_SUB: r = {1'b0, rv(rs)} - {1'b0, b};
        RA_AND: r = {1'b0, rv(rs) & b};
        RA_OR:  r = {1'b0, rv(rs) | b};
        RA_XOR: r = {1'b0, rv(rs) ^ b};
        RA_SLL: r = {1'b0, rv(rs) << b[3:0]};
        default: r = {1'b0, rv(rs) >> b[3:0]};
      endcase
      #1;
      checks++;
      if (alu_y !== r[15:0] || rs_val !== rv(rs) || rd_val !== rv(rd)) begin
        failures++; $display("FAIL op=%0d rs=%0d alu=%h exp=%h", alu_op, rs, alu_y, r[15:0]);
      end
      @(posedge clk);
      if (rd != 0 && rd != 15) m[rd] = wb_ext ? ext_data : r[15:0];
      #1 checks++;
      if (flag_z !== (r[15:0] == 0) || flag_n !== r[15] || flag_c !== r[16]) begin
        failures++; $display("FAIL flags");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
