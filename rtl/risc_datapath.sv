// risc_datapath: register file and ALU of the RISC that runs the control-flow
// code of a Rapid program.
//
// Sixteen 16-bit registers; R0 always reads 0 and register FIFO_REG (R15) is
// not stored here: reads of it return `r15_val` (the word at the head of the
// datapath->RISC FIFO, supplied by the sequencer) and writes to it go to the
// RISC->datapath FIFO instead. The ALU adds, subtracts, does bitwise logic
// and shifts; operand b is a register or the immediate. Each ALU operation
// with `flags_we` updates the condition codes Z (zero), N (negative) and
// C (carry out of an add, borrow of a subtract) used by branches. The result
// written back is the ALU output or `ext_data` (a load or FIFO word).
// An ALU plus register file with condition codes and a reserved FIFO
// register follow the architecture; the register count, the operations and
// the choice of R15 are own choices.
module risc_datapath
  import rapid_pkg::*;
#(
  parameter int unsigned WIDTH = W
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [3:0]       rs,
  input  logic [3:0]       rt,
  input  logic [3:0]       rd,
  input  logic [WIDTH-1:0] r15_val,
  input  logic             use_imm,
  input  logic [WIDTH-1:0] imm,
  input  risc_alu_e        alu_op,
  input  logic             flags_we,
  input  logic             wb_en,
  input  logic             wb_ext,
  input  logic [WIDTH-1:0] ext_data,
  output logic [WIDTH-1:0] rs_val,
  output logic [WIDTH-1:0] rd_val,
  output logic [WIDTH-1:0] alu_y,
  output logic             flag_z,
  output logic             flag_n,
  output logic             flag_c
);
  logic [WIDTH-1:0] rf [16];
  logic [WIDTH-1:0] rt_val, b;
  logic [WIDTH:0]   r;

  function automatic logic [WIDTH-1:0] rdreg(input logic [3:0] a);
    if (a == 4'd0)          return '0;
    else if (a == FIFO_REG) return r15_val;
    else                    return rf[a];
  endfunction

  assign rs_val = rdreg(rs);
  assign rt_val = rdreg(rt);
  assign rd_val = rdreg(rd);
  assign b      = use_imm ? imm : rt_val;

  always_comb begin
    unique case (alu_op)
      RA_ADD:  r = {1'b0, rs_val} + {1'b0, b};
      RA_SUB:  r = {1'b0, rs_val} - {1'b0, b};
      RA_AND:  r = {1'b0, rs_val & b};
      RA_OR:   r = {1'b0, rs_val | b};
      RA_XOR:  r = {1'b0, rs_val ^ b};
      RA_SLL:  r = {1'b0, rs_val << b[3:0]};
      RA_SRL:  r = {1'b0, rs_val >> b[3:0]};
      default: r = '0;
    endcase
  end
  assign alu_y = r[WIDTH-1:0];

  always_ff @(posedge clk) begin
    if (wb_en && rd != 4'd0 && rd != FIFO_REG)
      rf[rd] <= wb_ext ? ext_data : alu_y;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      flag_z <= 1'b0;
      flag_n <= 1'b0;
      flag_c <= 1'b0;
    end else if (flags_we) begin
      flag_z <= (alu_y == '0);
      flag_n <= alu_y[WIDTH-1];
      flag_c <= r[WIDTH];
    end
  end
endmodule
