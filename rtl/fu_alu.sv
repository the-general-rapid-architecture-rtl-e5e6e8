// fu_alu: ALU function unit of the Rapid datapath, in the shape of the generic
// datapath unit: two w-bit data inputs, soft control inputs choosing the
// operation and enabling the output register, one data output and registered
// status outputs (sign, zero, carry/borrow of the last result written).
//
// The data output passes through an output register when the configuration
// bit out_reg is set, and is the combinational result otherwise (the
// "optional register" of the generic unit). Writes happen only when both the
// global advance enable `en` and the soft control `we` are high, so an
// all-zero instruction is a NOP. Status is always registered: that keeps the
// status -> decode LUT -> control -> unit path free of combinational loops
// (own choice). The operation set (add, sub, and, or, xor, pass a, pass b,
// reverse sub) is own choice; the architecture names ALUs but not their ops.
// With out_reg clear and a bus configuration that feeds the output back to an
// input, the array would hold a combinational loop; the configuration must
// avoid that, as the architecture leaves it to the compiler.
module fu_alu
  import rapid_pkg::*;
#(
  parameter int unsigned WIDTH = W
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             en,       // global datapath advance
  input  logic             out_reg,  // configuration: register the output
  input  alu_op_e          op,       // soft control
  input  logic             we,       // soft control: write output register/status
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  output logic [WIDTH-1:0] y,
  output logic             st_n,
  output logic             st_z,
  output logic             st_c
);
  logic [WIDTH:0]   r;
  logic [WIDTH-1:0] q;

  always_comb begin
    unique case (op)
      ALU_ADD:   r = {1'b0, a} + {1'b0, b};
      ALU_SUB:   r = {1'b0, a} - {1'b0, b};
      ALU_AND:   r = {1'b0, a & b};
      ALU_OR:    r = {1'b0, a | b};
      ALU_XOR:   r = {1'b0, a ^ b};
      ALU_PASSA: r = {1'b0, a};
      ALU_PASSB: r = {1'b0, b};
      ALU_RSUB:  r = {1'b0, b} - {1'b0, a};
      default:   r = '0;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q    <= '0;
      st_n <= 1'b0;
      st_z <= 1'b0;
      st_c <= 1'b0;
    end else if (en && we) begin
      q    <= r[WIDTH-1:0];
      st_n <= r[WIDTH-1];
      st_z <= (r[WIDTH-1:0] == '0);
      st_c <= r[WIDTH];
    end
  end

  assign y = out_reg ? q : r[WIDTH-1:0];
endmodule
