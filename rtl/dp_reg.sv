// dp_reg: pipeline register unit of the Rapid datapath.
//
// A w-bit register placed in the array between function units. It loads its
// input from a bus when the global advance `en` and the soft control `we` are
// both high and holds otherwise, so it can delay a value for any number of
// cycles. When its output is routed back through an ALU it acts as an
// accumulator. Reset clears it (own choice).
module dp_reg
  import rapid_pkg::*;
#(
  parameter int unsigned WIDTH = W
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             en,
  input  logic             we,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        q <= '0;
    else if (en && we) q <= d;
  end
endmodule
