// fu_shift: shifter function unit of the Rapid datapath.
//
// Shifts data input a by the amount held in the low bits of data input b.
// Soft controls choose left or right (`right`) and, for right shifts,
// arithmetic or logical (`arith`). The output has the configurable output
// register common to all units, written when `en` and `we` are high. The
// architecture names shifters as function units; the operation set is own
// choice.
// A lint tool that sees this unit inside the datapath reports circular logic
// through its output: with out_reg clear the unit is combinational, and the
// bus network can route its output back to its inputs. Valid configurations
// never close that loop (see rapid_datapath).
module fu_shift
  import rapid_pkg::*;
#(
  parameter int unsigned WIDTH = W
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             en,
  input  logic             out_reg,
  input  logic             we,
  input  logic             right,
  input  logic             arith,
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  output logic [WIDTH-1:0] y
);
  localparam int unsigned SW = $clog2(WIDTH);
  logic [SW-1:0]    sh;
  logic [WIDTH-1:0] r, q;

  assign sh = b[SW-1:0];

  always_comb begin
    if (!right)     r = a << sh;
    else if (arith) r = WIDTH'($signed(a) >>> sh);
    else            r = a >> sh;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        q <= '0;
    else if (en && we) q <= r;
  end

  assign y = out_reg ? q : r;
endmodule
