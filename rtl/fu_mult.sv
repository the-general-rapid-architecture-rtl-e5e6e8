// fu_mult: multiplier function unit of the Rapid datapath.
//
// Multiplies its two w-bit inputs as signed numbers and delivers either the
// low or the high half of the 2w-bit product, chosen by the soft control
// `hi`. The high half lets fixed-point products (Q1.15 and the like) be taken
// directly. Like every unit it has a configurable output register written
// when the global advance `en` and the soft control `we` are both high; with
// out_reg clear the output is combinational. The architecture names
// multipliers as function units; signedness and the high/low selection are
// own choices.
// A lint tool that sees this unit inside the datapath reports circular logic
// through its output: with out_reg clear the unit is combinational, and the
// bus network can route its output back to its inputs. Valid configurations
// never close that loop (see rapid_datapath).
module fu_mult
  import rapid_pkg::*;
#(
  parameter int unsigned WIDTH = W
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             en,
  input  logic             out_reg,
  input  logic             we,
  input  logic             hi,
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  output logic [WIDTH-1:0] y
);
  logic signed [2*WIDTH-1:0] p;
  logic [WIDTH-1:0]          r, q;

  assign p = $signed(a) * $signed(b);
  assign r = hi ? p[2*WIDTH-1:WIDTH] : p[WIDTH-1:0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        q <= '0;
    else if (en && we) q <= r;
  end

  assign y = out_reg ? q : r;
endmodule
