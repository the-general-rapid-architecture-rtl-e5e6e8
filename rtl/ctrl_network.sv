// ctrl_network: configurable control decode of the Rapid array.
//
// Turns the datapath instruction bits issued by the sequencer into the soft
// control signals of the datapath. A set of decode lines is formed from
//   line 0                      ground (constant 0)
//   lines 1 .. NIB              instruction bits
//   next NST lines              status bits from the datapath
//   next NLUT lines             LUT outputs, registered (LUT state)
//   next NLUT lines             LUT outputs, combinational
// Each control signal has a multiplexer that picks one line (cfg.sel), so
// several control signals can share one instruction bit. The picked value
// then passes through a configurable delay of 0..MAXDLY cycles (cfg.dly),
// which offsets that signal in time against the others (limited control
// pipelining). A signal can instead be soft-configured to a constant
// (cfg.cst, cfg.cval), in which case no instruction bit drives it.
// Each 3-input LUT picks its inputs from the ground, instruction, status and
// registered-LUT lines and maps them through an 8-entry truth table; the
// registered copy of its output, fed back as an input, makes small FSMs
// (flags, parity). LUT inputs may not take combinational LUT outputs, which
// keeps the decode free of loops (own choice).
// Delay stages and LUT state advance only when `en` is high, so control stays
// aligned with a stalled datapath. Selecting lines through multiplexers,
// LUTs fed by instruction and status bits, and per-signal offsets follow the
// architecture; line order, 3-input LUTs, the depth of the offset and the
// configuration encoding are own choices.
module ctrl_network
  import rapid_pkg::*;
#(
  parameter int unsigned NIBITS = NIB,
  parameter int unsigned NSTAT  = NST,
  parameter int unsigned NL     = NLUT,
  parameter int unsigned NC     = NCTRL,
  parameter int unsigned MAXD   = MAXDLY
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  en,
  input  logic [NIBITS-1:0]     instr,
  input  logic [NSTAT-1:0]      status,
  input  ctrl_cfg_t [NC-1:0]    cfg,
  input  lut_cfg_t  [NL-1:0]    lcfg,
  output logic [NC-1:0]         ctrl
);
  localparam int unsigned NLINES   = 1 + NIBITS + NSTAT + 2 * NL;
  localparam int unsigned LUT_Q0   = 1 + NIBITS + NSTAT;   // first registered LUT line
  localparam int unsigned LUT_C0   = LUT_Q0 + NL;          // first combinational LUT line

  logic [NL-1:0]     lut_c, lut_q;
  logic [NLINES-1:0] line_base;   // lines LUT inputs may use
  logic [NLINES-1:0] line;

  assign line_base = {{NL{1'b0}}, lut_q, status, instr, 1'b0};
  assign line      = {lut_c, lut_q, status, instr, 1'b0};

  function automatic logic pick(input logic [NLINES-1:0] l, input logic [5:0] s);
    pick = 1'b0;
    for (int i = 0; i < LUT_C0; i++)
      if (s == 6'(i)) pick = l[i];
  endfunction

  for (genvar i = 0; i < NL; i++) begin : g_lut
    logic [2:0] idx;
    assign idx      = {pick(line_base, lcfg[i].sel2), pick(line_base, lcfg[i].sel1),
                       pick(line_base, lcfg[i].sel0)};
    assign lut_c[i] = lcfg[i].table_bits[idx];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  lut_q <= '0;
    else if (en) lut_q <= lut_c;
  end

  for (genvar c = 0; c < NC; c++) begin : g_ctrl
    logic          sel_v;
    logic [MAXD:0] chain;   // chain[0] undelayed, chain[k] delayed by k
    always_comb begin
      sel_v = 1'b0;
      for (int i = 0; i < NLINES; i++)
        if (cfg[c].sel == 6'(i)) sel_v = line[i];
    end
    assign chain[0] = sel_v;
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n)  chain[MAXD:1] <= '0;
      else if (en) chain[MAXD:1] <= chain[MAXD-1:0];
    end
    always_comb begin
      if (cfg[c].cst) ctrl[c] = cfg[c].cval;
      else            ctrl[c] = chain[cfg[c].dly];
    end
  end
endmodule
