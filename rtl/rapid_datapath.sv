// rapid_datapath: the linear array of the default Rapid datapath.
//
// Ten unit outputs and seventeen unit inputs placed at eight positions along
// a line, joined by nine bus segments in four tracks (data_network):
//   position: 0          1    2     3     4     5     6      7
//   units:    in0,in1,   ram  alu0  reg0  mult  alu1  shift  reg1,
//             r2d,                                           out0, d2r,
//             in0/in1 address                                out0 address
//   track 0: four segments of two positions  (busses 0..3)
//   track 1: two halves joined by a bus connector, bus 4 -> bus 5
//   track 2: one segment over the whole array (bus 6)
//   track 3: two halves joined by a bus connector, bus 7 -> bus 8
// A unit may drive or read a segment only if the segment spans its position.
// in0/in1 are the data of the input streams, out0 the data of the output
// stream, r2d and d2r the data FIFOs from and to the RISC; their handshakes
// live outside. The three address inputs feed the stream ports in coupled
// mode, where the datapath computes memory addresses itself. Soft controls come from the control decode (see rapid_pkg
// for the order), hard controls from configuration words: bus_sel and
// dst_sel for the multiplexers, and misc = {coupled out0/in1/in0 [15:13],
// st_sel[12:10], ram_len[9:5],
// ram_mode[4], shift/mult/alu1/alu0 out_reg[3:0]}. `status` carries the
// registered ALU flags, `st_bit` the flag selected by st_sel for the status
// FIFO. Every register in the array writes only when `en` is high.
// The output register of the ALUs, multiplier and shifter can be configured
// off, as in the generic unit; a unit then drives its bus combinationally,
// so the netlist holds a structural loop unit -> bus -> unit. It is closed
// only by a configuration that routes a combinational unit back to its own
// inputs, which a valid configuration must not do; this is why lint tools
// report circular logic here.
// The mix of units follows the unit row of the architecture's overview
// figure in spirit (RAM, ALUs, multiplier, registers, streams at the ends);
// the exact mix, positions and track layout are own choices.
module rapid_datapath
  import rapid_pkg::*;
#(
  parameter int unsigned RAM_DEPTH = 32
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    en,
  input  logic [NCTRL-1:0]        ctrl,
  input  logic [NBUS_DP-1:0][15:0] bus_cfg,
  input  logic [NDST_DP-1:0][15:0] dst_cfg,
  input  logic [15:0]             misc,
  input  logic [W-1:0]            in0_data,
  input  logic [W-1:0]            in1_data,
  input  logic [W-1:0]            r2d_data,
  output logic [W-1:0]            out0_data,
  output logic [W-1:0]            d2r_data,
  output logic [W-1:0]            in0_caddr,   // coupled-mode stream addresses
  output logic [W-1:0]            in1_caddr,
  output logic [W-1:0]            out0_caddr,
  output logic [NST-1:0]          status,
  output logic                    st_bit
);
  localparam int unsigned NSRC = 10;
  localparam int unsigned NDST = NDST_DP;
  localparam int unsigned NBUS = NBUS_DP;
  localparam int unsigned BSW  = $clog2(1 + NSRC + NBUS);
  localparam int unsigned DSW  = $clog2(1 + NBUS);

  localparam int SRC_POS [NSRC] = '{0, 0, 0, 1, 2, 3, 4, 5, 6, 7};
  localparam int DST_POS [NDST] = '{1, 1, 2, 2, 3, 4, 4, 5, 5, 6, 6, 7, 7, 7, 0, 0, 7};
  localparam int BUS_LO  [NBUS] = '{0, 2, 4, 6, 0, 4, 0, 0, 4};
  localparam int BUS_HI  [NBUS] = '{1, 3, 5, 7, 3, 7, 7, 3, 7};

  function automatic logic [NBUS-1:0][NSRC-1:0] src_mask();
    for (int b = 0; b < NBUS; b++)
      for (int k = 0; k < NSRC; k++)
        src_mask[b][k] = SRC_POS[k] >= BUS_LO[b] && SRC_POS[k] <= BUS_HI[b];
  endfunction
  function automatic logic [NDST-1:0][NBUS-1:0] dst_mask();
    for (int d = 0; d < NDST; d++)
      for (int b = 0; b < NBUS; b++)
        dst_mask[d][b] = DST_POS[d] >= BUS_LO[b] && DST_POS[d] <= BUS_HI[b];
  endfunction
  function automatic logic [NBUS-1:0][NBUS-1:0] bus_mask();
    bus_mask = '0;
    bus_mask[5][4] = 1'b1;   // bus connector on track 1
    bus_mask[8][7] = 1'b1;   // bus connector on track 3
  endfunction

  logic [NSRC-1:0][W-1:0]   src;
  logic [NBUS-1:0][W-1:0]   bus;
  logic [NDST-1:0][W-1:0]   dst;
  logic [NBUS-1:0][BSW-1:0] bus_sel;
  logic [NDST-1:0][DSW-1:0] dst_sel;

  for (genvar b = 0; b < NBUS; b++) begin : g_bsel
    assign bus_sel[b] = bus_cfg[b][BSW-1:0];
  end
  for (genvar d = 0; d < NDST; d++) begin : g_dsel
    assign dst_sel[d] = dst_cfg[d][DSW-1:0];
  end

  data_network #(
    .WIDTH(W), .NSRC(NSRC), .NDST(NDST), .NBUS(NBUS),
    .SRC_MASK(src_mask()), .BUS_MASK(bus_mask()), .DST_MASK(dst_mask())
  ) u_net (
    .src, .bus_sel, .dst_sel, .bus, .dst
  );

  logic [W-1:0] ram_y, alu0_y, alu1_y, mul_y, sh_y, reg0_q, reg1_q;
  logic         a0n, a0z, a0c, a1n, a1z, a1c;

  assign src = {reg1_q, sh_y, alu1_y, mul_y, reg0_q, alu0_y, ram_y, r2d_data, in1_data, in0_data};

  dp_ram #(.WIDTH(W), .DEPTH(RAM_DEPTH)) u_ram (
    .clk, .rst_n, .en, .mode(misc[4]), .len(misc[5 +: $clog2(RAM_DEPTH)]),
    .we(ctrl[C_RAM_WE]), .ren(ctrl[C_RAM_EN]), .a(dst[0]), .b(dst[1]), .y(ram_y)
  );

  fu_alu #(.WIDTH(W)) u_alu0 (
    .clk, .rst_n, .en, .out_reg(misc[0]), .op(alu_op_e'(ctrl[C_ALU0_OP +: 3])),
    .we(ctrl[C_ALU0_WE]), .a(dst[2]), .b(dst[3]), .y(alu0_y),
    .st_n(a0n), .st_z(a0z), .st_c(a0c)
  );

  dp_reg #(.WIDTH(W)) u_reg0 (
    .clk, .rst_n, .en, .we(ctrl[C_REG0_WE]), .d(dst[4]), .q(reg0_q)
  );

  fu_mult #(.WIDTH(W)) u_mult (
    .clk, .rst_n, .en, .out_reg(misc[2]), .we(ctrl[C_MUL_WE]), .hi(ctrl[C_MUL_HI]),
    .a(dst[5]), .b(dst[6]), .y(mul_y)
  );

  fu_alu #(.WIDTH(W)) u_alu1 (
    .clk, .rst_n, .en, .out_reg(misc[1]), .op(alu_op_e'(ctrl[C_ALU1_OP +: 3])),
    .we(ctrl[C_ALU1_WE]), .a(dst[7]), .b(dst[8]), .y(alu1_y),
    .st_n(a1n), .st_z(a1z), .st_c(a1c)
  );

  fu_shift #(.WIDTH(W)) u_shift (
    .clk, .rst_n, .en, .out_reg(misc[3]), .we(ctrl[C_SH_WE]), .right(ctrl[C_SH_RIGHT]),
    .arith(ctrl[C_SH_ARITH]), .a(dst[9]), .b(dst[10]), .y(sh_y)
  );

  dp_reg #(.WIDTH(W)) u_reg1 (
    .clk, .rst_n, .en, .we(ctrl[C_REG1_WE]), .d(dst[11]), .q(reg1_q)
  );

  assign out0_data = dst[12];
  assign d2r_data  = dst[13];
  assign in0_caddr  = dst[14];
  assign in1_caddr  = dst[15];
  assign out0_caddr = dst[16];

  assign status = {a1c, a1z, a1n, a0c, a0z, a0n};
  assign st_bit = status[misc[12:10]];
endmodule
