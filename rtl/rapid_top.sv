// rapid_top: a complete Rapid array.
//
// A sequencer with its RISC datapath fetches 32-bit instructions. RISC
// instructions run control flow and scalar code; Rapid instructions send 24
// instruction bits, repeated as a packet, to the configurable control decode
// (ctrl_network), which turns them, the datapath status and its LUT state
// into the soft control signals of the datapath (rapid_datapath). Hard
// control and the decode configuration sit in cfg_regs. Two input stream
// ports and one output stream port move data between memory and the array,
// each with its own address generator; configuration bits switch each of
// them to coupled mode, where the datapath supplies the addresses. Two data
// FIFOs connect the RISC and the datapath, and a status FIFO returns datapath flags to the sequencer for
// branches.
//
// Stalls: the whole datapath (every register, the decode offsets and LUT
// state, the packet repeat count) holds for a cycle when any active soft
// control asks for an empty input (stream, RISC FIFO) or a full output
// (stream, RISC FIFO, status FIFO), or pushes an address into the full
// address queue of a coupled-mode input stream. The RISC keeps running meanwhile until it
// needs the datapath.
//
// RISC address map: 0x0000-0x7FFF external memory (mem_* port),
// 0x8000-0x81FF instruction memory (write only), 0x9000+i configuration word
// i (read/write), 0xA000 + 64*g + k word k of address generator g
// (g = 0 in0, 1 in1, 2 out0; reads return the stream idle flags
// {out0, in1, in0}). Configuration and generator accesses complete in one
// cycle, loads one cycle later.
//
// Memory ports: each is a request with valid/ready; read data returns in
// order, at least one cycle after the request is accepted. The memory itself
// is outside the array. `prog_*` loads the instruction memory before
// `start`; `halted` rises once the program reaches HALT and its last
// packet has been issued.
// The structure follows the architecture's overview; the sizes, the address
// map, FIFO depths and the stall rule are own choices.
module rapid_top
  import rapid_pkg::*;
#(
  parameter int unsigned IDEPTH    = 256,
  parameter int unsigned RAM_DEPTH = 32,
  parameter int unsigned FDEPTH    = 4,
  parameter int unsigned SDEPTH    = 4
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  output logic          halted,
  output logic [2:0]    streams_idle,
  input  logic          prog_wr,
  input  logic [$clog2(IDEPTH)-1:0] prog_addr,
  input  logic [IW-1:0] prog_data,
  // RISC memory port
  output logic          mem_req,
  output logic          mem_we,
  output logic [14:0]   mem_addr,
  output logic [W-1:0]  mem_wdata,
  input  logic          mem_ready,
  input  logic          mem_rvalid,
  input  logic [W-1:0]  mem_rdata,
  // input stream 0
  output logic          in0_req,
  output logic [15:0]   in0_addr,
  input  logic          in0_ready,
  input  logic          in0_rvalid,
  input  logic [W-1:0]  in0_rdata,
  // input stream 1
  output logic          in1_req,
  output logic [15:0]   in1_addr,
  input  logic          in1_ready,
  input  logic          in1_rvalid,
  input  logic [W-1:0]  in1_rdata,
  // output stream 0
  output logic          out0_req,
  output logic [15:0]   out0_addr,
  output logic [W-1:0]  out0_wdata,
  input  logic          out0_ready
);
  localparam int unsigned NREG = 64;

  // ------------------------------------------------------------ sequencer
  logic [NIB-1:0] dp_instr;
  logic           dp_busy, stall, en;
  logic           r2d_push, r2d_full, r2d_empty, d2r_pop, d2r_empty, d2r_full;
  logic [W-1:0]   r2d_wdata, r2d_q, d2r_wdata, d2r_q;
  logic           st_pop, st_q, st_empty, st_full, st_bit;
  logic           sys_req, sys_we, sys_ready, sys_rvalid;
  logic [15:0]    sys_addr;
  logic [W-1:0]   sys_wdata, sys_rdata;

  sequencer #(.IDEPTH(IDEPTH)) u_seq (
    .clk, .rst_n, .start, .halted, .prog_wr, .prog_addr, .prog_data,
    .dp_instr, .dp_busy, .dp_stall(stall),
    .r2d_push, .r2d_data(r2d_wdata), .r2d_full,
    .d2r_pop, .d2r_data(d2r_q), .d2r_empty,
    .st_pop, .st_data(st_q), .st_empty,
    .sys_req, .sys_we, .sys_addr, .sys_wdata, .sys_ready, .sys_rvalid, .sys_rdata
  );

  // ---------------------------------------------------------- address decode
  logic        sel_ext, sel_cfg, sel_ag;
  logic        loc_rvalid;
  logic [W-1:0] loc_rdata;
  logic [NREG-1:0][15:0] cfg;
  logic [15:0] cfg_rdata;
  logic [2:0]  ag_wr;

  assign sel_ext = sys_addr[15] == 1'b0;
  assign sel_cfg = sys_addr[15:8] == A_CFG[15:8];
  assign sel_ag  = sys_addr[15:8] == A_AG[15:8];

  assign mem_req   = sys_req && sel_ext;
  assign mem_we    = sys_we;
  assign mem_addr  = sys_addr[14:0];
  assign mem_wdata = sys_wdata;
  assign sys_ready = sel_ext ? mem_ready : 1'b1;
  assign sys_rvalid = mem_rvalid || loc_rvalid;
  assign sys_rdata  = loc_rvalid ? loc_rdata : mem_rdata;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      loc_rvalid <= 1'b0;
      loc_rdata  <= '0;
    end else begin
      loc_rvalid <= sys_req && !sys_we && !sel_ext;
      loc_rdata  <= sel_cfg ? cfg_rdata : sel_ag ? W'(streams_idle) : '0;
    end
  end

  cfg_regs #(.NREG(NREG)) u_cfg (
    .clk, .rst_n, .wr(sys_req && sys_we && sel_cfg), .waddr(sys_addr[5:0]),
    .wdata(sys_wdata), .raddr(sys_addr[5:0]), .rdata(cfg_rdata), .q(cfg)
  );

  for (genvar g = 0; g < 3; g++) begin : g_agwr
    assign ag_wr[g] = sys_req && sys_we && sel_ag && sys_addr[7:6] == 2'(g);
  end

  // ------------------------------------------------------------ control decode
  ctrl_cfg_t [NCTRL-1:0] ccfg;
  lut_cfg_t  [NLUT-1:0]  lcfg;
  logic      [NCTRL-1:0] ctrl;
  logic      [NST-1:0]   status;

  for (genvar c = 0; c < NCTRL; c++) begin : g_ccfg
    assign ccfg[c] = ctrl_cfg_t'(cfg[CFG_CTRL + c]);
  end
  for (genvar l = 0; l < NLUT; l++) begin : g_lcfg
    assign lcfg[l] = '{table_bits: cfg[CFG_LUT + 2*l + 1][15:8],
                       sel2:       cfg[CFG_LUT + 2*l + 1][5:0],
                       sel1:       cfg[CFG_LUT + 2*l][11:6],
                       sel0:       cfg[CFG_LUT + 2*l][5:0]};
  end

  ctrl_network #(.MAXD(MAXDLY)) u_ctrl (
    .clk, .rst_n, .en, .instr(dp_instr), .status, .cfg(ccfg), .lcfg, .ctrl
  );

  // ------------------------------------------------------------ stall rule
  logic in0_empty, in1_empty, out0_full, in0_afull, in1_afull;
  assign stall = (ctrl[C_IN0_RD]  && in0_empty) || (ctrl[C_IN1_RD] && in1_empty) ||
                 (ctrl[C_R2D_RD]  && r2d_empty) || (ctrl[C_OUT0_WR] && out0_full) ||
                 (ctrl[C_D2R_WR]  && d2r_full)  || (ctrl[C_ST_PUSH] && st_full) ||
                 (ctrl[C_IN0_AW]  && in0_afull) || (ctrl[C_IN1_AW]  && in1_afull);
  assign en = !stall;

  // ------------------------------------------------------------ FIFOs
  logic [$clog2(FDEPTH+1)-1:0] r2d_cnt, d2r_cnt, st_cnt;

  sync_fifo #(.WIDTH(W), .DEPTH(FDEPTH)) u_r2d (
    .clk, .rst_n, .push(r2d_push), .din(r2d_wdata), .pop(ctrl[C_R2D_RD] && en),
    .dout(r2d_q), .empty(r2d_empty), .full(r2d_full), .count(r2d_cnt)
  );
  sync_fifo #(.WIDTH(W), .DEPTH(FDEPTH)) u_d2r (
    .clk, .rst_n, .push(ctrl[C_D2R_WR] && en), .din(d2r_wdata), .pop(d2r_pop),
    .dout(d2r_q), .empty(d2r_empty), .full(d2r_full), .count(d2r_cnt)
  );
  sync_fifo #(.WIDTH(1), .DEPTH(FDEPTH)) u_st (
    .clk, .rst_n, .push(ctrl[C_ST_PUSH] && en), .din(st_bit), .pop(st_pop),
    .dout(st_q), .empty(st_empty), .full(st_full), .count(st_cnt)
  );

  // ------------------------------------------------------------ streams
  logic [W-1:0] in0_q, in1_q, out0_d, in0_ca, in1_ca, out0_ca;

  stream_in #(.WIDTH(W), .DEPTH(SDEPTH)) u_in0 (
    .clk, .rst_n, .ag_wr(ag_wr[0]), .ag_addr(sys_addr[5:0]), .ag_data(sys_wdata),
    .en, .rd(ctrl[C_IN0_RD]), .dout(in0_q), .empty(in0_empty), .idle(streams_idle[0]),
    .coupled(cfg[CFG_MISC][13]), .aw(ctrl[C_IN0_AW]), .caddr(in0_ca), .afull(in0_afull),
    .mem_req(in0_req), .mem_ready(in0_ready), .mem_addr(in0_addr),
    .mem_rvalid(in0_rvalid), .mem_rdata(in0_rdata)
  );
  stream_in #(.WIDTH(W), .DEPTH(SDEPTH)) u_in1 (
    .clk, .rst_n, .ag_wr(ag_wr[1]), .ag_addr(sys_addr[5:0]), .ag_data(sys_wdata),
    .en, .rd(ctrl[C_IN1_RD]), .dout(in1_q), .empty(in1_empty), .idle(streams_idle[1]),
    .coupled(cfg[CFG_MISC][14]), .aw(ctrl[C_IN1_AW]), .caddr(in1_ca), .afull(in1_afull),
    .mem_req(in1_req), .mem_ready(in1_ready), .mem_addr(in1_addr),
    .mem_rvalid(in1_rvalid), .mem_rdata(in1_rdata)
  );
  stream_out #(.WIDTH(W), .DEPTH(SDEPTH)) u_out0 (
    .clk, .rst_n, .ag_wr(ag_wr[2]), .ag_addr(sys_addr[5:0]), .ag_data(sys_wdata),
    .en, .wr(ctrl[C_OUT0_WR]), .din(out0_d), .full(out0_full), .idle(streams_idle[2]),
    .coupled(cfg[CFG_MISC][15]), .caddr(out0_ca),
    .mem_req(out0_req), .mem_ready(out0_ready), .mem_addr(out0_addr), .mem_wdata(out0_wdata)
  );

  // ------------------------------------------------------------ datapath
  rapid_datapath #(.RAM_DEPTH(RAM_DEPTH)) u_dp (
    .clk, .rst_n, .en, .ctrl,
    .bus_cfg(cfg[CFG_BUS +: NBUS_DP]), .dst_cfg(cfg[CFG_DST +: NDST_DP]), .misc(cfg[CFG_MISC]),
    .in0_data(in0_q), .in1_data(in1_q), .r2d_data(r2d_q),
    .out0_data(out0_d), .d2r_data(d2r_wdata), .status, .st_bit,
    .in0_caddr(in0_ca), .in1_caddr(in1_ca), .out0_caddr(out0_ca)
  );
endmodule
