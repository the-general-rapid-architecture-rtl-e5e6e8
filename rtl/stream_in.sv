// stream_in: decoupled input stream port of the Rapid datapath.
//
// An addr_gen and a packet_unroll produce read addresses autonomously; the
// port sends them to memory as long as the data buffer can take the answers,
// so it reads ahead of the datapath by up to DEPTH words. Returned words
// enter a FIFO. The datapath takes the oldest word with the soft control `rd`
// (acted on only when the global advance `en` is high) and sees `empty` as
// status, which the array uses to stall. The memory interface is a request
// with valid/ready (mem_req/mem_ready) and in-order responses one or more
// cycles later (mem_rvalid). `idle` is high when the program has ended and
// every word has been consumed.
// In coupled mode (hard configuration `coupled`) the address generator is
// bypassed: the datapath supplies each read address on `caddr` and pushes it
// with the soft control `aw` (with `en`) into a two-entry address queue;
// `afull` is the status that stalls such a push. The word read arrives in
// the same data buffer some cycles later and is taken with `rd` as before,
// so the program must schedule the read far enough behind the address.
// Decoupled, buffered read-ahead, empty status and the coupled mode follow
// the architecture; placing the whole buffer on the returned data, the
// buffer depth of 4 and the address queue of coupled mode are own choices.
module stream_in
  import rapid_pkg::*;
#(
  parameter int unsigned WIDTH = W,
  parameter int unsigned AW    = 16,
  parameter int unsigned DEPTH = 4
) (
  input  logic             clk,
  input  logic             rst_n,
  // address generator programming
  input  logic             ag_wr,
  input  logic [5:0]       ag_addr,
  input  logic [15:0]      ag_data,
  // datapath side
  input  logic             en,
  input  logic             rd,
  input  logic             coupled,   // hard: addresses come from the datapath
  input  logic             aw,        // soft: push caddr (coupled mode)
  input  logic [AW-1:0]    caddr,
  output logic             afull,     // status: address queue full
  output logic [WIDTH-1:0] dout,
  output logic             empty,
  output logic             idle,
  // memory side
  output logic             mem_req,
  input  logic             mem_ready,
  output logic [AW-1:0]    mem_addr,
  input  logic             mem_rvalid,
  input  logic [WIDTH-1:0] mem_rdata
);
  localparam int unsigned CW = $clog2(DEPTH + 1);

  logic          pkt_valid, pkt_ready, ag_running, ag_done;
  logic [AW-1:0] pkt_start;
  logic [15:0]   pkt_stride;
  logic [9:0]    pkt_count;
  logic          a_valid, a_ready, u_valid, u_ready, c_empty;
  logic [AW-1:0] u_addr, c_addr;
  logic [1:0]    aq_cnt;  // unused
  logic [CW-1:0] fcount, outstanding;
  logic          ffull;

  addr_gen #(.AW(AW)) u_ag (
    .clk, .rst_n, .wr_en(ag_wr), .wr_addr(ag_addr), .wr_data(ag_data),
    .pkt_valid, .pkt_ready, .pkt_start, .pkt_stride, .pkt_count,
    .running(ag_running), .done(ag_done)
  );

  packet_unroll #(.AW(AW)) u_unroll (
    .clk, .rst_n, .in_valid(pkt_valid), .in_ready(pkt_ready),
    .in_start(pkt_start), .in_stride(pkt_stride), .in_count(pkt_count),
    .out_valid(u_valid), .out_ready(u_ready), .out_addr(u_addr)
  );

  // coupled mode: address queue filled by the datapath
  sync_fifo #(.WIDTH(AW), .DEPTH(2)) u_aq (
    .clk, .rst_n, .push(aw && en), .din(caddr), .pop(a_ready && coupled),
    .dout(c_addr), .empty(c_empty), .full(afull), .count(aq_cnt)
  );

  assign a_valid  = coupled ? !c_empty : u_valid;
  assign mem_addr = coupled ? c_addr : u_addr;
  assign u_ready  = a_ready && !coupled;

  assign mem_req = a_valid && (32'(fcount) + 32'(outstanding) < DEPTH);
  assign a_ready = mem_req && mem_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) outstanding <= '0;
    else outstanding <= outstanding + CW'(a_ready) - CW'(mem_rvalid);
  end

  sync_fifo #(.WIDTH(WIDTH), .DEPTH(DEPTH)) u_buf (
    .clk, .rst_n, .push(mem_rvalid), .din(mem_rdata), .pop(rd && en),
    .dout, .empty, .full(ffull), .count(fcount)
  );

  assign idle = (coupled || ag_done) && !a_valid && outstanding == '0 && empty;
endmodule
