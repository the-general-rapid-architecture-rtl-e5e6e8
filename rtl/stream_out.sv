// stream_out: decoupled output stream port of the Rapid datapath.
//
// The datapath hands a word to the port with the soft control `wr` (acted on
// only when the global advance `en` is high); the word waits in a FIFO of
// DEPTH entries and `full` is given back as status, which the array uses to
// stall. An addr_gen and a packet_unroll produce write addresses
// autonomously, and each buffered word is written to memory at the next
// address (write-behind). The memory interface is a write request with
// valid/ready. `idle` is high when the program has ended and the buffer is
// empty.
// In coupled mode (hard configuration `coupled`) the address generator is
// bypassed: every `wr` also stores the address the datapath drives on
// `caddr` in a queue that runs beside the data buffer, and each word is
// written to its own address.
// Decoupled, buffered write-behind, full status and the coupled mode follow
// the architecture; the buffer depth of 4 and the address queue are own
// choices.
module stream_out
  import rapid_pkg::*;
#(
  parameter int unsigned WIDTH = W,
  parameter int unsigned AW    = 16,
  parameter int unsigned DEPTH = 4
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             ag_wr,
  input  logic [5:0]       ag_addr,
  input  logic [15:0]      ag_data,
  input  logic             en,
  input  logic             wr,
  input  logic [WIDTH-1:0] din,
  input  logic             coupled,   // hard: addresses come from the datapath
  input  logic [AW-1:0]    caddr,
  output logic             full,
  output logic             idle,
  output logic             mem_req,
  input  logic             mem_ready,
  output logic [AW-1:0]    mem_addr,
  output logic [WIDTH-1:0] mem_wdata
);
  logic          pkt_valid, pkt_ready, ag_running, ag_done;
  logic [AW-1:0] pkt_start;
  logic [15:0]   pkt_stride;
  logic [9:0]    pkt_count;
  logic          a_valid, a_ready, fempty, u_valid, u_ready, c_empty;
  logic [AW-1:0] u_addr, c_addr;
  logic          aq_full;  // unused: fills exactly with the data buffer
  logic [$clog2(DEPTH+1)-1:0] aq_cnt;  // unused
  logic [$clog2(DEPTH+1)-1:0] fcount;

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

  // coupled mode: addresses stored beside the data
  sync_fifo #(.WIDTH(AW), .DEPTH(DEPTH)) u_aq (
    .clk, .rst_n, .push(wr && en && coupled), .din(caddr), .pop(a_ready && coupled),
    .dout(c_addr), .empty(c_empty), .full(aq_full), .count(aq_cnt)
  );

  assign a_valid  = coupled ? !c_empty : u_valid;
  assign mem_addr = coupled ? c_addr : u_addr;
  assign u_ready  = a_ready && !coupled;

  sync_fifo #(.WIDTH(WIDTH), .DEPTH(DEPTH)) u_buf (
    .clk, .rst_n, .push(wr && en), .din, .pop(a_ready),
    .dout(mem_wdata), .empty(fempty), .full, .count(fcount)
  );

  assign mem_req = a_valid && !fempty;
  assign a_ready = mem_req && mem_ready;
  assign idle    = (coupled || ag_done) && fempty;
endmodule
