// data_network: segmented data-bus interconnect of the Rapid datapath.
//
// NBUS bus segments connect NSRC unit outputs to NDST unit inputs. Every
// connection is a multiplexer:
//   * each bus segment selects one driver: bus_sel = 0 leaves it undriven
//     (reads as zero), 1..NSRC picks unit output k-1, NSRC+1.. picks another
//     bus segment j (a bus connector or bypass bus);
//   * each unit input selects one bus: dst_sel = 0 gives zero, j+1 bus j.
// Which drivers a segment may take and which segments an input may read is
// fixed by the mask parameters, which describe the layout of segments along
// the array (a selection outside the mask yields zero). A segment may be
// driven only by a segment of lower index, so bus-to-bus paths run one way
// and cannot form a loop; this ordering is own choice. The selects are
// static configuration (hard control) in the default array. Purely
// combinational.
module data_network
  import rapid_pkg::*;
#(
  parameter int unsigned WIDTH = W,
  parameter int unsigned NSRC  = 4,
  parameter int unsigned NDST  = 4,
  parameter int unsigned NBUS  = 4,
  parameter int unsigned BSW   = $clog2(1 + NSRC + NBUS),
  parameter int unsigned DSW   = $clog2(1 + NBUS),
  parameter logic [NBUS-1:0][NSRC-1:0] SRC_MASK = '1,  // unit k may drive bus b
  parameter logic [NBUS-1:0][NBUS-1:0] BUS_MASK = '1,  // bus j may drive bus b (j<b only)
  parameter logic [NDST-1:0][NBUS-1:0] DST_MASK = '1   // input d may read bus b
) (
  input  logic [NSRC-1:0][WIDTH-1:0] src,
  input  logic [NBUS-1:0][BSW-1:0]   bus_sel,
  input  logic [NDST-1:0][DSW-1:0]   dst_sel,
  output logic [NBUS-1:0][WIDTH-1:0] bus,
  output logic [NDST-1:0][WIDTH-1:0] dst
);
  // One process for all segments, so that a segment reading a lower one is
  // evaluated in order within the same block.
  always_comb begin
    logic [NBUS-1:0][WIDTH-1:0] v;
    v = '0;
    for (int b = 0; b < NBUS; b++) begin
      for (int k = 0; k < NSRC; k++)
        if (SRC_MASK[b][k] && bus_sel[b] == BSW'(k + 1)) v[b] = src[k];
      for (int j = 0; j < b; j++)
        if (BUS_MASK[b][j] && bus_sel[b] == BSW'(NSRC + 1 + j)) v[b] = v[j];
    end
    bus = v;
  end

  for (genvar d = 0; d < NDST; d++) begin : g_dst
    always_comb begin
      dst[d] = '0;
      for (int j = 0; j < NBUS; j++)
        if (DST_MASK[d][j] && dst_sel[d] == DSW'(j + 1)) dst[d] = bus[j];
    end
  end
endmodule
