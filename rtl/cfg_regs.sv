// cfg_regs: configuration memory of the Rapid datapath.
//
// NREG words of 16 bits that drive the hard (static) control of the array and
// the configuration of the control decode: bus and input multiplexer
// selects, output-register enables, RAM mode, and for each soft control
// signal its decode line, offset or constant. The RISC writes and reads them
// as part of its address space, so a program can reconfigure the datapath
// from memory. Writes take effect at the next clock edge; reads are
// combinational. Reset clears every word, which soft-configures every
// control signal to 0 and leaves every bus undriven. Mapping configuration
// into the RISC address space follows the architecture; the word layout is
// own choice (see rapid_pkg).
module cfg_regs #(
  parameter int unsigned NREG = 64
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    wr,
  input  logic [$clog2(NREG)-1:0] waddr,
  input  logic [15:0]             wdata,
  input  logic [$clog2(NREG)-1:0] raddr,
  output logic [15:0]             rdata,
  output logic [NREG-1:0][15:0]   q
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  q <= '0;
    else if (wr) q[waddr] <= wdata;
  end
  assign rdata = q[raddr];
endmodule
