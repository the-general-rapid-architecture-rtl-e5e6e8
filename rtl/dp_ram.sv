// dp_ram: small datapath memory of the Rapid array.
//
// DEPTH words of w bits, configurable (hard configuration `mode`) as
//   mode 0: general memory. Input a is the address, input b the write data.
//           Soft control `we` writes b to M[a]; `ren` loads M[a] into the
//           output register (one cycle read latency).
//   mode 1: variable-length shift register of `len`+1 words, kept as a
//           circular buffer. Each `ren` cycle (the shift control) outputs the
//           word written len+1 shifts earlier and stores input b in its place.
// All actions also need the global advance `en`. The two uses follow the
// architecture's proposal for datapath memories; the depth of 32 words, the
// one-cycle read latency and the control names are own choices. The
// circular-buffer pointer is reset to 0; memory contents are not reset.
module dp_ram
  import rapid_pkg::*;
#(
  parameter int unsigned WIDTH = W,
  parameter int unsigned DEPTH = 32
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     en,
  input  logic                     mode,   // 0 memory, 1 shift register
  input  logic [$clog2(DEPTH)-1:0] len,    // shift-register length minus one
  input  logic                     we,
  input  logic                     ren,
  input  logic [WIDTH-1:0]         a,
  input  logic [WIDTH-1:0]         b,
  output logic [WIDTH-1:0]         y
);
  localparam int unsigned AW = $clog2(DEPTH);
  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    ptr, addr;

  assign addr = mode ? ptr : a[AW-1:0];

  always_ff @(posedge clk) begin
    if (en && ((mode == 1'b0 && we) || (mode == 1'b1 && ren)))
      mem[addr] <= b;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      y   <= '0;
      ptr <= '0;
    end else if (en && ren) begin
      y <= mem[addr];
      if (mode) ptr <= (ptr == len) ? '0 : ptr + 1'b1;
    end
  end
endmodule
