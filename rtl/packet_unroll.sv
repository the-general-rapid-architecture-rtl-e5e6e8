// packet_unroll: expands an address packet (start, stride, count) into
// `count` addresses start, start+stride, ... one per cycle.
//
// Valid/ready on both sides. A new packet is accepted while the last address
// of the current one leaves, so back-to-back packets give one address every
// cycle. Unrolling packets, so that the address generator itself stays
// simple, follows the architecture; the handshake is own choice.
module packet_unroll #(
  parameter int unsigned AW = 16
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  output logic          in_ready,
  input  logic [AW-1:0] in_start,
  input  logic [15:0]   in_stride,
  input  logic [9:0]    in_count,
  output logic          out_valid,
  input  logic          out_ready,
  output logic [AW-1:0] out_addr
);
  logic [AW-1:0] addr;
  logic [15:0]   stride;
  logic [9:0]    rem;

  assign out_valid = (rem != 0);
  assign out_addr  = addr;
  assign in_ready  = (rem == 0) || (rem == 10'd1 && out_ready);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rem    <= '0;
      addr   <= '0;
      stride <= '0;
    end else if (in_valid && in_ready) begin
      addr   <= in_start;
      stride <= in_stride;
      rem    <= (in_count == '0) ? 10'd1 : in_count;
    end else if (out_valid && out_ready) begin
      addr <= addr + AW'(stride);
      rem  <= rem - 1'b1;
    end
  end
endmodule
