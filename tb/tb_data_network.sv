// tb_data_network: self-checking test of the segmented bus network with a
// small layout: 4 unit outputs, 4 segments, 3 unit inputs, sparse driver
// masks and two bus connectors (segment 0 -> 2, segment 2 -> 3). Random
// source values and selections are compared with a reference model that
// resolves each segment's driver chain.
module tb_data_network;
  localparam int NSRC = 4, NDST = 3, NBUS = 4;
  localparam int BSW = $clog2(1 + NSRC + NBUS), DSW = $clog2(1 + NBUS);
  localparam logic [NBUS-1:0][NSRC-1:0] SM = '{4'b1100, 4'b0110, 4'b1100, 4'b0011};
  localparam logic [NBUS-1:0][NBUS-1:0] BM = '{4'b0100, 4'b0001, 4'b0000, 4'b0000};
  localparam logic [NDST-1:0][NBUS-1:0] DM = '{4'b1010, 4'b0111, 4'b1111};

  logic [NSRC-1:0][15:0] src;
  logic [NBUS-1:0][BSW-1:0] bus_sel;
  logic [NDST-1:0][DSW-1:0] dst_sel;
  logic [NBUS-1:0][15:0] bus;
  logic [NDST-1:0][15:0] dst;
  int checks = 0, failures = 0, bc_used = 0;

  data_network #(.WIDTH(16), .NSRC(NSRC), .NDST(NDST), .NBUS(NBUS),
                 .SRC_MASK(SM), .BUS_MASK(BM), .DST_MASK(DM)) dut (.*);

  function automatic logic [15:0] ref_bus(int b);
    int s = int'(bus_sel[b]);
    if (s >= 1 && s <= NSRC) return SM[b][s-1] ? src[s-1] : 16'h0;
    if (s > NSRC && s <= NSRC + NBUS) begin
      int j = s - NSRC - 1;
      if (j < b && BM[b][j]) return ref_bus(j);
    end
    return 16'h0;
  endfunction

  initial begin
    #100000;
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int i = 0; i < 2000; i++) begin
      for (int k = 0; k < NSRC; k++) src[k] = 16'($urandom) | 16'h1;
      for (int b = 0; b < NBUS; b++) bus_sel[b] = BSW'($urandom_range(0, NSRC + NBUS));
      for (int d = 0; d < NDST; d++) dst_sel[d] = DSW'($urandom_range(0, NBUS));
      #1;
      for (int b = 0; b < NBUS; b++) begin
        checks++;
        if (bus[b] !== ref_bus(b)) begin failures++; $display("FAIL bus %0d sel=%0d %h exp %h", b, bus_sel[b], bus[b], ref_bus(b)); end
        if (bus_sel[b] > NSRC && ref_bus(b) != 0) bc_used++;
      end
      for (int d = 0; d < NDST; d++) begin
        logic [15:0] e;
        e = (dst_sel[d] >= 1 && DM[d][dst_sel[d]-1]) ? ref_bus(int'(dst_sel[d]) - 1) : 16'h0;
        checks++;
        if (dst[d] !== e) begin failures++; $display("FAIL dst %0d", d); end
      end
    end
    checks++; if (bc_used == 0) begin failures++; $display("FAIL bus connector never used"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
