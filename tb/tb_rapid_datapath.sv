// tb_rapid_datapath: self-checking test of the default datapath array with
// its control applied directly. Five configurations, each set through the
// bus and input selects:
//   1. multiply-accumulate: in0 x in1 in the multiplier, accumulated in
//      alu1 fed back through a right-hand segment; in0 reaches the
//      multiplier through the track-1 bus connector;
//   2. RAM as a 4-word shift register, read out through the track-3 bus
//      connector to the d2r data port;
//   3. shifter by an amount from the RISC FIFO data, then a pipeline
//      register, to the output stream data;
//   4. RAM as addressed memory: eight writes, eight reads;
//   5. alu0 subtract with its sign flag picked as the status-FIFO bit;
//   6. coupled-mode stream addresses: the RISC FIFO data reaches the three
//      address inputs, and a segment out of reach yields zero.
// Also checks that a low `en` freezes the accumulator.
module tb_rapid_datapath;
  import rapid_pkg::*;
  localparam int NSRC = 10;
  logic clk = 0, rst_n = 0, en = 1;
  logic [NCTRL-1:0] ctrl = '0;
  logic [NBUS_DP-1:0][15:0] bus_cfg;
  logic [NDST_DP-1:0][15:0] dst_cfg;
  logic [15:0] misc;
  logic [15:0] in0_data = 0, in1_data = 0, r2d_data = 0, out0_data, d2r_data;
  logic [NST-1:0] status;
  logic st_bit;
  logic [15:0] in0_caddr, in1_caddr, out0_caddr;
  int checks = 0, failures = 0;

  rapid_datapath dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (3000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  function automatic logic [15:0] from_src(int k); return 16'(k + 1); endfunction
  function automatic logic [15:0] from_bus(int j); return 16'(NSRC + 1 + j); endfunction
  function automatic logic [15:0] rd_bus(int j);   return 16'(j + 1); endfunction

  task automatic clear();
    bus_cfg = '0; dst_cfg = '0; misc = '0; ctrl = '0; en = 1;
    rst_n = 0; @(negedge clk); rst_n = 1;
  endtask
  task automatic chk(logic ok, string s);
    checks++; if (!ok) begin failures++; $display("FAIL %s", s); end
  endtask

  initial begin
    logic [15:0] xs [8], ys [8], sum, hold;
    @(negedge clk);
    // ---------------------------------------------------------------- 1
    clear();
    bus_cfg[4] = from_src(0);  bus_cfg[5] = from_bus(4);   // in0 -> b4 -> BC -> b5
    bus_cfg[6] = from_src(1);                              // in1 -> b6
    bus_cfg[2] = from_src(6);                              // mult -> b2
    bus_cfg[8] = from_src(7);                              // alu1 -> b8
    dst_cfg[5] = rd_bus(5); dst_cfg[6] = rd_bus(6);
    dst_cfg[7] = rd_bus(2); dst_cfg[8] = rd_bus(8); dst_cfg[12] = rd_bus(8);
    misc = 16'h0007;                                       // registered alu0/alu1/mult
    sum = 0;
    for (int i = 0; i < 8; i++) begin
      xs[i] = 16'($urandom_range(0, 200)); ys[i] = 16'($urandom_range(0, 200));
      sum += xs[i] * ys[i];
    end
    for (int i = 0; i <= 8; i++) begin
      in0_data = (i < 8) ? xs[i] : 0; in1_data = (i < 8) ? ys[i] : 0;
      ctrl = '0;
      ctrl[C_MUL_WE] = (i < 8);
      ctrl[C_ALU1_OP +: 3] = ALU_ADD; ctrl[C_ALU1_WE] = 1;
      @(negedge clk);
    end
    ctrl = '0;
    chk(out0_data == sum, $sformatf("MAC %h exp %h", out0_data, sum));
    chk(status[S_ALU1_Z] == (sum == 0) && status[S_ALU1_N] == sum[15], "alu1 flags");
    hold = out0_data;
    en = 0; ctrl[C_ALU1_WE] = 1; @(negedge clk); @(negedge clk);
    chk(out0_data == hold, "en low freezes");
    // ---------------------------------------------------------------- 2
    clear();
    bus_cfg[0] = from_src(0);                 // in0 -> b0 -> ram b
    bus_cfg[7] = from_src(3); bus_cfg[8] = from_bus(7);   // ram -> b7 -> BC -> b8
    dst_cfg[1] = rd_bus(0); dst_cfg[13] = rd_bus(8);
    misc = 16'(1 << 4) | 16'(3 << 5);         // shift mode, length 4
    for (int i = 0; i < 16; i++) begin
      in0_data = 16'h1000 + 16'(i); ctrl = '0; ctrl[C_RAM_EN] = 1;
      @(negedge clk);
      if (i >= 4) chk(d2r_data == 16'h1000 + 16'(i - 4), $sformatf("shift reg %h", d2r_data));
    end
    // ---------------------------------------------------------------- 3
    clear();
    bus_cfg[6] = from_src(0);                 // in0 -> b6 -> shift a
    bus_cfg[4] = from_src(2); bus_cfg[5] = from_bus(4);   // r2d -> b4 -> BC -> b5 -> shift b
    bus_cfg[3] = from_src(8);                 // shift -> b3 -> reg1
    bus_cfg[8] = from_src(9);                 // reg1 -> b8 -> out0
    dst_cfg[9] = rd_bus(6); dst_cfg[10] = rd_bus(5); dst_cfg[11] = rd_bus(3); dst_cfg[12] = rd_bus(8);
    misc = 16'h0008;
    for (int i = 0; i < 10; i++) begin
      logic [15:0] v, e; int s;
      v = 16'($urandom) | 16'h8000; s = $urandom_range(0, 15);
      in0_data = v; r2d_data = 16'(s);
      ctrl = '0; ctrl[C_SH_WE] = 1; ctrl[C_SH_RIGHT] = 1; ctrl[C_SH_ARITH] = 1;
      @(negedge clk);
      in0_data = 0; ctrl = '0; ctrl[C_REG1_WE] = 1;
      @(negedge clk);
      e = v >> s;
      for (int k = 0; k < s; k++) e[15 - k] = v[15];
      chk(out0_data == e, $sformatf("shift then register v=%h s=%0d got %h sh=%h", v, s, out0_data, dut.sh_y));
    end
    // ---------------------------------------------------------------- 4
    clear();
    bus_cfg[0] = from_src(0); bus_cfg[6] = from_src(1);  // address in0 -> b0, data in1 -> b6
    bus_cfg[7] = from_src(3); bus_cfg[8] = from_bus(7);
    dst_cfg[0] = rd_bus(0); dst_cfg[1] = rd_bus(6); dst_cfg[12] = rd_bus(8);
    for (int i = 0; i < 8; i++) begin
      in0_data = 16'(3 * i); in1_data = 16'hA000 + 16'(i); ctrl = '0; ctrl[C_RAM_WE] = 1;
      @(negedge clk);
    end
    for (int i = 7; i >= 0; i--) begin
      in0_data = 16'(3 * i); ctrl = '0; ctrl[C_RAM_EN] = 1;
      @(negedge clk);
      chk(out0_data == 16'hA000 + 16'(i), "ram read");
    end
    // ---------------------------------------------------------------- 5
    clear();
    bus_cfg[4] = from_src(0); bus_cfg[6] = from_src(1);
    dst_cfg[2] = rd_bus(4); dst_cfg[3] = rd_bus(6);
    misc = 16'(S_ALU0_N << 10) | 16'h0001;
    for (int i = 0; i < 20; i++) begin
      in0_data = 16'($urandom_range(0, 1000)); in1_data = 16'($urandom_range(0, 1000));
      ctrl = '0; ctrl[C_ALU0_OP +: 3] = ALU_SUB; ctrl[C_ALU0_WE] = 1;
      @(negedge clk);
      chk(st_bit == (in0_data < in1_data), "sign status");
    end
    // ---------------------------------------------------------------- 6
    clear();
    bus_cfg[4] = from_src(2); bus_cfg[6] = from_src(2); bus_cfg[0] = from_src(2);
    dst_cfg[14] = rd_bus(4); dst_cfg[15] = rd_bus(0); dst_cfg[16] = rd_bus(6);
    for (int i = 0; i < 10; i++) begin
      r2d_data = 16'($urandom);
      @(negedge clk);
      chk(in0_caddr == r2d_data && in1_caddr == r2d_data && out0_caddr == r2d_data, "coupled addresses");
    end
    dst_cfg[16] = rd_bus(0);   // bus 0 does not reach position 7
    @(negedge clk);
    chk(out0_caddr == 16'h0, "unreachable segment reads zero");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
