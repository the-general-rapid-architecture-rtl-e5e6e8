// tb_rapid_top: end-to-end test of the Rapid array at its default sizes.
//
// The RISC program configures the whole array itself, through stores into
// the configuration registers and the address generators, then computes the
// sum of absolute differences (SAD) of M blocks of N pairs streamed from
// memory:
//   * one instruction bit drives both stream reads and the subtractor's
//     write (alu0: x - y, sign kept as status);
//   * the accumulator's write enable is the same bit offset by one cycle;
//   * a LUT combines the subtractor's sign with an "absolute" instruction
//     bit, so the accumulator subtracts negative differences;
//   * each block is one repeated Rapid instruction (a packet), followed by a
//     trailing cycle and one that writes the running total to the output
//     stream and the datapath->RISC FIFO and pushes "total is zero" into the
//     status FIFO;
//   * the RISC takes the running total from the FIFO, stores the block SAD,
//     and branches on the status bit to count all-zero blocks.
// A second phase reconfigures two bus segments and passes three words from
// the RISC through the datapath back to the RISC. A third phase switches
// input stream 0 to coupled mode and gathers three words at addresses the
// RISC sends through the datapath. Then the RISC waits for
// the output stream to drain (polling the idle flags) and halts.
// The output-stream memory port is held not-ready for a while so that the
// output buffer fills and the datapath stalls. Checks every result in memory
// and counts each mechanism, failing any that never happened.
module tb_rapid_top;
  import rapid_pkg::*;
  localparam int N = 16, M = 6;
  localparam int NSRC = 10;
  logic clk = 0, rst_n = 0, start = 0, halted;
  logic [2:0] streams_idle;
  logic prog_wr = 0;
  logic [7:0] prog_addr = 0;
  logic [31:0] prog_data = 0;
  logic mem_req, mem_we, mem_ready, mem_rvalid;
  logic [14:0] mem_addr;
  logic [15:0] mem_wdata, mem_rdata;
  logic in0_req, in0_ready, in0_rvalid, in1_req, in1_ready, in1_rvalid, out0_req, out0_ready;
  logic [15:0] in0_addr, in0_rdata, in1_addr, in1_rdata, out0_addr, out0_wdata;
  logic [3:0] hold = '0;
  int checks = 0, failures = 0, cyc = 0;

  rapid_top dut (.*);

  logic [3:0] p_ready, p_rvalid;
  logic [3:0][15:0] p_rdata;
  mem_model #(.NP(4)) u_mem (
    .clk, .hold,
    .req({out0_req, in1_req, in0_req, mem_req}),
    .we({1'b1, 1'b0, 1'b0, mem_we}),
    .addr({out0_addr, in1_addr, in0_addr, {1'b0, mem_addr}}),
    .wdata({out0_wdata, 16'h0, 16'h0, mem_wdata}),
    .ready(p_ready), .rvalid(p_rvalid), .rdata(p_rdata)
  );
  assign mem_ready = p_ready[0];  assign mem_rvalid = p_rvalid[0]; assign mem_rdata = p_rdata[0];
  assign in0_ready = p_ready[1];  assign in0_rvalid = p_rvalid[1]; assign in0_rdata = p_rdata[1];
  assign in1_ready = p_ready[2];  assign in1_rvalid = p_rvalid[2]; assign in1_rdata = p_rdata[2];
  assign out0_ready = p_ready[3];

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // -------------------------------------------------------------- assembler
  logic [31:0] prog [256];
  int pc = 0;
  task automatic emit(logic [31:0] i); prog[pc] = i; pc++; endtask
  task automatic setw(int addr, int val);     // store a constant to an address
    emit(i_i(OP_ADDI, 1, 0, val));
    emit(i_i(OP_ST, 1, 0, addr));
  endtask
  function automatic int cfga(int i); return int'(A_CFG) + i; endfunction
  function automatic int aga(int g, int k); return int'(A_AG) + 64 * g + k; endfunction
  task automatic ag_load(int g, int k, logic [31:0] ins);
    setw(aga(g, 2 * k), ins[15:0]); setw(aga(g, 2 * k + 1), ins[31:16]);
  endtask
  function automatic int cc(bit cst, bit cval, int dly, int sel);
    return (int'(cst) << 15) | (int'(cval) << 14) | (dly << 12) | sel;
  endfunction
  localparam int GA0 = 5, GA1 = 17, GA2 = 40;   // gather offsets, phase 3
  localparam int L_IB = 1, L_ST = 1 + NIB, L_LC = 1 + NIB + NST + NLUT;

  // -------------------------------------------------------------- counters
  int n_stall_in = 0, n_stall_out = 0, n_abs_sub = 0, n_overlap = 0, n_d2r_wait = 0;
  int n_st_taken = 0, n_st_not = 0, n_pkt_repeat = 0, n_bc = 0, n_coupled = 0;
  always @(negedge clk) if (rst_n) begin
    cyc++;
    if ((dut.ctrl[C_IN0_RD] && dut.in0_empty) || (dut.ctrl[C_IN1_RD] && dut.in1_empty)) n_stall_in++;
    if (dut.ctrl[C_OUT0_WR] && dut.out0_full) n_stall_out++;
    if (dut.en && dut.ctrl[C_ALU1_WE] && dut.ctrl[C_ALU1_OP +: 3] == ALU_SUB) n_abs_sub++;
    if (dut.dp_busy && dut.u_seq.go && !dut.u_seq.is_rapid) n_overlap++;
    if (!dut.u_seq.go && dut.u_seq.reads_fifo && dut.d2r_empty && dut.u_seq.running) n_d2r_wait++;
    if (dut.en && dut.ctrl[C_IN0_AW] && dut.u_in0.coupled) n_coupled++;
    if (dut.st_pop && dut.st_q) n_st_taken++;
    if (dut.st_pop && !dut.st_q) n_st_not++;
    if (dut.dp_busy && dut.en && dut.u_seq.rpt > 1) n_pkt_repeat++;
    if (dut.en && dut.ctrl[C_ALU1_WE] && dut.u_dp.bus[8] == dut.u_dp.bus[7] && dut.u_dp.bus_sel[8] == 5'(NSRC + 1 + 7)) n_bc++;
  end

  initial begin
    int xs [N*M], ys [N*M], sad [M], total, zeros, l_loop, l_skip, l_end, l_poll;
    for (int i = 0; i < 256; i++) prog[i] = '0;
    // data: block 0 identical, the rest random bytes
    for (int i = 0; i < N * M; i++) begin
      xs[i] = $urandom_range(0, 255);
      ys[i] = (i < N) ? xs[i] : $urandom_range(0, 255);
    end
    zeros = 0;
    total = 0;
    for (int b = 0; b < M; b++) begin
      sad[b] = 0;
      for (int i = 0; i < N; i++) sad[b] += (xs[b*N+i] > ys[b*N+i]) ? xs[b*N+i] - ys[b*N+i] : ys[b*N+i] - xs[b*N+i];
      total += sad[b];
      if (total == 0) zeros++;
    end

    // ---------------------------------------------------------- program
    // output registers first: no configuration step may close a loop
    setw(cfga(CFG_MISC), (S_ALU1_Z << 10) | 3);
    // control decode
    setw(cfga(CFG_CTRL + C_IN0_RD),   cc(0, 0, 0, L_IB + 0));
    setw(cfga(CFG_CTRL + C_IN1_RD),   cc(0, 0, 0, L_IB + 0));
    setw(cfga(CFG_CTRL + C_ALU0_WE),  cc(0, 0, 0, L_IB + 0));
    setw(cfga(CFG_CTRL + C_ALU0_OP),  cc(1, 1, 0, 0));            // op = SUB (001)
    setw(cfga(CFG_CTRL + C_ALU1_WE),  cc(0, 0, 1, L_IB + 0));     // bit 0, one cycle later
    setw(cfga(CFG_CTRL + C_ALU1_OP),  cc(0, 0, 0, L_LC + 0));     // op[0] = LUT 0
    setw(cfga(CFG_CTRL + C_OUT0_WR),  cc(0, 0, 0, L_IB + 1));
    setw(cfga(CFG_CTRL + C_ST_PUSH),  cc(0, 0, 0, L_IB + 1));
    setw(cfga(CFG_CTRL + C_D2R_WR),   cc(0, 0, 0, L_LC + 1));     // LUT 1 = bit1 | bit6
    setw(cfga(CFG_CTRL + C_R2D_RD),   cc(0, 0, 0, L_IB + 6));
    setw(cfga(CFG_LUT + 0), ((L_IB + 3) << 6) | (L_ST + S_ALU0_N));  // sign & bit3
    setw(cfga(CFG_LUT + 1), 16'h8800);
    setw(cfga(CFG_LUT + 2), ((L_IB + 6) << 6) | (L_IB + 1));         // bit1 | bit6
    setw(cfga(CFG_LUT + 3), 16'hEE00);
    // busses: in0->b4, in1->b6, alu0->b7->BC->b8, alu1->b2 and b5
    setw(cfga(CFG_BUS + 4), 1);
    setw(cfga(CFG_BUS + 6), 2);
    setw(cfga(CFG_BUS + 7), 5);
    setw(cfga(CFG_BUS + 8), NSRC + 1 + 7);
    setw(cfga(CFG_BUS + 2), 8);
    setw(cfga(CFG_BUS + 5), 8);
    setw(cfga(CFG_DST + 2), 5);     // alu0 a <- b4
    setw(cfga(CFG_DST + 3), 7);     // alu0 b <- b6
    setw(cfga(CFG_DST + 7), 3);     // alu1 a <- b2
    setw(cfga(CFG_DST + 8), 9);     // alu1 b <- b8
    setw(cfga(CFG_DST + 12), 6);    // out0 <- b5
    setw(cfga(CFG_DST + 13), 6);    // d2r  <- b5
    // address generators
    ag_load(0, 0, ag_pkt(N * M, 1, 0)); ag_load(0, 1, ag_end()); setw(aga(0, 32), 16'h1000);
    // in1 walks the same data as a loop of one packet per block
    ag_load(1, 0, ag_loop(M, 2)); ag_load(1, 1, ag_pkt(N, 1, 0)); ag_load(1, 2, ag_addb(N));
    ag_load(1, 3, ag_end()); setw(aga(1, 32), 16'h2000);
    ag_load(2, 0, ag_pkt(M, 1, 0)); ag_load(2, 1, ag_end()); setw(aga(2, 32), 16'h3000);
    emit(i_i(OP_ST, 0, 0, aga(0, 33)));
    emit(i_i(OP_ST, 0, 0, aga(1, 33)));
    emit(i_i(OP_ST, 0, 0, aga(2, 33)));
    // SAD blocks
    emit(i_i(OP_ADDI, 10, 0, 0));
    emit(i_i(OP_ADDI, 11, 0, 16'h7000));
    emit(i_i(OP_ADDI, 14, 0, 0));
    l_loop = pc;
    l_end  = pc + 10;
    l_skip = pc + 10;
    emit(i_loopi(M, l_end));
    emit(i_rapid(N - 1, 24'h000009));   // read, subtract; accumulate (offset)
    emit(i_rapid(0, 24'h000008));       // trailing accumulate, absolute mode
    emit(i_rapid(0, 24'h000002));       // write total, status
    emit(i_r(OP_ADD, 12, 15, 0));       // total from datapath
    emit(i_r(OP_SUB, 13, 12, 10));
    emit(i_i(OP_ST, 13, 11, 0));
    emit(i_i(OP_ADDI, 10, 12, 0));
    emit(i_br(C_NST, l_skip));
    emit(i_i(OP_ADDI, 14, 14, 1));
    emit(i_i(OP_ADDI, 11, 11, 1));      // l_skip = l_end
    // phase 2: reconfigure b4 <- r2d, b5 <- b4, pass three words through
    setw(cfga(CFG_BUS + 4), 3);
    setw(cfga(CFG_BUS + 5), NSRC + 1 + 4);
    emit(i_i(OP_ADDI, 15, 0, 16'h111));
    emit(i_i(OP_ADDI, 15, 0, 16'h222));
    emit(i_i(OP_ADDI, 15, 0, 16'h333));
    emit(i_rapid(2, 24'h000040));
    emit(i_r(OP_ADD, 1, 15, 0));
    emit(i_r(OP_ADD, 1, 1, 15));
    emit(i_r(OP_ADD, 1, 1, 15));
    emit(i_i(OP_ST, 1, 0, 16'h7100));
    emit(i_i(OP_ST, 14, 0, 16'h7101));
    // phase 3: in0 in coupled mode, the datapath gathers three words at
    // addresses sent by the RISC (r2d -> b4 -> in0 address; in0 -> b7 -> BC
    // -> b8 -> d2r)
    setw(cfga(CFG_MISC), (1 << 13) | (S_ALU1_Z << 10) | 3);
    setw(cfga(CFG_BUS + 7), 1);
    setw(cfga(CFG_DST + 14), 5);    // in0 address <- b4
    setw(cfga(CFG_DST + 13), 9);    // d2r <- b8
    setw(cfga(CFG_CTRL + C_IN0_AW), cc(0, 0, 0, L_IB + 6));
    setw(cfga(CFG_CTRL + C_IN0_RD), cc(0, 0, 0, L_IB + 8));
    setw(cfga(CFG_CTRL + C_D2R_WR), cc(0, 0, 0, L_IB + 8));
    emit(i_i(OP_ADDI, 15, 0, 16'h1000 + GA0));
    emit(i_i(OP_ADDI, 15, 0, 16'h1000 + GA1));
    emit(i_i(OP_ADDI, 15, 0, 16'h1000 + GA2));
    emit(i_rapid(2, 24'h000040));       // send three addresses
    emit(i_rapid(2, 24'h000100));       // read three words
    emit(i_r(OP_ADD, 1, 15, 0));
    emit(i_r(OP_ADD, 1, 1, 15));
    emit(i_r(OP_ADD, 1, 1, 15));
    emit(i_i(OP_ST, 1, 0, 16'h7102));
    // wait for the output stream to drain
    emit(i_i(OP_ADDI, 3, 0, 4));
    l_poll = pc;
    emit(i_i(OP_LD, 2, 0, A_AG));
    emit(i_r(OP_AND, 2, 2, 3));
    emit(i_br(C_Z, l_poll));
    emit(i_halt());
    if (pc > 256) $fatal(1, "program too long");

    // ---------------------------------------------------------- run
    repeat (2) @(posedge clk); rst_n = 1;
    for (int i = 0; i < N * M; i++) begin
      u_mem.store[16'h1000 + i] = 16'(xs[i]);
      u_mem.store[16'h2000 + i] = 16'(ys[i]);
    end
    for (int i = 0; i < pc; i++) begin
      @(negedge clk); prog_wr = 1; prog_addr = 8'(i); prog_data = prog[i];
    end
    @(negedge clk); prog_wr = 0; start = 1;
    @(negedge clk); start = 0;
    hold[3] = 1;                       // output stream memory busy for a while
    fork begin repeat (400) @(negedge clk); hold[3] = 0; end join_none
    wait (halted);
    repeat (4) @(negedge clk);
    // ---------------------------------------------------------- check
    begin
      int run = 0;
      for (int b = 0; b < M; b++) begin
        run += sad[b];
        checks++;
        if (u_mem.store[16'h7000 + b] !== 16'(sad[b])) begin
          failures++; $display("FAIL block %0d SAD %0d exp %0d", b, u_mem.store[16'h7000 + b], sad[b]);
        end
        checks++;
        if (u_mem.store[16'h3000 + b] !== 16'(run)) begin
          failures++; $display("FAIL stream total %0d: %0d exp %0d", b, u_mem.store[16'h3000 + b], run);
        end
      end
    end
    checks++; if (u_mem.store[16'h7100] !== 16'h666) begin failures++; $display("FAIL pass-through %h", u_mem.store[16'h7100]); end
    checks++; if (u_mem.store[16'h7101] !== 16'(zeros)) begin failures++; $display("FAIL zero blocks %0d exp %0d", u_mem.store[16'h7101], zeros); end
    checks++; if (u_mem.store[16'h7102] !== 16'(xs[GA0] + xs[GA1] + xs[GA2])) begin
      failures++; $display("FAIL coupled gather %h", u_mem.store[16'h7102]);
    end
    checks++; if (streams_idle !== 3'b111) begin failures++; $display("FAIL streams not idle"); end
    $display("cycles=%0d stall_in=%0d stall_out=%0d abs_sub=%0d overlap=%0d d2r_wait=%0d st_taken=%0d st_not=%0d repeats=%0d bc=%0d coupled=%0d",
             cyc, n_stall_in, n_stall_out, n_abs_sub, n_overlap, n_d2r_wait, n_st_taken, n_st_not, n_pkt_repeat, n_bc, n_coupled);
    checks++; if (n_stall_in == 0)  begin failures++; $display("FAIL no input-stream stall"); end
    checks++; if (n_stall_out == 0) begin failures++; $display("FAIL no output-stream stall"); end
    checks++; if (n_abs_sub == 0)   begin failures++; $display("FAIL LUT never chose subtract"); end
    checks++; if (n_overlap == 0)   begin failures++; $display("FAIL no RISC/Rapid overlap"); end
    checks++; if (n_d2r_wait == 0)  begin failures++; $display("FAIL RISC never waited on the datapath"); end
    checks++; if (n_st_taken == 0 || n_st_not == 0) begin failures++; $display("FAIL status branch one-sided"); end
    checks++; if (n_pkt_repeat == 0) begin failures++; $display("FAIL no packet repeat"); end
    checks++; if (n_coupled != 3)   begin failures++; $display("FAIL coupled addresses %0d", n_coupled); end
    checks++; if (n_bc == 0)        begin failures++; $display("FAIL bus connector unused"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
