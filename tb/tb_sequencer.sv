// tb_sequencer: self-checking test of the sequencer with its RISC datapath.
// Runs a program that uses register arithmetic, a counted loop around a
// repeated Rapid instruction, a store and a load, both data FIFOs (through
// R15), branches on the status FIFO and on the zero flag, a call and return,
// two nested loops that end on the same instruction, back-to-back Rapid
// packets, a store into the instruction memory that plants the final HALT,
// and HALT. The datapath stall, the memory ready and the arrival of FIFO
// and status words are random or delayed. Checks the memory writes, the
// word sent to the datapath, the exact sequence of datapath instructions
// issued in non-stalled cycles, that RISC instructions ran while a packet
// was repeating, and that every mechanism occurred.
module tb_sequencer;
  import rapid_pkg::*;
  logic clk = 0, rst_n = 0, start = 0, halted;
  logic prog_wr = 0;
  logic [7:0] prog_addr = 0;
  logic [31:0] prog_data = 0;
  logic [NIB-1:0] dp_instr;
  logic dp_busy, dp_stall = 0;
  logic r2d_push, r2d_full = 0, d2r_pop, d2r_empty = 1, st_pop, st_data, st_empty = 1;
  logic [15:0] r2d_data, d2r_data = 16'h0077;
  logic sys_req, sys_we, sys_ready = 0, sys_rvalid = 0;
  logic [15:0] sys_addr, sys_wdata, sys_rdata = 0;
  logic [15:0] mem [logic [15:0]];
  logic st_q [$];
  logic [NIB-1:0] issued [$];
  logic [15:0] r2d_seen [$];
  int checks = 0, failures = 0, cyc = 0, overlap = 0, stalls_seen = 0, st_waits = 0, d2r_waits = 0;

  sequencer dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (4000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // environment, driven half a cycle after each rising edge
  always @(posedge clk) begin
    #0.5;
    if (dut.running) cyc++;
    dp_stall  = ($urandom_range(0, 3) == 0);
    sys_ready = ($urandom_range(0, 2) != 0);
    d2r_empty = (cyc < 60);
    if (cyc == 80) begin st_q.push_back(1'b1); st_q.push_back(1'b0); end
    st_empty  = (st_q.size() == 0);
    st_data   = st_empty ? 1'b0 : st_q[0];
  end
  // load responses one cycle after acceptance
  logic pend = 0;
  logic [15:0] pend_addr;
  always @(posedge clk) begin
    sys_rvalid <= pend;
    sys_rdata  <= mem.exists(pend_addr) ? mem[pend_addr] : 16'hdead;
    pend <= 0;
    if (rst_n && sys_req && sys_ready) begin
      if (sys_we) mem[sys_addr] = sys_wdata;
      else begin pend <= 1; pend_addr <= sys_addr; end
    end
  end
  always @(negedge clk) if (rst_n) begin
    if (dp_busy && !dp_stall) issued.push_back(dp_instr);
    if (dp_busy && dp_stall) stalls_seen++;
    if (dp_busy && dut.go && !dut.is_rapid) overlap++;
    if (r2d_push) r2d_seen.push_back(r2d_data);
    if (st_pop) void'(st_q.pop_front());
    if (!dut.go && !dut.is_rapid && dut.op == OP_BR && st_empty) st_waits++;
    if (!dut.go && dut.reads_fifo && d2r_empty) d2r_waits++;
  end

  logic [31:0] prog [256];
  initial begin
    for (int i = 0; i < 256; i++) prog[i] = '0;
    prog[0]  = i_i(OP_ADDI, 1, 0, 5);
    prog[1]  = i_i(OP_ADDI, 2, 0, 0);
    prog[2]  = i_loop(1, 4);
    prog[3]  = i_r(OP_ADD, 2, 2, 1);
    prog[4]  = i_rapid(2, 24'hA5A5A5);
    prog[5]  = i_i(OP_ST, 2, 0, 16'h10);
    prog[6]  = i_i(OP_LD, 3, 0, 16'h10);
    prog[7]  = i_i(OP_ADDI, 15, 3, 1);
    prog[8]  = i_r(OP_ADD, 4, 15, 0);
    prog[9]  = i_i(OP_ST, 4, 0, 16'h11);
    prog[10] = i_br(C_ST, 12);
    prog[11] = i_halt();
    prog[12] = i_call(40);
    prog[13] = i_i(OP_ST, 6, 0, 16'h12);
    prog[14] = i_r(OP_SUB, 7, 3, 3);
    prog[15] = i_br(C_Z, 17);
    prog[16] = i_halt();
    prog[17] = i_i(OP_ADDI, 8, 0, 0);
    prog[18] = i_loopi(2, 21);
    prog[19] = i_loopi(3, 21);
    prog[20] = i_i(OP_ADDI, 8, 8, 1);
    prog[21] = i_i(OP_ADDI, 8, 8, 16);
    prog[22] = i_i(OP_ST, 8, 0, 16'h13);
    prog[23] = i_br(C_NST, 25);
    prog[24] = i_halt();
    prog[25] = i_rapid(0, 24'h123456);
    prog[26] = i_rapid(1, 24'h654321);
    // plant HALT at 32 by storing both halves into the instruction memory
    prog[27] = i_i(OP_ADDI, 9, 0, 16'h7C00);
    prog[28] = i_i(OP_ST, 0, 0, 16'h8000 + 64);
    prog[29] = i_i(OP_ST, 9, 0, 16'h8000 + 65);
    prog[30] = i_br(C_ALWAYS, 32);
    prog[32] = i_i(OP_ST, 0, 0, 16'h14);   // replaced by HALT
    prog[33] = i_halt();
    prog[40] = i_i(OP_ADDI, 6, 0, 16'h99);
    prog[41] = i_ret();

    repeat (2) @(posedge clk); rst_n = 1;
    for (int i = 0; i < 256; i++) begin
      @(negedge clk); prog_wr = 1; prog_addr = 8'(i); prog_data = prog[i];
    end
    @(negedge clk); prog_wr = 0; start = 1;
    @(negedge clk); start = 0;
    wait (halted);
    repeat (2) @(negedge clk);
    checks++; if (mem[16'h10] !== 16'd25) begin failures++; $display("FAIL loop sum %h", mem[16'h10]); end
    checks++; if (mem[16'h11] !== 16'h77) begin failures++; $display("FAIL fifo read"); end
    checks++; if (mem[16'h12] !== 16'h99) begin failures++; $display("FAIL call"); end
    checks++; if (mem[16'h13] !== 16'd102) begin failures++; $display("FAIL nested loops %0d", mem[16'h13]); end
    checks++; if (mem.exists(16'h14)) begin failures++; $display("FAIL imem store"); end
    checks++; if (r2d_seen.size() != 1 || r2d_seen[0] !== 16'd26) begin failures++; $display("FAIL r2d"); end
    checks++; if (st_q.size() != 0) begin failures++; $display("FAIL status not consumed"); end
    checks++;
    if (issued.size() != 18) begin failures++; $display("FAIL issued %0d", issued.size()); end
    else begin
      for (int i = 0; i < 15; i++) if (issued[i] !== 24'hA5A5A5) begin failures++; $display("FAIL issue %0d", i); end
      if (issued[15] !== 24'h123456 || issued[16] !== 24'h654321 || issued[17] !== 24'h654321) begin
        failures++; $display("FAIL packet order");
      end
    end
    checks++; if (overlap == 0)     begin failures++; $display("FAIL no RISC/Rapid overlap"); end
    checks++; if (stalls_seen == 0) begin failures++; $display("FAIL no stall"); end
    checks++; if (st_waits == 0)    begin failures++; $display("FAIL no status wait"); end
    checks++; if (d2r_waits == 0)   begin failures++; $display("FAIL no fifo wait"); end
    $display("overlap=%0d stalls=%0d st_waits=%0d d2r_waits=%0d", overlap, stalls_seen, st_waits, d2r_waits);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
