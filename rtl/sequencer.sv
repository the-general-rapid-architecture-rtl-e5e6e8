// sequencer: controller of the Rapid array.
//
// A program counter over an instruction memory of IDEPTH 32-bit words. Each
// instruction is either a Rapid instruction (bit 31 set), whose 24 low bits
// go to the control decode of the datapath, or a RISC instruction executed on
// the risc_datapath instantiated here (see rapid_pkg for the encodings).
//
// Rapid instructions are issued as packets: bits 30:24 give the number of
// extra repetitions, and the instruction is held on `dp_instr` for that many
// more datapath cycles. The sequencer moves on right after the issue, so RISC
// instructions that follow run while the packet repeats; a further Rapid
// instruction waits until the packet has one cycle left. Cycles with no
// packet drive an all-zero instruction, a NOP. A datapath stall (`dp_stall`,
// stream empty or full) freezes the packet count.
//
// Loops and calls share one loop stack of SDEPTH frames. LOOP/LOOPI push a
// frame (count, first and last pc of the body); the end of a loop is
// handled by hardware with no instruction: after the instruction at the last
// pc the count is decremented and the pc returns to the first, or the frame
// is popped and an enclosing loop ending at the same pc is checked one cycle
// later. CALL pushes the return address, RET pops it; there is no save of
// RISC registers. Branches test the RISC condition codes or pop a bit from the
// status FIFO, stalling while it is empty. Register R15 reads the
// datapath->RISC FIFO and writes the RISC->datapath FIFO, stalling while that
// one is empty or full. Loads and stores go to `sys_*` (memory,
// configuration, address generators), one at a time and uncached; stores to
// 0x8000-0x81FF write the instruction memory itself (16-bit halves), so a
// program can load another. `prog_*` loads the instruction memory from
// outside before `start`.
// The packet repeat, loop stack with hardware loop end, calls on the loop
// stack, status FIFO branches and FIFO register follow the architecture;
// all encodings, sizes and the one-instruction-per-cycle timing are own
// choices. The end-of-loop check happens only after an instruction that does
// not jump.
module sequencer
  import rapid_pkg::*;
#(
  parameter int unsigned IDEPTH = 256,
  parameter int unsigned SDEPTH = 8
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  output logic              halted,
  // instruction memory load from outside
  input  logic              prog_wr,
  input  logic [$clog2(IDEPTH)-1:0] prog_addr,
  input  logic [IW-1:0]     prog_data,
  // datapath instruction
  output logic [NIB-1:0]    dp_instr,
  output logic              dp_busy,
  input  logic              dp_stall,
  // RISC -> datapath FIFO
  output logic              r2d_push,
  output logic [W-1:0]      r2d_data,
  input  logic              r2d_full,
  // datapath -> RISC FIFO
  output logic              d2r_pop,
  input  logic [W-1:0]      d2r_data,
  input  logic              d2r_empty,
  // status FIFO
  output logic              st_pop,
  input  logic              st_data,
  input  logic              st_empty,
  // system bus (memory, configuration, address generators)
  output logic              sys_req,
  output logic              sys_we,
  output logic [15:0]       sys_addr,
  output logic [W-1:0]      sys_wdata,
  input  logic              sys_ready,
  input  logic              sys_rvalid,
  input  logic [W-1:0]      sys_rdata
);
  localparam int unsigned PW = $clog2(IDEPTH);
  localparam int unsigned SW = $clog2(SDEPTH + 1);

  typedef struct packed {
    logic          call;
    logic [15:0]   cnt;
    logic [PW-1:0] first;   // first pc of the body, or return address
    logic [PW-1:0] last;
  } frame_t;

  logic [IW-1:0]   imem [IDEPTH];
  logic [PW-1:0]   pc;
  logic            running, recheck, ld_wait;
  frame_t          stack [SDEPTH];
  logic [SW-1:0]   sp;
  logic [RPTW:0]   rpt;
  logic [NIB-1:0]  bits;

  // ---------------------------------------------------------------- decode
  logic [IW-1:0] ins;
  risc_op_e      op;
  logic [3:0]    f_rd, f_rs, f_rt;
  logic [15:0]   imm;
  logic          is_rapid;
  assign ins      = imem[pc];
  assign is_rapid = ins[31];
  assign op       = risc_op_e'(ins[30:26]);
  assign f_rd     = ins[25:22];
  assign f_rs     = ins[21:18];
  assign f_rt     = ins[17:14];
  assign imm      = ins[15:0];

  logic is_alu3, is_addi, rd_rs, rd_rt, rd_rd, wr_rd;
  assign is_alu3 = !is_rapid && op inside {OP_ADD, OP_SUB, OP_AND, OP_OR, OP_XOR, OP_SLL, OP_SRL};
  assign is_addi = !is_rapid && op == OP_ADDI;
  assign rd_rs   = is_alu3 || is_addi || (!is_rapid && op inside {OP_LD, OP_ST, OP_LOOP});
  assign rd_rt   = is_alu3;
  assign rd_rd   = !is_rapid && op == OP_ST;
  assign wr_rd   = is_alu3 || is_addi || (!is_rapid && op == OP_LD);

  // reading R15 pops the datapath->RISC FIFO once per instruction
  logic reads_fifo, writes_fifo;
  assign reads_fifo  = (rd_rs && f_rs == FIFO_REG) || (rd_rt && f_rt == FIFO_REG) ||
                       (rd_rd && f_rd == FIFO_REG);
  assign writes_fifo = wr_rd && f_rd == FIFO_REG;

  // -------------------------------------------------------- RISC datapath
  risc_alu_e   alu_op;
  logic [W-1:0] rs_val, rd_val, alu_y;
  logic         fz, fn, fc;
  always_comb begin
    unique case (op)
      OP_SUB:  alu_op = RA_SUB;
      OP_AND:  alu_op = RA_AND;
      OP_OR:   alu_op = RA_OR;
      OP_XOR:  alu_op = RA_XOR;
      OP_SLL:  alu_op = RA_SLL;
      OP_SRL:  alu_op = RA_SRL;
      default: alu_op = RA_ADD;
    endcase
  end

  logic go;  // the instruction at pc completes this cycle

  risc_datapath u_risc (
    .clk, .rst_n, .rs(f_rs), .rt(f_rt), .rd(f_rd), .r15_val(d2r_data),
    .use_imm(!is_alu3), .imm, .alu_op,
    .flags_we(go && !recheck && (is_alu3 || is_addi)),
    .wb_en(go && !recheck && wr_rd), .wb_ext(op == OP_LD), .ext_data(sys_rdata),
    .rs_val, .rd_val, .alu_y, .flag_z(fz), .flag_n(fn), .flag_c(fc)
  );

  // --------------------------------------------------------- memory access
  logic is_mem, is_imem_st;
  assign is_mem     = !is_rapid && op inside {OP_LD, OP_ST};
  assign sys_addr   = alu_y;                 // rs + imm
  assign sys_wdata  = rd_val;
  assign is_imem_st = !is_rapid && op == OP_ST && sys_addr[15:9] == A_IMEM[15:9];
  assign sys_we     = op == OP_ST;

  // ------------------------------------------------------------ conditions
  cond_e cond;
  logic  taken, st_cond;
  assign cond    = cond_e'(f_rd);
  assign st_cond = cond inside {C_ST, C_NST};
  always_comb begin
    unique case (cond)
      C_ALWAYS: taken = 1'b1;
      C_Z:      taken = fz;
      C_NZ:     taken = !fz;
      C_N:      taken = fn;
      C_NN:     taken = !fn;
      C_C:      taken = fc;
      C_NC:     taken = !fc;
      C_ST:     taken = st_data;
      C_NST:    taken = !st_data;
      default:  taken = 1'b0;
    endcase
  end

  logic rpt_done_now;  // the current packet issues its last cycle now
  assign rpt_done_now = (rpt == '0) || (rpt == 1 && !dp_stall);

  always_comb begin
    go = 1'b0;
    if (running && !halted) begin
      if (recheck)                                go = 1'b1;
      else if (is_rapid)                          go = rpt_done_now;
      else if (reads_fifo && d2r_empty)           go = 1'b0;
      else if (writes_fifo && r2d_full)           go = 1'b0;
      else if (op == OP_BR && st_cond && st_empty) go = 1'b0;
      else if (op == OP_LD)                       go = ld_wait && sys_rvalid;
      else if (op == OP_ST)                       go = is_imem_st || sys_ready;
      else if (op == OP_HALT)                     go = (rpt == '0);
      else                                        go = 1'b1;
    end
  end

  assign sys_req  = running && !halted && !recheck && is_mem && !is_imem_st && !ld_wait &&
                    !(reads_fifo && d2r_empty) && !(writes_fifo && r2d_full);
  assign d2r_pop  = go && !recheck && reads_fifo;
  assign r2d_push = go && !recheck && writes_fifo;
  assign r2d_data = (op == OP_LD) ? sys_rdata : alu_y;
  assign st_pop   = go && !recheck && op == OP_BR && st_cond;

  assign dp_instr = (rpt != '0) ? bits : '0;
  assign dp_busy  = (rpt != '0);

  // -------------------------------------------------------------- sequencing
  logic at_end;
  assign at_end = (sp != 0) && !stack[sp-1].call && stack[sp-1].last == pc;

  always_ff @(posedge clk) begin
    if (prog_wr) imem[prog_addr] <= prog_data;
    else if (go && is_imem_st) begin
      if (sys_addr[0]) imem[sys_addr[PW:1]][31:16] <= rd_val;
      else             imem[sys_addr[PW:1]][15:0]  <= rd_val;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pc      <= '0;
      running <= 1'b0;
      halted  <= 1'b0;
      recheck <= 1'b0;
      ld_wait <= 1'b0;
      sp      <= '0;
      rpt     <= '0;
      bits    <= '0;
    end else if (start) begin
      pc      <= '0;
      running <= 1'b1;
      halted  <= 1'b0;
      recheck <= 1'b0;
      ld_wait <= 1'b0;
      sp      <= '0;
    end else begin
      // packet repeat
      if (rpt != '0 && !dp_stall) rpt <= rpt - 1'b1;
      if (sys_req && sys_ready && !sys_we) ld_wait <= 1'b1;
      if (go) begin
        logic jump;
        jump    = 1'b0;
        recheck <= 1'b0;
        ld_wait <= 1'b0;
        if (!recheck) begin
          if (is_rapid) begin
            rpt  <= {1'b0, ins[30:24]} + 1'b1;
            bits <= ins[NIB-1:0];
          end else begin
            unique case (op)
              OP_BR:   if (taken) begin pc <= imm[PW-1:0]; jump = 1'b1; end
              OP_CALL: begin
                stack[sp[$clog2(SDEPTH)-1:0]] <= '{call: 1'b1, cnt: '0, first: pc + 1'b1, last: '0};
                sp <= sp + 1'b1;
                pc <= imm[PW-1:0];
                jump = 1'b1;
              end
              OP_RET:  begin
                sp <= sp - 1'b1;
                pc <= stack[sp-1].first;
                jump = 1'b1;
              end
              OP_LOOP, OP_LOOPI: begin
                stack[sp[$clog2(SDEPTH)-1:0]] <= '{call: 1'b0,
                               cnt: (op == OP_LOOP) ? rs_val : 16'(ins[25:16]),
                               first: pc + 1'b1, last: imm[PW-1:0]};
                sp <= sp + 1'b1;
                pc <= pc + 1'b1;
                jump = 1'b1;
              end
              OP_HALT: begin halted <= 1'b1; jump = 1'b1; end
              default: ;
            endcase
          end
        end
        if (!jump) begin
          if (at_end) begin
            if (stack[sp-1].cnt > 16'd1) begin
              stack[sp-1].cnt <= stack[sp-1].cnt - 1'b1;
              pc <= stack[sp-1].first;
            end else begin
              sp      <= sp - 1'b1;
              recheck <= 1'b1;
            end
          end else begin
            pc <= pc + 1'b1;
          end
        end
      end
    end
  end

  a_stack_overflow: assert property (@(posedge clk) disable iff (!rst_n)
      go && !recheck && !is_rapid && op inside {OP_CALL, OP_LOOP, OP_LOOPI} |-> sp < SW'(SDEPTH));
  a_stack_underflow: assert property (@(posedge clk) disable iff (!rst_n)
      go && !recheck && !is_rapid && op == OP_RET |-> sp != '0);
endmodule
