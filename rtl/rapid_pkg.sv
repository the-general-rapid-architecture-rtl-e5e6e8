// rapid_pkg: widths, encodings and shared types of the Rapid coarse-grained
// configurable array.
//
// Holds the datapath word width, the 32-bit instruction format shared by the
// RISC and the Rapid datapath, the RISC opcodes and branch conditions, the ALU
// operation codes of the datapath function units, the list of soft control
// signals of the default datapath, and the address map seen by the RISC.
// The instruction width of 32 bits follows the architecture ("32 bits is a
// more reasonable goal"); every field layout and code below is this
// implementation's own choice, since the architecture leaves them open.
package rapid_pkg;

  // Datapath and RISC word width (own choice; the architecture gives none).
  localparam int unsigned W  = 16;
  // Instruction width, shared by Rapid and RISC instructions.
  localparam int unsigned IW = 32;
  // Instruction bits delivered to the control decode by a Rapid instruction.
  localparam int unsigned NIB = 24;
  // Repeat-count field of a Rapid instruction.
  localparam int unsigned RPTW = 7;

  // ---------------------------------------------------------------- RISC ISA
  // instr[31]   = 1 : Rapid instruction, instr[30:24] repeat-1, instr[23:0] bits
  // instr[31]   = 0 : RISC instruction
  //   op  = instr[30:26], rd = instr[25:22], rs = instr[21:18],
  //   rt  = instr[17:14], imm = instr[15:0]
  typedef enum logic [4:0] {
    OP_NOP   = 5'd0,
    OP_ADD   = 5'd1,
    OP_SUB   = 5'd2,
    OP_AND   = 5'd3,
    OP_OR    = 5'd4,
    OP_XOR   = 5'd5,
    OP_SLL   = 5'd6,
    OP_SRL   = 5'd7,
    OP_ADDI  = 5'd8,   // rd = rs + imm
    OP_LD    = 5'd9,   // rd = M[rs + imm]
    OP_ST    = 5'd10,  // M[rs + imm] = rd
    OP_BR    = 5'd11,  // if cond(rd field) pc = imm[11:0]
    OP_LOOP  = 5'd12,  // loop R[rs] times over pc+1 .. imm[11:0]
    OP_LOOPI = 5'd13,  // loop instr[25:16] times over pc+1 .. imm[11:0]
    OP_CALL  = 5'd14,  // push pc+1 on the loop stack, pc = imm[11:0]
    OP_RET   = 5'd15,  // pop return address
    OP_HALT  = 5'd31
  } risc_op_e;

  typedef enum logic [3:0] {
    C_ALWAYS = 4'd0,
    C_Z      = 4'd1,
    C_NZ     = 4'd2,
    C_N      = 4'd3,
    C_NN     = 4'd4,
    C_C      = 4'd5,
    C_NC     = 4'd6,
    C_ST     = 4'd7,   // pop status FIFO, taken if the status bit is 1
    C_NST    = 4'd8    // pop status FIFO, taken if the status bit is 0
  } cond_e;

  // RISC ALU operations
  typedef enum logic [2:0] {
    RA_ADD = 3'd0, RA_SUB = 3'd1, RA_AND = 3'd2, RA_OR = 3'd3,
    RA_XOR = 3'd4, RA_SLL = 3'd5, RA_SRL = 3'd6
  } risc_alu_e;

  // Register that reads the datapath->RISC FIFO and writes the RISC->datapath FIFO.
  localparam logic [3:0] FIFO_REG = 4'd15;

  // ------------------------------------------------------- datapath ALU ops
  typedef enum logic [2:0] {
    ALU_ADD  = 3'd0,
    ALU_SUB  = 3'd1,   // a - b
    ALU_AND  = 3'd2,
    ALU_OR   = 3'd3,
    ALU_XOR  = 3'd4,
    ALU_PASSA= 3'd5,
    ALU_PASSB= 3'd6,
    ALU_RSUB = 3'd7    // b - a
  } alu_op_e;

  // ------------------------------------------- soft control signals (default array)
  localparam int unsigned C_IN0_RD   = 0;
  localparam int unsigned C_IN1_RD   = 1;
  localparam int unsigned C_R2D_RD   = 2;
  localparam int unsigned C_OUT0_WR  = 3;
  localparam int unsigned C_D2R_WR   = 4;
  localparam int unsigned C_ST_PUSH  = 5;
  localparam int unsigned C_ALU0_OP  = 6;   // 3 bits: 6..8
  localparam int unsigned C_ALU0_WE  = 9;
  localparam int unsigned C_ALU1_OP  = 10;  // 3 bits: 10..12
  localparam int unsigned C_ALU1_WE  = 13;
  localparam int unsigned C_MUL_WE   = 14;
  localparam int unsigned C_MUL_HI   = 15;
  localparam int unsigned C_SH_WE    = 16;
  localparam int unsigned C_SH_RIGHT = 17;
  localparam int unsigned C_SH_ARITH = 18;
  localparam int unsigned C_REG0_WE  = 19;
  localparam int unsigned C_REG1_WE  = 20;
  localparam int unsigned C_RAM_WE   = 21;
  localparam int unsigned C_RAM_EN   = 22;
  localparam int unsigned C_IN0_AW   = 23;  // coupled mode: push an address to in0
  localparam int unsigned C_IN1_AW   = 24;  // coupled mode: push an address to in1
  localparam int unsigned NCTRL      = 25;

  // status signals of the default array, all registered
  localparam int unsigned S_ALU0_N = 0;
  localparam int unsigned S_ALU0_Z = 1;
  localparam int unsigned S_ALU0_C = 2;
  localparam int unsigned S_ALU1_N = 3;
  localparam int unsigned S_ALU1_Z = 4;
  localparam int unsigned S_ALU1_C = 5;
  localparam int unsigned NST      = 6;

  // LUTs of the control decode
  localparam int unsigned NLUT = 4;
  localparam int unsigned MAXDLY = 3;

  // per-signal decode configuration (one 16-bit configuration word)
  typedef struct packed {
    logic       cst;    // soft-configured: drive a constant
    logic       cval;   // the constant
    logic [1:0] dly;    // pipeline offset in cycles (0..3)
    logic [5:0] unused;
    logic [5:0] sel;    // decode line: 0 = ground, then instruction bits, status, LUTs
  } ctrl_cfg_t;

  // LUT configuration (two configuration words)
  typedef struct packed {
    logic [7:0] table_bits;  // output for input pattern {i2,i1,i0}
    logic [5:0] sel2;
    logic [5:0] sel1;
    logic [5:0] sel0;
  } lut_cfg_t;

  // --------------------------------------------------------- RISC address map
  // 0x0000-0x7FFF external memory
  // 0x8000-0x81FF instruction memory, 16-bit halves (addr[0]=1 upper half)
  // 0x9000-0x90FF configuration registers
  // 0xA000-0xA0FF address generators, 64 words each: 0..31 program halves,
  //               32 base, 33 start; reading any word returns the done flags
  localparam logic [15:0] A_IMEM = 16'h8000;
  localparam logic [15:0] A_CFG  = 16'h9000;
  localparam logic [15:0] A_AG   = 16'hA000;

  // configuration register map of the default array
  localparam int unsigned CFG_CTRL   = 0;                  // NCTRL words
  localparam int unsigned CFG_LUT    = CFG_CTRL + NCTRL;   // 2*NLUT words (lo, hi)
  localparam int unsigned CFG_BUS    = CFG_LUT + 2*NLUT;   // NBUS words
  localparam int unsigned NBUS_DP    = 9;
  localparam int unsigned CFG_DST    = CFG_BUS + NBUS_DP;  // NDST words
  localparam int unsigned NDST_DP    = 17;
  localparam int unsigned CFG_MISC   = CFG_DST + NDST_DP;  // output registers, RAM mode, status select, coupled modes
  localparam int unsigned NCFG       = CFG_MISC + 1;

  // address-generator instruction (32 bits)
  typedef enum logic [1:0] {AG_PKT = 2'd0, AG_LOOP = 2'd1, AG_ADDB = 2'd2, AG_END = 2'd3} ag_op_e;

  // ------------------------------------------------ instruction builders
  // Constant functions that assemble instructions; used to write programs
  // for the sequencer and the address generators.
  function automatic logic [31:0] ag_pkt(int count, int stride, int offset);
    return {AG_PKT, 10'(count), 8'(stride), 12'(offset)};
  endfunction
  function automatic logic [31:0] ag_loop(int count, int last);
    return {AG_LOOP, 10'(count), 16'd0, 4'(last)};
  endfunction
  // triangular loop: mode 1 counts 1..N, mode 2 counts N..1 with the
  // iterations of the enclosing loop
  function automatic logic [31:0] ag_tloop(int mode, int last);
    return {AG_LOOP, 10'd1, 14'd0, 2'(mode), 4'(last)};
  endfunction
  function automatic logic [31:0] ag_addb(int delta);
    return {AG_ADDB, 14'd0, 16'(delta)};
  endfunction
  function automatic logic [31:0] ag_end();
    return {AG_END, 30'd0};
  endfunction

  function automatic logic [31:0] i_rapid(int repeats, logic [NIB-1:0] bits);
    return {1'b1, RPTW'(repeats), bits};
  endfunction
  function automatic logic [31:0] i_r(risc_op_e op, int rd, int rs, int rt);
    return {1'b0, op, 4'(rd), 4'(rs), 4'(rt), 14'd0};
  endfunction
  function automatic logic [31:0] i_i(risc_op_e op, int rd, int rs, int imm);
    return {1'b0, op, 4'(rd), 4'(rs), 2'd0, 16'(imm)};
  endfunction
  function automatic logic [31:0] i_br(cond_e c, int target);
    return {1'b0, OP_BR, c, 6'd0, 16'(target)};
  endfunction
  function automatic logic [31:0] i_loopi(int count, int last);
    return {1'b0, OP_LOOPI, 10'(count), 16'(last)};
  endfunction
  function automatic logic [31:0] i_loop(int rs, int last);
    return {1'b0, OP_LOOP, 4'd0, 4'(rs), 2'd0, 16'(last)};
  endfunction
  function automatic logic [31:0] i_call(int target);
    return {1'b0, OP_CALL, 10'd0, 16'(target)};
  endfunction
  function automatic logic [31:0] i_ret();
    return {1'b0, OP_RET, 26'd0};
  endfunction
  function automatic logic [31:0] i_halt();
    return {1'b0, OP_HALT, 26'd0};
  endfunction

endpackage
