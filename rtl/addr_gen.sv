// addr_gen: stream address generator of a Rapid memory port.
//
// A small stack-based sequencer for nested loops. It runs a program of up to
// 16 32-bit instructions and emits "address packets" (start address, stride,
// count) that a packet_unroll turns into single addresses. Instructions
// (op in bits 31:30):
//   PKT  (0): count = [29:20], stride = signed [19:12],
//             start = base + signed offset [11:0]; emitted as one packet
//   LOOP (1): repeat instructions pc+1 .. end [3:0], count = [29:20] times;
//             [5:4] = 1 or 2 makes it triangular: the count is then taken
//             from the enclosing loop, as its current iteration number
//             (1, 2, .. N: mode 1) or its remaining iterations (N .. 1:
//             mode 2); with no enclosing loop [29:20] is used
//   ADDB (2): base += signed [15:0]
//   END  (3): stop and raise `done`
// Loop ends are handled by hardware, without instructions: after the last
// instruction of a body the count is decremented and the pc returns to the
// first; when it runs out the loop is popped and the next enclosing loop is
// checked one cycle later, so nested loops may share an end.
// The controller (the RISC) loads and changes the program at any time
// through a 16-bit write port: word 2k holds the low and 2k+1 the high half
// of instruction k, word 32 the initial base, and a write to word 33 starts
// (or restarts) the program at pc 0. A loop count of zero runs once.
// Stack-based nested-loop sequencing, packets with constant stride and
// reprogramming by the controller follow the architecture; the instruction
// encoding, the 16-word program and the 4-deep loop stack are own choices.
// Triangular loops are named by the architecture but not specified; the
// two modes above are the simplest form and an own choice.
module addr_gen
  import rapid_pkg::*;
#(
  parameter int unsigned AW     = 16,
  parameter int unsigned PDEPTH = 16,
  parameter int unsigned SDEPTH = 4
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          wr_en,
  input  logic [5:0]    wr_addr,
  input  logic [15:0]   wr_data,
  output logic          pkt_valid,
  input  logic          pkt_ready,
  output logic [AW-1:0] pkt_start,
  output logic [15:0]   pkt_stride,
  output logic [9:0]    pkt_count,
  output logic          running,
  output logic          done
);
  localparam int unsigned PW = $clog2(PDEPTH);
  localparam int unsigned SW = $clog2(SDEPTH + 1);

  typedef struct packed {
    logic [9:0]    cnt;
    logic [9:0]    tot;
    logic [PW-1:0] first;
    logic [PW-1:0] last;
  } frame_t;

  logic [31:0]   prog [PDEPTH];
  logic [AW-1:0] base, base_init;
  logic [PW-1:0] pc;
  logic          recheck;
  frame_t        stack [SDEPTH];
  logic [SW-1:0] sp;

  logic [31:0] ins;
  ag_op_e      op;
  assign ins = prog[pc];
  assign op  = ag_op_e'(ins[31:30]);

  assign pkt_valid  = running && !recheck && op == AG_PKT;
  assign pkt_start  = base + AW'($signed(ins[11:0]));
  assign pkt_stride = 16'($signed(ins[19:12]));
  assign pkt_count  = (ins[29:20] == '0) ? 10'd1 : ins[29:20];

  // program memory writes
  always_ff @(posedge clk) begin
    if (wr_en && wr_addr < 6'(2 * PDEPTH)) begin  // words 0..2*PDEPTH-1
      if (wr_addr[0]) prog[wr_addr[PW:1]][31:16] <= wr_data;
      else            prog[wr_addr[PW:1]][15:0]  <= wr_data;
    end
  end

  // count of a LOOP at pc: fixed, or triangular from the enclosing frame
  logic [9:0] loop_cnt;
  always_comb begin
    loop_cnt = (ins[29:20] == '0) ? 10'd1 : ins[29:20];
    if (sp != 0) begin
      if (ins[5:4] == 2'd1) loop_cnt = stack[sp-1].tot - stack[sp-1].cnt + 10'd1;
      if (ins[5:4] == 2'd2) loop_cnt = stack[sp-1].cnt;
    end
  end

  logic at_end;
  assign at_end = (sp != 0) && stack[sp-1].last == pc;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      running   <= 1'b0;
      done      <= 1'b0;
      recheck   <= 1'b0;
      pc        <= '0;
      sp        <= '0;
      base      <= '0;
      base_init <= '0;
    end else if (wr_en && wr_addr == 6'd32) begin
      base_init <= AW'(wr_data);
    end else if (wr_en && wr_addr == 6'd33) begin
      running <= 1'b1;
      done    <= 1'b0;
      recheck <= 1'b0;
      pc      <= '0;
      sp      <= '0;
      base    <= base_init;
    end else if (running) begin
      logic finished;  // instruction at pc completed this cycle
      finished = 1'b0;
      if (recheck) begin
        finished = 1'b1;
      end else begin
        unique case (op)
          AG_PKT:  finished = pkt_ready;
          AG_ADDB: begin base <= base + AW'($signed(ins[15:0])); finished = 1'b1; end
          AG_LOOP: begin
            stack[sp[$clog2(SDEPTH)-1:0]] <= '{cnt: loop_cnt, tot: loop_cnt,
                           first: pc + 1'b1, last: ins[PW-1:0]};
            sp <= sp + 1'b1;
            pc <= pc + 1'b1;
          end
          AG_END:  begin running <= 1'b0; done <= 1'b1; end
        endcase
      end
      if (finished) begin
        recheck <= 1'b0;
        if (at_end) begin
          if (stack[sp-1].cnt > 10'd1) begin
            stack[sp-1].cnt <= stack[sp-1].cnt - 1'b1;
            pc <= stack[sp-1].first;
          end else begin
            sp      <= sp - 1'b1;
            recheck <= 1'b1;        // an enclosing loop may end here too
          end
        end else begin
          pc <= pc + 1'b1;
        end
      end
    end
  end

  a_stack: assert property (@(posedge clk) disable iff (!rst_n)
                            running && !recheck && op == AG_LOOP |-> sp < SW'(SDEPTH));
endmodule
