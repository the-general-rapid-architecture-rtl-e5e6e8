// tb_ctrl_network: self-checking test of the configurable control decode.
// For several random configurations (line selections, offsets, constants,
// LUT inputs and truth tables) it drives random instruction and status bits
// and a random advance enable, and compares every control output each cycle
// with a reference model that keeps the history of all decode lines and the
// LUT state. It then checks one hand-made case: a LUT used as a toggle
// flip-flop (parity of an instruction bit) and an instruction bit shared by
// two control signals with different offsets.
module tb_ctrl_network;
  import rapid_pkg::*;
  localparam int NL = NLUT, NC = NCTRL, NLINES = 1 + NIB + NST + 2 * NL;
  localparam int LQ0 = 1 + NIB + NST, LC0 = LQ0 + NL;
  logic clk = 0, rst_n = 0, en = 1;
  logic [NIB-1:0] instr = 0;
  logic [NST-1:0] status = 0;
  ctrl_cfg_t [NC-1:0] cfg;
  lut_cfg_t  [NL-1:0] lcfg;
  logic [NC-1:0] ctrl;
  logic [NL-1:0] mq;
  logic [NLINES-1:0] hist [4];
  int checks = 0, failures = 0;

  ctrl_network dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  function automatic logic [NLINES-1:0] lines();
    logic [NLINES-1:0] l;
    logic [NL-1:0] lc;
    l = '0;
    for (int i = 0; i < NIB; i++) l[1 + i] = instr[i];
    for (int i = 0; i < NST; i++) l[1 + NIB + i] = status[i];
    for (int i = 0; i < NL; i++) l[LQ0 + i] = mq[i];
    for (int i = 0; i < NL; i++) begin
      logic [2:0] ix;
      ix[0] = (lcfg[i].sel0 < LC0) ? l[lcfg[i].sel0] : 1'b0;
      ix[1] = (lcfg[i].sel1 < LC0) ? l[lcfg[i].sel1] : 1'b0;
      ix[2] = (lcfg[i].sel2 < LC0) ? l[lcfg[i].sel2] : 1'b0;
      lc[i] = lcfg[i].table_bits[ix];
    end
    for (int i = 0; i < NL; i++) l[LC0 + i] = lc[i];
    return l;
  endfunction

  task automatic run(int cycles);
    for (int t = 0; t < cycles; t++) begin
      @(negedge clk);
      instr = NIB'($urandom); status = NST'($urandom); en = ($urandom_range(0, 4) != 0);
      #1;
      hist[0] = lines();
      for (int c = 0; c < NC; c++) begin
        logic e;
        e = cfg[c].cst ? cfg[c].cval : hist[cfg[c].dly][cfg[c].sel];
        checks++;
        if (ctrl[c] !== e) begin failures++; $display("FAIL t=%0d c=%0d sel=%0d dly=%0d", t, c, cfg[c].sel, cfg[c].dly); end
      end
      @(posedge clk);
      if (en) begin
        for (int i = 0; i < NL; i++) mq[i] = hist[0][LC0 + i];
        for (int k = 3; k > 0; k--) hist[k] = hist[k-1];
      end
    end
  endtask

  task automatic reset_all();
    rst_n = 0; en = 0; mq = '0;
    for (int k = 0; k < 4; k++) hist[k] = '0;
    @(negedge clk); rst_n = 1;
  endtask

  initial begin
    for (int r = 0; r < 8; r++) begin
      for (int c = 0; c < NC; c++) begin
        cfg[c] = '0;
        cfg[c].sel = 6'($urandom_range(0, NLINES - 1));
        cfg[c].dly = 2'($urandom);
        cfg[c].cst = ($urandom_range(0, 5) == 0);
        cfg[c].cval = 1'($urandom);
      end
      for (int i = 0; i < NL; i++) begin
        lcfg[i].sel0 = 6'($urandom_range(0, LC0 - 1));
        lcfg[i].sel1 = 6'($urandom_range(0, LC0 - 1));
        lcfg[i].sel2 = 6'($urandom_range(0, LC0 + NL - 1));  // may name an illegal line
        lcfg[i].table_bits = 8'($urandom);
      end
      reset_all();
      run(200);
    end
    // directed: LUT 1 toggles on instruction bit 2 (q ^ t), read back registered
    cfg = '0; lcfg = '0;
    lcfg[1].sel0 = 6'(LQ0 + 1); lcfg[1].sel1 = 6'(1 + 2); lcfg[1].sel2 = 6'd0;
    lcfg[1].table_bits = 8'b0110_0110;
    cfg[0].sel = 6'(LQ0 + 1);
    cfg[1].sel = 6'(1 + 5); cfg[1].dly = 2'd0;   // bit 5, no offset
    cfg[2].sel = 6'(1 + 5); cfg[2].dly = 2'd2;   // same bit, two cycles later
    instr = 0;
    reset_all();
    begin
      logic par;
      logic [1:0] b5h;
      par = 0; b5h = 0;
      en = 1;
      for (int t = 0; t < 100; t++) begin
        @(negedge clk);
        instr = NIB'($urandom);
        #1;
        checks++;
        if (ctrl[0] !== par || ctrl[1] !== instr[5] || (t >= 2 && ctrl[2] !== b5h[1])) begin
          failures++; $display("FAIL directed t=%0d", t);
        end
        @(posedge clk);
        par = par ^ instr[2];
        b5h = {b5h[0], instr[5]};
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
