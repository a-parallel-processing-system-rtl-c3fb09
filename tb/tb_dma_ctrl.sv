// tb_dma_ctrl -- testbench of the DMA controller.
//
// Loads the 3x3 erosion program (nine block READs paired with VALTRAN/COND1,
// a COND1 with no memory access, then a WRITE) into a local-memory model and
// runs it over a 2 x 2 raster of block positions.  Every broadcast general
// instruction and every memory request is compared, in content and in the
// exact cycle, with a schedule built from the program load (prog_len + 1
// cycles) and the slot lengths 8 (read), 6 (write) and 2 (general only): 80
// cycles per position.  Also checks busy and done.
`timescale 1ns/1ps
module tb_dma_ctrl;
  import pps_pkg::*;
  localparam int unsigned LM_AW = 10, IW = 10, JW = 9, RW = 4;
  localparam int T_RD = 8, T_WR = 6, T_G = 2;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  dma_cfg_t cfg = '0;
  logic start = 1'b0, busy, done;
  logic lm_en;
  logic [LM_AW-1:0] lm_addr;
  logic [31:0] lm_rdata;
  logic gen_valid, wr_latch;
  gop_t gen_op;
  logic [11:0] gen_imm;
  logic mreq_valid, mreq_we;
  acc_t mreq_acc;
  logic [IW-1:0] mreq_i;
  logic [JW-1:0] mreq_j;
  logic [RW-1:0] mreq_r;

  dma_ctrl dut (.*);

  // local memory model: synchronous read
  logic [31:0] lm [1 << LM_AW];
  always @(posedge clk) if (lm_en) lm_rdata <= lm[lm_addr];

  int checks = 0, failures = 0;
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  instr_t prog [11];
  // expected events
  longint eg_t [$];  int eg_op [$];
  longint em_t [$];  int em_i [$]; int em_j [$]; int em_we [$];
  int ndone = 0, nbusy = 0;
  instr_t cur_instr;
  assign cur_instr = dut.ir;

  function automatic instr_t mk(mop_t m, int dy, int dx, gop_t g, int imm);
    instr_t x;
    x = '0;
    x.mop = m; x.acc = ACC_BLOCK; x.intv = 4'd1;
    x.dy = 4'(dy); x.dx = 4'(dx); x.gop = g; x.imm = 12'(imm);
    return x;
  endfunction

  always @(posedge clk) if (rst_n) begin
    if (busy) nbusy++;
    if (done) ndone++;
    if (gen_valid) begin
      checks++;
      if (eg_t.size() == 0) begin failures++; $display("FAIL extra general instruction"); end
      else begin
        longint t; int op;
        t = eg_t.pop_front(); op = eg_op.pop_front();
        if (cyc != t || int'(gen_op) != op) begin
          failures++;
          if (failures < 10) $display("FAIL gen at %0d op %0d, exp %0d op %0d", cyc, gen_op, t, op);
        end
      end
    end
    if (mreq_valid) begin
      checks++;
      if (em_t.size() == 0) begin failures++; $display("FAIL extra memory request"); end
      else begin
        longint t; int i, j, w;
        t = em_t.pop_front(); i = em_i.pop_front(); j = em_j.pop_front(); w = em_we.pop_front();
        if (cyc != t || int'(mreq_i) != i || int'(mreq_j) != j || int'(mreq_we) != w ||
            mreq_acc != ACC_BLOCK || mreq_r != 4'd1) begin
          failures++;
          if (failures < 10) $display("FAIL mreq at %0d (%0d,%0d,we%0d), exp %0d (%0d,%0d,we%0d)",
                                      cyc, mreq_i, mreq_j, mreq_we, t, i, j, w);
        end
      end
    end
    if (wr_latch) begin
      checks++;
      if (!(gen_valid && cur_instr.mop == MOP_WRITE)) begin failures++; $display("FAIL wr_latch"); end
    end
  end

  initial begin
    longint t0, ts;
    // erosion program, as a pair list
    prog[0] = mk(MOP_READ, 0, 0, G_VALTRAN, 256);
    for (int n = 1; n < 9; n++) prog[n] = mk(MOP_READ, n / 3, n % 3, G_COND1, 0);
    prog[9]  = mk(MOP_NOP, 0, 0, G_COND1, 0);
    prog[10] = mk(MOP_WRITE, 1, 1, G_NOP, 0);
    for (int a = 0; a < (1 << LM_AW); a++) lm[a] = '0;
    for (int n = 0; n < 11; n++) lm[100 + n] = prog[n];
    cfg.prog_base = 16'd100; cfg.prog_len = 16'd11;
    cfg.row0 = 16'd3; cfg.row1 = 16'd5; cfg.step_i = 16'd2;
    cfg.col0 = 16'd8; cfg.col1 = 16'd12; cfg.step_j = 16'd4;
    cfg.wr_di = 16'sd20; cfg.wr_dj = -16'sd1;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    start = 1'b1;
    t0 = cyc;            // start is sampled at the next edge; slot 0 begins after it
    @(negedge clk);
    start = 1'b0;
    // schedule
    ts = t0 + 1 + 12;    // program load: prog_len + 1 cycles
    for (int bi = 3; bi <= 5; bi += 2)
      for (int bj = 8; bj <= 12; bj += 4)
        for (int n = 0; n < 11; n++) begin
          eg_t.push_back(ts + 1); eg_op.push_back(int'(prog[n].gop));
          if (prog[n].mop != MOP_NOP) begin
            bit w;
            w = (prog[n].mop == MOP_WRITE);
            em_t.push_back(ts + 2);
            em_i.push_back(bi + int'(prog[n].dy) + (w ? 20 : 0));
            em_j.push_back(bj + int'(prog[n].dx) - (w ? 1 : 0));
            em_we.push_back(int'(w));
          end
          ts += longint'((prog[n].mop == MOP_READ) ? T_RD : (prog[n].mop == MOP_WRITE) ? T_WR : T_G);
        end
    wait (done);
    @(negedge clk);
    repeat (3) @(negedge clk);
    checks += 4;
    if (nbusy != 4 * 80 + 12) begin failures++; $display("FAIL busy for %0d cycles, expected 332", nbusy); end
    if (ndone != 1) begin failures++; $display("FAIL done pulses %0d", ndone); end
    if (eg_t.size() != 0 || em_t.size() != 0) begin failures++; $display("FAIL missing events"); end
    if (busy) begin failures++; $display("FAIL still busy"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
