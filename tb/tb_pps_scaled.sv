// tb_pps_scaled -- workload testbench: the whole system with 4 and with 16 PEs.
//
// Two systems run side by side on a 34 x 48 random frame in rows 0..33 of a
// 128 x 48 array:
//    4 PEs: P = Q = 2,  5 memory modules (the size used for video segmentation);
//   16 PEs: P = Q = 4, 17 memory modules (the size used for Phong shading).
// Each applies the simplification step of segmentation, a 3 x 3 morphological
// opening, as two programs of P x Q block accesses: erosion into rows 40.., then
// dilation of that result into rows 80...  Every result block is read back with
// a block access and compared with reference filters, and each run must take
// the program load time plus 80 cycles per block position, whatever the
// number of PEs.
`timescale 1ns/1ps
module tb_pps_scaled;
  import pps_pkg::*;

  localparam int unsigned DW = DW_DEF;
  localparam int H = 34, W = 48;       // frame
  localparam int OFF = 40;             // row offset of each pass's results
  localparam int NCFG = 2;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  bit done [NCFG];

  task automatic fail(string msg);
    failures++;
    if (failures < 20) $display("FAIL: %s", msg);
  endtask

  function automatic instr_t mk(mop_t m, int dy, int dx, gop_t g, int imm);
    instr_t x;
    x = '0;
    x.mop = m; x.acc = ACC_BLOCK; x.intv = 4'd1;
    x.dy = 4'(dy); x.dx = 4'(dx); x.gop = g; x.imm = 12'(imm);
    return x;
  endfunction

  // 3 x 3 morphological program, result at the window centre
  function automatic void morph_prog(gop_t cond, int init, ref instr_t prog [$]);
    prog.delete();
    for (int n = 0; n < 9; n++)
      prog.push_back(mk(MOP_READ, n / 3, n % 3, (n == 0) ? G_VALTRAN : cond, init));
    prog.push_back(mk(MOP_NOP, 0, 0, cond, 0));
    prog.push_back(mk(MOP_WRITE, 1, 1, G_NOP, 0));
  endfunction

  for (genvar g = 0; g < NCFG; g++) begin : g_cfg
    localparam int unsigned P    = (g == 0) ? 2 : 4;
    localparam int unsigned Q    = P;
    localparam int unsigned NMOD = (g == 0) ? 5 : 17;
    localparam int unsigned ROWS = 128, COLS = W;
    localparam int unsigned NPE  = P * Q;
    localparam int unsigned IW   = $clog2(ROWS), JW = $clog2(COLS);

    logic              pu_lm_en = 1'b0, pu_lm_we = 1'b0;
    logic [9:0]        pu_lm_addr = '0;
    logic [31:0]       pu_lm_wdata = '0, pu_lm_rdata;
    dma_cfg_t          pu_cfg = '0;
    logic              pu_start = 1'b0, busy, done_o;
    logic              pu_req_valid = 1'b0, pu_req_ready, pu_req_we = 1'b0;
    acc_t              pu_req_acc = ACC_ROW;
    logic [IW-1:0]     pu_req_i = '0;
    logic [JW-1:0]     pu_req_j = '0;
    logic [RW_DEF-1:0] pu_req_r = 4'd1;
    logic [DW-1:0]     pu_req_wdata [NPE];
    logic              pu_rd_valid;
    logic [DW-1:0]     pu_rd_data [NPE];

    pps_top #(.P(P), .Q(Q), .NMOD(NMOD), .ROWS(ROWS), .COLS(COLS)) dut (
      .clk, .rst_n,
      .pu_lm_en, .pu_lm_we, .pu_lm_addr, .pu_lm_wdata, .pu_lm_rdata,
      .pu_cfg, .pu_start, .busy, .done(done_o),
      .pu_req_valid, .pu_req_ready, .pu_req_we, .pu_req_acc, .pu_req_i, .pu_req_j,
      .pu_req_r, .pu_req_wdata, .pu_rd_valid, .pu_rd_data
    );

    int img [ROWS][COLS];              // reference contents, -1 = not valid
    logic [DW-1:0] last_rd [NPE];
    int nrd = 0;
    always @(posedge clk) if (rst_n && pu_rd_valid) begin last_rd <= pu_rd_data; nrd++; end

    task automatic pu_access(acc_t t, int i, int j, bit we, int vals [NPE]);
      int n0;
      n0 = nrd;
      @(negedge clk);
      pu_req_valid = 1'b1; pu_req_we = we; pu_req_acc = t; pu_req_r = 4'd1;
      pu_req_i = IW'(i); pu_req_j = JW'(j);
      for (int k = 0; k < NPE; k++) pu_req_wdata[k] = DW'(vals[k]);
      @(negedge clk);
      pu_req_valid = 1'b0; pu_req_we = 1'b0;
      if (!we) while (nrd == n0) @(negedge clk);
    endtask

    task automatic load_prog(instr_t prog [$]);
      foreach (prog[n]) begin
        @(negedge clk);
        pu_lm_en = 1'b1; pu_lm_we = 1'b1; pu_lm_addr = 10'(n); pu_lm_wdata = prog[n];
      end
      @(negedge clk);
      pu_lm_en = 1'b0; pu_lm_we = 1'b0;
    endtask

    // one 3 x 3 pass over the valid data in rows src..src+h-1, columns
    // c0..c0+w-1; the result of the window with top-left (a, b) lands at
    // (a + 1 + OFF, b + 1).  Returns the size of the result region.
    task automatic pass(gop_t cond, int init, int src, int h, int c0, int w, string name,
                        output int h_out, output int w_out);
      instr_t prog [$];
      int r1, c1, npos, cyc_busy, vals [NPE];
      morph_prog(cond, init, prog);
      load_prog(prog);
      r1 = src + ((h - 2) / P - 1) * P;       // last block base row
      c1 = c0 + ((w - 2) / Q - 1) * Q;        // last block base column
      h_out = ((h - 2) / P) * P;
      w_out = ((w - 2) / Q) * Q;
      npos = ((r1 - src) / P + 1) * ((c1 - c0) / Q + 1);
      pu_cfg = '0;
      pu_cfg.prog_len = 16'(prog.size());
      pu_cfg.row0 = 16'(src); pu_cfg.row1 = 16'(r1); pu_cfg.step_i = 16'(P);
      pu_cfg.col0 = 16'(c0);  pu_cfg.col1 = 16'(c1); pu_cfg.step_j = 16'(Q);
      pu_cfg.wr_di = 16'(OFF);
      @(negedge clk); pu_start = 1'b1;
      @(negedge clk); pu_start = 1'b0;
      cyc_busy = 1;
      while (busy) begin @(negedge clk); cyc_busy++; end
      checks++;
      if (cyc_busy - 1 != prog.size() + 1 + npos * 80)
        fail($sformatf("%0d PEs %s: %0d cycles for %0d positions", NPE, name, cyc_busy - 1, npos));
      else
        $display("%0d PEs, %s: %0d positions, %0d cycles (%0d load + 80 per position)",
                 NPE, name, npos, cyc_busy - 1, prog.size() + 1);
      // reference and read-back of every result block
      for (int bi = src; bi <= r1; bi += P)
        for (int bj = c0; bj <= c1; bj += Q) begin
          for (int k = 0; k < NPE; k++) begin
            int ci, cj, m;
            ci = bi + k / Q + 1; cj = bj + k % Q + 1;
            m = init;
            for (int a = -1; a <= 1; a++)
              for (int b = -1; b <= 1; b++) begin
                if (img[ci + a][cj + b] < 0) fail($sformatf("%0d PEs %s: window reaches unset data", NPE, name));
                if (cond == G_COND1 ? img[ci + a][cj + b] < m : img[ci + a][cj + b] > m) m = img[ci + a][cj + b];
              end
            img[ci + OFF][cj] = m;
          end
          pu_access(ACC_BLOCK, bi + 1 + OFF, bj + 1, 1'b0, vals);
          for (int k = 0; k < NPE; k++) begin
            checks++;
            if (int'(last_rd[k]) != img[bi + k / Q + 1 + OFF][bj + k % Q + 1])
              fail($sformatf("%0d PEs %s: block (%0d,%0d) element %0d got %0d expected %0d", NPE, name,
                             bi, bj, k, last_rd[k], img[bi + k / Q + 1 + OFF][bj + k % Q + 1]));
          end
        end
    endtask

    initial begin
      int vals [NPE];
      int h1, w1, h2, w2;
      for (int k = 0; k < NPE; k++) pu_req_wdata[k] = '0;
      for (int i = 0; i < ROWS; i++) for (int j = 0; j < COLS; j++) img[i][j] = -1;
      @(posedge rst_n);
      // frame, written with row accesses
      for (int i = 0; i < H; i++)
        for (int j = 0; j < W; j += NPE) begin
          for (int k = 0; k < NPE; k++) begin
            img[i][j + k] = $urandom_range(0, 255);
            vals[k] = img[i][j + k];
          end
          pu_access(ACC_ROW, i, j, 1'b1, vals);
        end
      pass(G_COND1, 256, 0, H, 0, W, "erosion", h1, w1);
      pass(G_COND2, 0, OFF + 1, h1, 1, w1, "dilation", h2, w2);
      done[g] = 1'b1;
    end
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    wait (done.and() == 1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
