// tb_pps_cif -- workload testbench: morphological filters on a CIF frame.
//
// Runs the default-size system on a random CIF (352 x 288) frame held in rows
// 0..287 of the array and writes results to rows 288..575: 3x3 erosion, 3x3
// dilation and 5x5 erosion, each over every block position whose window lies
// inside the frame.  Results are compared with reference filters; each run
// must take the program load time plus 80 (3x3) or 208 (5x5) cycles per
// block position.  It also prints
// the time a full frame of 2 x 4 blocks would take at a 30 ns clock.
`timescale 1ns/1ps
module tb_pps_cif;
  import pps_pkg::*;

  localparam int unsigned NPE = P_DEF * Q_DEF, DW = DW_DEF;
  localparam int unsigned IW = $clog2(ROWS_DEF), JW = $clog2(COLS_DEF);
  localparam int H = 288, W = 352;     // CIF frame
  localparam int DST = 288;            // result rows start here

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic             pu_lm_en = 1'b0, pu_lm_we = 1'b0;
  logic [9:0]       pu_lm_addr = '0;
  logic [31:0]      pu_lm_wdata = '0, pu_lm_rdata;
  dma_cfg_t         pu_cfg = '0;
  logic             pu_start = 1'b0, busy, done;
  logic             pu_req_valid = 1'b0, pu_req_ready, pu_req_we = 1'b0;
  acc_t             pu_req_acc = ACC_ROW;
  logic [IW-1:0]    pu_req_i = '0;
  logic [JW-1:0]    pu_req_j = '0;
  logic [RW_DEF-1:0] pu_req_r = 4'd1;
  logic [DW-1:0]    pu_req_wdata [NPE];
  logic             pu_rd_valid;
  logic [DW-1:0]    pu_rd_data [NPE];

  pps_top dut (.*);

  int checks = 0, failures = 0;
  int img [H][W];
  int res [H][W];
  logic [DW-1:0] last_rd [NPE];
  int nrd = 0;

  // mechanism counters
  int c_blk_rd = 0, c_blk_wr = 0, c_row_rd = 0, c_row_wr = 0, c_col_rd = 0;
  int c_intv = 0, c_refused = 0, c_overlap = 0;
  int c_op [10];

  always @(posedge clk) if (rst_n) begin
    if (pu_rd_valid) begin last_rd <= pu_rd_data; nrd++; end
    if (dut.m_valid) begin
      if (dut.m_acc == ACC_BLOCK &&  dut.m_we) c_blk_wr++;
      if (dut.m_acc == ACC_BLOCK && !dut.m_we) c_blk_rd++;
      if (dut.m_acc == ACC_ROW   &&  dut.m_we) c_row_wr++;
      if (dut.m_acc == ACC_ROW   && !dut.m_we) c_row_rd++;
      if (dut.m_acc == ACC_COL   && !dut.m_we) c_col_rd++;
      if (dut.m_r > 1) c_intv++;
    end
    if (dut.gen_valid) begin
      c_op[dut.gen_op]++;
      if (dut.gen_op != G_NOP && dut.u_dma.ir.mop != MOP_NOP) c_overlap++;
    end
    if (pu_req_valid && !pu_req_ready) c_refused++;
  end

  task automatic fail(string msg);
    failures++;
    if (failures < 20) $display("FAIL: %s", msg);
  endtask

  // ---- processor unit actions ----
  task automatic pu_write_row(int i, int j, int vals [NPE]);
    @(negedge clk);
    pu_req_valid = 1'b1; pu_req_we = 1'b1; pu_req_acc = ACC_ROW; pu_req_r = 4'd1;
    pu_req_i = IW'(i); pu_req_j = JW'(j);
    for (int k = 0; k < NPE; k++) pu_req_wdata[k] = DW'(vals[k]);
    @(negedge clk);
    pu_req_valid = 1'b0; pu_req_we = 1'b0;
  endtask

  task automatic pu_read(acc_t t, int i, int j, int r);
    int n0;
    n0 = nrd;
    @(negedge clk);
    pu_req_valid = 1'b1; pu_req_we = 1'b0; pu_req_acc = t; pu_req_r = 4'(r);
    pu_req_i = IW'(i); pu_req_j = JW'(j);
    @(negedge clk);
    pu_req_valid = 1'b0;
    while (nrd == n0) @(negedge clk);
  endtask

  task automatic load_prog(instr_t prog [$]);
    foreach (prog[n]) begin
      @(negedge clk);
      pu_lm_en = 1'b1; pu_lm_we = 1'b1; pu_lm_addr = 10'(n); pu_lm_wdata = prog[n];
    end
    @(negedge clk);
    pu_lm_en = 1'b0; pu_lm_we = 1'b0;
    // read back one word through the processor port
    @(negedge clk); pu_lm_en = 1'b1; pu_lm_addr = '0;
    @(negedge clk); pu_lm_en = 1'b0;
    checks++;
    if (pu_lm_rdata !== 32'(prog[0])) fail("local memory read-back");
  endtask

  // run the loaded program over the raster and check the cycle count
  task automatic run(int len, int r0, int r1, int si, int c0, int c1, int sj, int slot_cycles, string name);
    int npos, cyc_busy;
    bit tried;
    pu_cfg = '0;
    pu_cfg.prog_base = 16'd0; pu_cfg.prog_len = 16'(len);
    pu_cfg.row0 = 16'(r0); pu_cfg.row1 = 16'(r1); pu_cfg.step_i = 16'(si);
    pu_cfg.col0 = 16'(c0); pu_cfg.col1 = 16'(c1); pu_cfg.step_j = 16'(sj);
    pu_cfg.wr_di = 16'(DST); pu_cfg.wr_dj = 16'sd0;
    npos = ((r1 - r0) / si + 1) * ((c1 - c0) / sj + 1);
    @(negedge clk); pu_start = 1'b1;
    @(negedge clk); pu_start = 1'b0;
    cyc_busy = 1;
    tried = 0;
    while (busy) begin
      // the processor unit tries to use the memory while the DMA controller owns it
      if (!tried && cyc_busy == 100) begin
        pu_req_valid = 1'b1; pu_req_we = 1'b1; pu_req_acc = ACC_ROW;
        pu_req_i = IW'(0); pu_req_j = JW'(0);
        for (int k = 0; k < NPE; k++) pu_req_wdata[k] = 8'hA5;
        tried = 1;
      end else pu_req_valid = 1'b0;
      @(negedge clk);
      cyc_busy++;
    end
    pu_req_valid = 1'b0;
    checks++;
    // program load into the register pool (len + 1 cycles), then the slots
    if (cyc_busy - 1 != len + 1 + npos * slot_cycles)
      fail($sformatf("%s: %0d cycles for %0d positions, expected %0d", name, cyc_busy - 1, npos, len + 1 + npos * slot_cycles));
    else
      $display("%s: %0d positions, %0d cycles (%0d load + %0d per position)", name, npos, cyc_busy - 1, len + 1, slot_cycles);
  endtask

  // compare result rows DST.. with res[][] over [i0..i1] x [j0..j1]
  task automatic check_result(int i0, int i1, int j0, int j1, string name);
    int bad;
    bad = 0;
    for (int i = i0; i <= i1; i++)
      for (int j = j0; j + NPE - 1 <= j1; j += NPE) begin
        pu_read(ACC_ROW, DST + i, j, 1);
        for (int k = 0; k < NPE; k++) begin
          checks++;
          if (int'(last_rd[k]) != res[i][j + k]) begin
            bad++;
            if (bad < 5) fail($sformatf("%s (%0d,%0d): got %0d expected %0d", name, i, j + k, last_rd[k], res[i][j + k]));
            else failures++;
          end
        end
      end
  endtask

  function automatic instr_t mk(mop_t m, acc_t a, int dy, int dx, gop_t g, int imm);
    instr_t x;
    x = '0;
    x.mop = m; x.acc = a; x.intv = 4'd1;
    x.dy = 4'(dy); x.dx = 4'(dx); x.gop = g; x.imm = 12'(imm);
    return x;
  endfunction

  // morphological program: first read VALTRAN init, later reads COND, one
  // trailing COND, write at the window centre
  function automatic void morph_prog(int se, gop_t cond, int init, ref instr_t prog [$]);
    prog.delete();
    for (int n = 0; n < se * se; n++)
      prog.push_back(mk(MOP_READ, ACC_BLOCK, n / se, n % se, (n == 0) ? G_VALTRAN : cond, init));
    prog.push_back(mk(MOP_NOP, ACC_BLOCK, 0, 0, cond, 0));
    prog.push_back(mk(MOP_WRITE, ACC_BLOCK, se / 2, se / 2, G_NOP, 0));
  endfunction

  initial begin
    instr_t prog [$];
    int vals [NPE];
    for (int n = 0; n < 10; n++) c_op[n] = 0;
    for (int k = 0; k < NPE; k++) pu_req_wdata[k] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    // ---- load the frame ----
    for (int i = 0; i < H; i++)
      for (int j = 0; j < W; j += NPE) begin
        for (int k = 0; k < NPE; k++) begin
          img[i][j + k] = $urandom_range(0, 255);
          vals[k] = img[i][j + k];
        end
        pu_write_row(i, j, vals);
      end

    // ---- 3x3 erosion ----
    morph_prog(3, G_COND1, 256, prog);
    load_prog(prog);
    run(prog.size(), 0, H - 4, 2, 0, W - 6, 4, 80, "erosion 3x3");
    for (int i = 1; i <= H - 2; i++)
      for (int j = 1; j <= W - 2; j++) begin
        int m; m = 256;
        for (int a = -1; a <= 1; a++) for (int b = -1; b <= 1; b++) if (img[i + a][j + b] < m) m = img[i + a][j + b];
        res[i][j] = m;
      end
    check_result(1, H - 2, 1, W - 3, "erosion 3x3");
    checks++;
    if (c_refused == 0) fail("processor request during a run was not refused");
    // the refused write at (0,0) must not have reached the memory
    pu_read(ACC_ROW, 0, 0, 1);
    checks++;
    if (int'(last_rd[0]) != img[0][0]) fail("refused request reached the memory");

    // ---- 3x3 dilation ----
    morph_prog(3, G_COND2, 0, prog);
    load_prog(prog);
    run(prog.size(), 0, H - 4, 2, 0, W - 6, 4, 80, "dilation 3x3");
    for (int i = 1; i <= H - 2; i++)
      for (int j = 1; j <= W - 2; j++) begin
        int m; m = 0;
        for (int a = -1; a <= 1; a++) for (int b = -1; b <= 1; b++) if (img[i + a][j + b] > m) m = img[i + a][j + b];
        res[i][j] = m;
      end
    check_result(1, H - 2, 1, W - 3, "dilation 3x3");

    // ---- 5x5 erosion ----
    morph_prog(5, G_COND1, 256, prog);
    load_prog(prog);
    run(prog.size(), 0, H - 6, 2, 0, W - 8, 4, 208, "erosion 5x5");
    for (int i = 2; i <= H - 3; i++)
      for (int j = 2; j <= W - 3; j++) begin
        int m; m = 256;
        for (int a = -2; a <= 2; a++) for (int b = -2; b <= 2; b++) if (img[i + a][j + b] < m) m = img[i + a][j + b];
        res[i][j] = m;
      end
    check_result(2, H - 3, 2, W - 3, "erosion 5x5");

    $display("full CIF frame: %0d blocks x 80 cycles x 30 ns = %0d ns (3x3), x 208 cycles = %0d ns (5x5)",
             (H / 2) * (W / 4), (H / 2) * (W / 4) * 80 * 30, (H / 2) * (W / 4) * 208 * 30);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (12000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
