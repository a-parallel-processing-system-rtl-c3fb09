// tb_facial_features -- workload testbench: mesh features of a face region.
//
// A 48 x 48 normalised region of binary pixels (0 or 1) sits in rows 0..47 of
// the default-size system.  Two programs of row accesses with a constant
// interval compute one feature per mesh, each PE taking one mesh of a row of
// eight meshes:
//   3 x 3 meshes, interval 3: nine READs (offsets 0..2, 0..2) accumulated with
//     ADD, result written with the same interval to rows 144.. -> 16 x 16 map;
//   comparison with a stored map: d = |f2 - f2'| by READ, ADD, SUB, ABS with
//     interval 3 (26 cycles per position);
//   6 x 6 meshes, interval 6: four READs of the 3 x 3 map (offsets 0 and 3)
//     written with interval 6 to rows 288.. -> 8 x 8 map.
// Results are compared with mesh sums computed here, and each run must take
// the program load time plus 80 (3 x 3) or 40 (6 x 6) cycles per position.
`timescale 1ns/1ps
module tb_facial_features;
  import pps_pkg::*;

  localparam int unsigned NPE = P_DEF * Q_DEF, DW = DW_DEF;
  localparam int unsigned IW = $clog2(ROWS_DEF), JW = $clog2(COLS_DEF);
  localparam int H = 48, W = 48;       // normalised face region
  localparam int DST = 144;            // 3 x 3 feature map rows start here
  localparam int DST2 = 288;           // 6 x 6 feature map rows start here
  int wr_off = DST;                    // row offset of WRITE accesses
  int wr_r = 1;                        // interval of processor row writes
  int db [16][16];                     // stored 3 x 3 feature map of a database face

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
  int c_intv = 0, c_refused = 0, c_overlap = 0, c_pool = 0;
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
    if (dut.u_dma.loading && dut.lm_en) c_pool++;
  end

  task automatic fail(string msg);
    failures++;
    if (failures < 20) $display("FAIL: %s", msg);
  endtask

  // ---- processor unit actions ----
  task automatic pu_write_row(int i, int j, int vals [NPE]);
    @(negedge clk);
    pu_req_valid = 1'b1; pu_req_we = 1'b1; pu_req_acc = ACC_ROW; pu_req_r = 4'(wr_r);
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
    pu_cfg.wr_di = 16'(wr_off); pu_cfg.wr_dj = 16'sd0;
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

  function automatic instr_t mkr(mop_t m, int r, int dy, int dx, gop_t g, int imm);
    instr_t x;
    x = mk(m, ACC_ROW, dy, dx, g, imm);
    x.intv = 4'(r);
    return x;
  endfunction

  // 3 x 3 mesh sums: nine reads with interval 3, ADD, row write with interval 3.
  // Mesh (mi,mj) lands at (DST + 3*mi, 3*mj).
  function automatic void mesh3_prog(ref instr_t prog [$]);
    prog.delete();
    for (int n = 0; n < 9; n++)
      prog.push_back(mkr(MOP_READ, 3, n / 3, n % 3, (n == 0) ? G_VALTRAN : G_ADD, 0));
    prog.push_back(mkr(MOP_NOP, 3, 0, 0, G_ADD, 0));
    prog.push_back(mkr(MOP_WRITE, 3, 0, 0, G_NOP, 0));
  endfunction

  // 6 x 6 mesh sums from the 3 x 3 map: four reads with interval 6 at offsets
  // 0 and 3, row write with interval 6.  Mesh (Mi,Mj) lands at (DST2 + 6*Mi, 6*Mj).
  function automatic void mesh6_prog(ref instr_t prog [$]);
    prog.delete();
    for (int n = 0; n < 4; n++)
      prog.push_back(mkr(MOP_READ, 6, 3 * (n / 2), 3 * (n % 2), (n == 0) ? G_VALTRAN : G_ADD, 0));
    prog.push_back(mkr(MOP_NOP, 6, 0, 0, G_ADD, 0));
    prog.push_back(mkr(MOP_WRITE, 6, 0, 0, G_NOP, 0));
  endfunction

  // comparison with the database map stored one row below the 3 x 3 map:
  // d = |f2 - f2'| written two rows below it, all with interval 3
  function automatic void cmp_prog(ref instr_t prog [$]);
    prog.delete();
    prog.push_back(mkr(MOP_READ,  3, 0, 0, G_VALTRAN, 0));
    prog.push_back(mkr(MOP_READ,  3, 1, 0, G_ADD, 0));
    prog.push_back(mkr(MOP_NOP,   3, 0, 0, G_SUB, 0));
    prog.push_back(mkr(MOP_NOP,   3, 0, 0, G_ABS, 0));
    prog.push_back(mkr(MOP_WRITE, 3, 2, 0, G_NOP, 0));
  endfunction

  task automatic check_mesh(int m, int base);
    for (int mi = 0; mi < H / m; mi++)
      for (int j0 = 0; j0 < W; j0 += NPE * m) begin
        pu_read(ACC_ROW, base + mi * m, j0, m);
        for (int k = 0; k < NPE; k++) begin
          int sum, mj;
          mj = j0 / m + k;
          sum = 0;
          for (int a = 0; a < m; a++) for (int b = 0; b < m; b++) sum += img[mi * m + a][mj * m + b];
          checks++;
          if (int'(last_rd[k]) != sum) fail($sformatf("mesh %0d (%0d,%0d): got %0d expected %0d", m, mi, mj, last_rd[k], sum));
        end
      end
  endtask

  initial begin
    instr_t prog [$];
    int vals [NPE];
    for (int n = 0; n < 10; n++) c_op[n] = 0;
    for (int k = 0; k < NPE; k++) pu_req_wdata[k] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < H; i++)
      for (int j = 0; j < W; j += NPE) begin
        for (int k = 0; k < NPE; k++) begin
          img[i][j + k] = $urandom_range(0, 1);
          vals[k] = img[i][j + k];
        end
        pu_write_row(i, j, vals);
      end

    mesh3_prog(prog);
    load_prog(prog);
    wr_off = DST;
    run(prog.size(), 0, H - 3, 3, 0, W - 24, 24, 80, "3x3 meshes, interval 3");
    check_mesh(3, DST);

    // database map, written by the processor unit with interval 3
    wr_r = 3;
    for (int mi = 0; mi < 16; mi++)
      for (int j0 = 0; j0 < W; j0 += NPE * 3) begin
        for (int k = 0; k < NPE; k++) begin
          db[mi][j0 / 3 + k] = $urandom_range(0, 9);
          vals[k] = db[mi][j0 / 3 + k];
        end
        pu_write_row(DST + 1 + 3 * mi, j0, vals);
      end
    wr_r = 1;
    cmp_prog(prog);
    load_prog(prog);
    wr_off = 0;
    run(prog.size(), DST, DST + H - 3, 3, 0, W - 24, 24, 26, "f2 comparison, interval 3");
    for (int mi = 0; mi < 16; mi++)
      for (int j0 = 0; j0 < W; j0 += NPE * 3) begin
        pu_read(ACC_ROW, DST + 2 + 3 * mi, j0, 3);
        for (int k = 0; k < NPE; k++) begin
          int f, mj;
          mj = j0 / 3 + k;
          f = 0;
          for (int a = 0; a < 3; a++) for (int b = 0; b < 3; b++) f += img[mi * 3 + a][mj * 3 + b];
          checks++;
          if (int'(last_rd[k]) != ((f > db[mi][mj]) ? f - db[mi][mj] : db[mi][mj] - f))
            fail($sformatf("d2 (%0d,%0d): got %0d, f2 %0d, stored %0d", mi, mj, last_rd[k], f, db[mi][mj]));
        end
      end

    mesh6_prog(prog);
    load_prog(prog);
    wr_off = DST2 - DST;
    run(prog.size(), DST, DST + H - 6, 6, 0, 0, 48, 40, "6x6 meshes, interval 6");
    check_mesh(6, DST2);

    checks++; if (c_intv == 0) fail("no access with interval above 1");
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
