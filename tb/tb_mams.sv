// tb_mams -- self-checking testbench of the multi-access memory system.
//
// Fills the whole default-size array through row writes, checks that each
// element sits in module (i*Q+j) mod NMOD at word (i/P)*S + j/Q, then issues a
// back-to-back stream of random row, column and block reads and writes with
// random intervals (one request per cycle) and compares every read with a
// plain two-dimensional reference array.  Also checks the read latency of
// four cycles and the write-then-read ordering.
`timescale 1ns/1ps
module tb_mams;
  import pps_pkg::*;

  localparam int unsigned P = P_DEF, Q = Q_DEF, NMOD = NMOD_DEF;
  localparam int unsigned ROWS = ROWS_DEF, COLS = COLS_DEF, DW = DW_DEF, RW = RW_DEF;
  localparam int unsigned NPE = P * Q;
  localparam int unsigned IW = $clog2(ROWS), JW = $clog2(COLS);
  localparam int unsigned S = (COLS + Q - 1) / Q;
  localparam int unsigned NRAND = 30000;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic          req_valid = 1'b0, req_we = 1'b0, req_tag = 1'b0;
  acc_t          req_acc = ACC_ROW;
  logic [IW-1:0] req_i = '0;
  logic [JW-1:0] req_j = '0;
  logic [RW-1:0] req_r = 4'd1;
  logic [DW-1:0] req_wdata [NPE];
  logic          rd_valid, rd_tag;
  logic [DW-1:0] rd_data [NPE];

  mams dut (.*);

  int checks = 0, failures = 0;
  logic [DW-1:0] refm [ROWS][COLS];

  // expected reads: data and issue cycle
  logic [NPE*DW-1:0] exp_q [$];   // element k in bits [k*DW +: DW]
  longint        exp_t [$];
  longint        cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic fail(string msg);
    failures++;
    if (failures < 20) $display("FAIL: %s", msg);
  endtask

  function automatic void elem(acc_t t, int i, int j, int r, int k, output int ei, output int ej);
    case (t)
      ACC_ROW: begin ei = i;                ej = j + k * r;       end
      ACC_COL: begin ei = i + k * r;        ej = j;               end
      default: begin ei = i + (k / Q) * r;  ej = j + (k % Q) * r; end
    endcase
  endfunction

  // read checker
  always @(posedge clk) if (rst_n) begin
    if (rd_valid) begin
      checks++;
      if (exp_q.size() == 0) fail("unexpected read data");
      else begin
        logic [NPE*DW-1:0] e;
        longint t0;
        e  = exp_q.pop_front();
        t0 = exp_t.pop_front();
        if (cyc - t0 != 4) fail($sformatf("read latency %0d, expected 4", cyc - t0));
        for (int k = 0; k < NPE; k++)
          if (rd_data[k] !== e[k*DW +: DW]) begin
            fail($sformatf("read element %0d: got %0h expected %0h", k, rd_data[k], e[k*DW +: DW]));
            break;
          end
        if (!rd_tag) fail("tag lost");
      end
    end
  end

  // issue one access in the current cycle (call after a negedge)
  task automatic issue(acc_t t, int i, int j, int r, bit we);
    int ei, ej;
    req_valid = 1'b1; req_we = we; req_acc = t; req_tag = 1'b1;
    req_i = IW'(i); req_j = JW'(j); req_r = RW'(r);
    if (we) begin
      for (int k = 0; k < NPE; k++) begin
        req_wdata[k] = DW'($urandom);
        elem(t, i, j, r, k, ei, ej);
        refm[ei][ej] = req_wdata[k];
      end
    end else begin
      logic [NPE*DW-1:0] e;
      for (int k = 0; k < NPE; k++) begin
        elem(t, i, j, r, k, ei, ej);
        e[k*DW +: DW] = refm[ei][ej];
      end
      exp_q.push_back(e);
      exp_t.push_back(cyc);
    end
  endtask

  task automatic idle();
    req_valid = 1'b0; req_we = 1'b0;
  endtask

  // random legal access
  task automatic rand_access(bit we);
    acc_t t;
    int r, i, j, spi, spj;
    t = acc_t'($urandom_range(0, 2));
    do r = $urandom_range(1, 2 ** RW - 1); while (r % NMOD == 0);
    case (t)
      ACC_ROW: begin spi = 0;             spj = (NPE - 1) * r; end
      ACC_COL: begin spi = (NPE - 1) * r; spj = 0;             end
      default: begin spi = (P - 1) * r;   spj = (Q - 1) * r;   end
    endcase
    i = $urandom_range(0, ROWS - 1 - spi);
    j = $urandom_range(0, COLS - 1 - spj);
    issue(t, i, j, r, we);
  endtask

  initial begin
    for (int k = 0; k < NPE; k++) req_wdata[k] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    // fill: row writes, interval 1
    for (int i = 0; i < ROWS; i++)
      for (int j = 0; j + NPE <= COLS; j += NPE) begin
        issue(ACC_ROW, i, j, 1, 1'b1);
        @(negedge clk);
      end
    idle();
    repeat (4) @(negedge clk);
    // placement check against the assignment functions
    for (int i = 0; i < ROWS; i += 7)
      for (int j = 0; j < COLS; j += 3) begin
        int mu, a;
        mu = (i * Q + j) % NMOD;
        a  = (i / P) * S + j / Q;
        checks++;
        case (mu)
          0: if (dut.g_mod[0].u_mem.mem[a] !== refm[i][j]) fail($sformatf("placement (%0d,%0d)", i, j));
          1: if (dut.g_mod[1].u_mem.mem[a] !== refm[i][j]) fail($sformatf("placement (%0d,%0d)", i, j));
          2: if (dut.g_mod[2].u_mem.mem[a] !== refm[i][j]) fail($sformatf("placement (%0d,%0d)", i, j));
          3: if (dut.g_mod[3].u_mem.mem[a] !== refm[i][j]) fail($sformatf("placement (%0d,%0d)", i, j));
          4: if (dut.g_mod[4].u_mem.mem[a] !== refm[i][j]) fail($sformatf("placement (%0d,%0d)", i, j));
          5: if (dut.g_mod[5].u_mem.mem[a] !== refm[i][j]) fail($sformatf("placement (%0d,%0d)", i, j));
          6: if (dut.g_mod[6].u_mem.mem[a] !== refm[i][j]) fail($sformatf("placement (%0d,%0d)", i, j));
          7: if (dut.g_mod[7].u_mem.mem[a] !== refm[i][j]) fail($sformatf("placement (%0d,%0d)", i, j));
          8: if (dut.g_mod[8].u_mem.mem[a] !== refm[i][j]) fail($sformatf("placement (%0d,%0d)", i, j));
          9: if (dut.g_mod[9].u_mem.mem[a] !== refm[i][j]) fail($sformatf("placement (%0d,%0d)", i, j));
          default: if (dut.g_mod[10].u_mem.mem[a] !== refm[i][j]) fail($sformatf("placement (%0d,%0d)", i, j));
        endcase
      end
    // directed: every type and interval, read after the fill
    for (int t = 0; t < 3; t++)
      for (int r = 1; r < 2 ** RW; r++) begin
        if (r % NMOD == 0) continue;
        issue(acc_t'(t), 1, 3, r, 1'b0);
        @(negedge clk);
      end
    // write immediately followed by a read of the same elements
    issue(ACC_BLOCK, 10, 10, 1, 1'b1); @(negedge clk);
    issue(ACC_BLOCK, 10, 10, 1, 1'b0); @(negedge clk);
    // random mixed stream, one request per cycle, occasional idle cycles
    for (int n = 0; n < NRAND; n++) begin
      if ($urandom_range(0, 9) == 0) idle();
      else rand_access($urandom_range(0, 2) == 0);
      @(negedge clk);
    end
    idle();
    repeat (8) @(negedge clk);
    checks++;
    if (exp_q.size() != 0) fail($sformatf("%0d reads never returned", exp_q.size()));
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
