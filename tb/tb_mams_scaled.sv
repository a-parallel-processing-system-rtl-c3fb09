// tb_mams_scaled -- the multi-access memory system at other array sizes.
//
// Four further configurations run side by side, each against its own plain
// two-dimensional reference array:
//    16 PEs: P = Q = 4,   17 modules, 128 x 128 array (1 x 16, 16 x 1, 4 x 4);
//     4 PEs: P = Q = 2,    5 modules,  64 x  64 array (1 x 4, 4 x 1, 2 x 2);
//    12 PEs: P = 3, Q = 4, 13 modules, 96 x 100 array (P, Q not powers of two);
//   144 PEs: P = Q = 12, 149 modules, 256 x 256 array.
// Each configuration fills its array with row writes, reads every access type
// at every legal interval, then issues a back-to-back stream of random reads
// and writes (one per cycle) and compares every read, including its latency
// of four cycles.
`timescale 1ns/1ps
module tb_mams_scaled;
  import pps_pkg::*;

  localparam int unsigned DW = DW_DEF, RW = RW_DEF;
  localparam int unsigned NRAND = 20000;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  int checks = 0, failures = 0;
  task automatic fail(string msg);
    failures++;
    if (failures < 20) $display("FAIL: %s", msg);
  endtask

  localparam int NCFG = 4;
  // configuration g, field f: P, Q, NMOD, ROWS, COLS
  function automatic int unsigned cfg(int g, int f);
    int unsigned c [5];
    case (g)
      0:       c = '{ 4,  4,  17, 128, 128};
      1:       c = '{ 2,  2,   5,  64,  64};
      2:       c = '{ 3,  4,  13,  96, 100};
      default: c = '{12, 12, 149, 256, 256};
    endcase
    return c[f];
  endfunction
  bit done [NCFG];

  for (genvar g = 0; g < NCFG; g++) begin : g_cfg
    localparam int unsigned P    = cfg(g, 0);
    localparam int unsigned Q    = cfg(g, 1);
    localparam int unsigned NMOD = cfg(g, 2);
    localparam int unsigned ROWS = cfg(g, 3);
    localparam int unsigned COLS = cfg(g, 4);
    localparam int unsigned NPE  = P * Q;
    localparam int unsigned IW   = $clog2(ROWS), JW = $clog2(COLS);
    localparam int unsigned SIDE = (ROWS < COLS) ? ROWS : COLS;

    logic          req_valid = 1'b0, req_we = 1'b0, req_tag = 1'b0;
    acc_t          req_acc = ACC_ROW;
    logic [IW-1:0] req_i = '0;
    logic [JW-1:0] req_j = '0;
    logic [RW-1:0] req_r = 4'd1;
    logic [DW-1:0] req_wdata [NPE];
    logic          rd_valid, rd_tag;
    logic [DW-1:0] rd_data [NPE];

    mams #(.P(P), .Q(Q), .NMOD(NMOD), .ROWS(ROWS), .COLS(COLS)) dut (.*);

    logic [DW-1:0]     refm [ROWS][COLS];
    logic [NPE*DW-1:0] exp_q [$];   // element k in bits [k*DW +: DW]
    longint            exp_t [$];

    function automatic void elem(acc_t t, int i, int j, int r, int k, output int ei, output int ej);
      case (t)
        ACC_ROW: begin ei = i;                ej = j + k * r;       end
        ACC_COL: begin ei = i + k * r;        ej = j;               end
        default: begin ei = i + (k / Q) * r;  ej = j + (k % Q) * r; end
      endcase
    endfunction

    always @(posedge clk) if (rst_n) begin
      if (rd_valid) begin
        checks++;
        if (exp_q.size() == 0) fail($sformatf("%0d PEs: unexpected read data", NPE));
        else begin
          logic [NPE*DW-1:0] e;
          longint t0;
          e  = exp_q.pop_front();
          t0 = exp_t.pop_front();
          if (cyc - t0 != 4) fail($sformatf("%0d PEs: read latency %0d", NPE, cyc - t0));
          for (int k = 0; k < NPE; k++)
            if (rd_data[k] !== e[k*DW +: DW]) begin
              fail($sformatf("%0d PEs: element %0d got %0h expected %0h", NPE, k, rd_data[k], e[k*DW +: DW]));
              break;
            end
        end
      end
    end

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

    // random legal access; the interval is limited so that the pattern fits
    task automatic rand_access(bit we);
      acc_t t;
      int r, i, j, spi, spj;
      t = acc_t'($urandom_range(0, 2));
      do r = $urandom_range(1, (t == ACC_BLOCK || (SIDE - 1) / (NPE - 1) > 15) ? 15 : (SIDE - 1) / (NPE - 1));
      while (r % NMOD == 0);
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
      @(posedge rst_n);
      @(negedge clk);
      // fill; the last write of a row is moved left to end at the last column
      for (int i = 0; i < ROWS; i++)
        for (int j = 0; j < COLS; j += NPE) begin
          issue(ACC_ROW, i, (j + NPE <= COLS) ? j : COLS - NPE, 1, 1'b1);
          @(negedge clk);
        end
      // every type at every interval that fits the array
      for (int t = 0; t < 3; t++)
        for (int r = 1; r < 2 ** RW; r++) begin
          if (r % NMOD == 0) continue;
          if (t != int'(ACC_BLOCK) && (NPE - 1) * r >= SIDE) continue;
          issue(acc_t'(t), 0, 0, r, 1'b0);
          @(negedge clk);
        end
      for (int n = 0; n < NRAND; n++) begin
        if ($urandom_range(0, 9) == 0) begin req_valid = 1'b0; req_we = 1'b0; end
        else rand_access($urandom_range(0, 2) == 0);
        @(negedge clk);
      end
      req_valid = 1'b0; req_we = 1'b0;
      repeat (8) @(negedge clk);
      checks++;
      if (exp_q.size() != 0) fail($sformatf("%0d PEs: %0d reads never returned", NPE, exp_q.size()));
      $display("%0d PEs, %0d modules: stream done", NPE, NMOD);
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
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
