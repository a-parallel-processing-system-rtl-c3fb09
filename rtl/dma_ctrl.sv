// dma_ctrl -- DMA controller: instruction sequencer of the SIMD array.
//
// Runs one application: a program of prog_len instruction pairs in local
// memory, applied once at every block base position (bi, bj) of a raster
// bi = row0, row0+step_i, .. <= row1 ; bj = col0, col0+step_j, .. <= col1
// (bj runs fastest).  The processor unit writes the register set (cfg) and
// pulses start; busy stays high until the last pair of the last position
// ends, when done pulses for one cycle.
//
// After start the controller first copies the program from local memory into
// its register pool (POOL pairs at most), one pair per cycle: prog_len + 1
// cycles.  It then issues from the pool.  Each pair occupies one slot.  Slot
// cycle 0 fetches the pair from the pool.  Cycle 1 decodes it: the general
// instruction is broadcast to all PEs (gen_valid) and executed at the end of
// the cycle, the PEs latch AC for a WRITE (wr_latch), and the element address
// (bi+dy, bj+dx) -- plus (wr_di, wr_dj) for a WRITE -- is registered.  Cycle 2
// presents the memory-reference instruction to the multi-access memory.  Read
// data come back through the memory four cycles later (cycle 6) and the PEs
// load them at its end.  The slot lasts T_READ, T_WRITE or T_GEN cycles for a
// READ, a WRITE or no memory access; the next pair is fetched right after,
// and the next base position starts with no gap.  The general instruction of
// a pair therefore uses the data of the previous READ, as the document's
// erosion and dilation programs expect.
// The register pool and the slot lengths 8, 6 and 2 (the document's clock
// counts for a read cycle, a write cycle and a conditional operation) follow
// the document; the pool size, the raster loop, the register set and the
// write offset are this design's choices.
module dma_ctrl
  import pps_pkg::*;
#(
  parameter int unsigned T_READ  = 8,
  parameter int unsigned T_WRITE = 6,
  parameter int unsigned T_GEN   = 2,
  parameter int unsigned POOL    = 32,
  parameter int unsigned LM_AW   = 10,
  parameter int unsigned IW      = 10,
  parameter int unsigned JW      = 9,
  parameter int unsigned RW      = RW_DEF
) (
  input  logic             clk,
  input  logic             rst_n,
  input  dma_cfg_t         cfg,
  input  logic             start,
  output logic             busy,
  output logic             done,
  // local memory fetch port
  output logic             lm_en,
  output logic [LM_AW-1:0] lm_addr,
  input  logic [31:0]      lm_rdata,
  // PEs
  output logic             gen_valid,
  output gop_t             gen_op,
  output logic [11:0]      gen_imm,
  output logic             wr_latch,
  // multi-access memory request
  output logic             mreq_valid,
  output logic             mreq_we,
  output acc_t             mreq_acc,
  output logic [IW-1:0]    mreq_i,
  output logic [JW-1:0]    mreq_j,
  output logic [RW-1:0]    mreq_r
);
  initial begin
    assert (T_GEN >= 2 && T_WRITE >= 5 && T_READ >= 7)
      else $error("dma_ctrl: slot too short for the memory pipeline");
  end

  a_pool: assert property (@(posedge clk) disable iff (!rst_n)
    (start && !busy) |-> (cfg.prog_len >= 16'd1 && cfg.prog_len <= 16'(POOL)))
    else $error("dma_ctrl: program length %0d outside 1..%0d", cfg.prog_len, POOL);

  dma_cfg_t    cfg_r;
  logic [15:0] bi, bj, pc;
  logic [3:0]  cnt;
  instr_t      ir;
  localparam int unsigned PW = (POOL > 1) ? $clog2(POOL) : 1;
  instr_t      pool [POOL];
  logic        loading;
  logic [15:0] ld_n;
  logic [3:0]  slot_last;
  logic        slot_end;

  always_comb begin
    case (ir.mop)
      MOP_READ:  slot_last = 4'(T_READ - 1);
      MOP_WRITE: slot_last = 4'(T_WRITE - 1);
      default:   slot_last = 4'(T_GEN - 1);
    endcase
    slot_end = busy && !loading && (cnt != 4'd0) && (cnt == slot_last);
  end

  // program load into the register pool
  assign lm_en   = busy && loading && (ld_n < cfg_r.prog_len);
  assign lm_addr = LM_AW'(cfg_r.prog_base + ld_n);

  // decode: broadcast to PEs
  assign gen_valid = busy && !loading && (cnt == 4'd1);
  assign gen_op    = ir.gop;
  assign gen_imm   = ir.imm;
  assign wr_latch  = gen_valid && (ir.mop == MOP_WRITE);

  // element address of the memory-reference instruction
  logic signed [17:0] ai, aj;
  always_comb begin
    ai = $signed({2'b00, bi}) + 18'(ir.dy);
    aj = $signed({2'b00, bj}) + 18'(ir.dx);
    if (ir.mop == MOP_WRITE) begin
      ai = ai + 18'(cfg_r.wr_di);
      aj = aj + 18'(cfg_r.wr_dj);
    end
  end

  logic last_pc, last_col, last_row;
  assign last_pc  = (pc + 16'd1 >= cfg_r.prog_len);
  assign last_col = (17'(bj) + 17'(cfg_r.step_j) > 17'(cfg_r.col1));
  assign last_row = (17'(bi) + 17'(cfg_r.step_i) > 17'(cfg_r.row1));

  // register pool: written during the load phase, one pair per cycle
  logic [15:0] ld_prev;
  assign ld_prev = ld_n - 16'd1;
  always_ff @(posedge clk) begin
    if (busy && loading && ld_n != 16'd0) pool[PW'(ld_prev)] <= instr_t'(lm_rdata);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0; done <= 1'b0; cfg_r <= '0;
      bi <= '0; bj <= '0; pc <= '0; cnt <= '0; ir <= '0;
      loading <= 1'b0; ld_n <= '0;
      mreq_valid <= 1'b0; mreq_we <= 1'b0; mreq_acc <= ACC_ROW;
      mreq_i <= '0; mreq_j <= '0; mreq_r <= '0;
    end else begin
      done       <= 1'b0;
      mreq_valid <= 1'b0;
      if (!busy) begin
        if (start) begin
          busy    <= 1'b1;
          loading <= 1'b1;
          ld_n    <= '0;
          cfg_r   <= cfg;
          bi    <= cfg.row0;
          bj    <= cfg.col0;
          pc    <= '0;
          cnt   <= '0;
        end
      end else if (loading) begin
        if (ld_n == cfg_r.prog_len) loading <= 1'b0;
        else                        ld_n    <= ld_n + 16'd1;
      end else begin
        if (cnt == 4'd0) ir <= pool[PW'(pc)];   // fetch from the register pool
        if (cnt == 4'd1) begin
          mreq_valid <= (ir.mop == MOP_READ) || (ir.mop == MOP_WRITE);
          mreq_we    <= (ir.mop == MOP_WRITE);
          mreq_acc   <= ir.acc;
          mreq_i     <= IW'(ai);
          mreq_j     <= JW'(aj);
          mreq_r     <= RW'(ir.intv);
        end
        if (slot_end) begin
          cnt <= '0;
          if (!last_pc) begin
            pc <= pc + 16'd1;
          end else begin
            pc <= '0;
            if (!last_col) begin
              bj <= bj + cfg_r.step_j;
            end else begin
              bj <= cfg_r.col0;
              if (!last_row) begin
                bi <= bi + cfg_r.step_i;
              end else begin
                busy <= 1'b0;
                done <= 1'b1;
              end
            end
          end
        end else begin
          cnt <= cnt + 4'd1;
        end
      end
    end
  end

endmodule
