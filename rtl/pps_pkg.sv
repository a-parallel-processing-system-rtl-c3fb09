// pps_pkg -- shared types, default sizes and access-pattern arithmetic of the
// parallel processing system (SIMD array of PEs behind a multi-access memory).
//
// The memory system stores an image I(i,j) in NMOD memory modules so that
// pq = P*Q elements of one of three shapes can be reached in a single access:
//   ROW   : (i, j + k*r),                      0 <= k < pq   (1 x pq)
//   COL   : (i + k*r, j),                      0 <= k < pq   (pq x 1)
//   BLOCK : (i + (k/Q)*r, j + (k%Q)*r),        0 <= k < pq   (P x Q)
// Element k is the datum of PE k.  Module assignment mu(i,j) = (i*Q + j) mod NMOD
// and address assignment alpha(i,j) = (i/P)*S + j/Q follow the document; the
// default sizes (P=2, Q=4, NMOD=11, a 576 x 352 array of 8-bit pixels, room
// for a source and a result CIF frame) and the encodings below are this
// design's choices.
package pps_pkg;

  // ---- default configuration -------------------------------------------
  localparam int unsigned P_DEF    = 2;    // block rows
  localparam int unsigned Q_DEF    = 4;    // block columns; P*Q PEs
  localparam int unsigned NMOD_DEF = 11;   // memory modules: smallest prime > P*Q
  localparam int unsigned ROWS_DEF = 576;  // image array rows (two CIF frames)
  localparam int unsigned COLS_DEF = 352;  // image array columns (CIF)
  localparam int unsigned DW_DEF   = 8;    // pixel width
  localparam int unsigned RW_DEF   = 4;    // interval field width (r = 1..15)

  // ---- access type -------------------------------------------------------
  typedef enum logic [1:0] {
    ACC_ROW   = 2'd0,
    ACC_BLOCK = 2'd1,
    ACC_COL   = 2'd2
  } acc_t;

  // ---- instruction pair --------------------------------------------------
  // One word holds a memory-reference instruction and a general instruction;
  // the two are executed in the same slot.
  typedef enum logic [1:0] {
    MOP_NOP   = 2'd0,
    MOP_READ  = 2'd1,
    MOP_WRITE = 2'd2
  } mop_t;

  typedef enum logic [3:0] {
    G_NOP     = 4'd0,  // no operation
    G_VALTRAN = 4'd1,  // AC <- imm
    G_COND1   = 4'd2,  // AC <- min(AC, RD)   (erosion)
    G_COND2   = 4'd3,  // AC <- max(AC, RD)   (dilation)
    G_ADD     = 4'd4,  // AC <- AC + RD
    G_SUB     = 4'd5,  // AC <- AC - RD
    G_ABS     = 4'd6,  // AC <- |AC|
    G_MOVR    = 4'd7,  // R1 <- AC
    G_ADDR    = 4'd8,  // AC <- AC + R1
    G_THRES   = 4'd9   // AC <- (AC >= imm) ? max pixel : 0
  } gop_t;

  typedef struct packed {
    mop_t              mop;
    acc_t              acc;
    logic [3:0]        intv;
    logic signed [3:0] dy;
    logic signed [3:0] dx;
    gop_t              gop;
    logic [11:0]       imm;
  } instr_t;  // 32 bits

  // ---- DMA controller register set (written by the processor unit) ------
  typedef struct packed {
    logic [15:0]        prog_base;  // first instruction pair in local memory
    logic [15:0]        prog_len;   // number of instruction pairs (>= 1)
    logic [15:0]        row0;       // first block base row
    logic [15:0]        row1;       // last block base row (inclusive)
    logic [15:0]        col0;       // first block base column
    logic [15:0]        col1;       // last block base column (inclusive)
    logic [15:0]        step_i;     // base row step
    logic [15:0]        step_j;     // base column step
    logic signed [15:0] wr_di;      // row offset added to WRITE accesses
    logic signed [15:0] wr_dj;      // column offset added to WRITE accesses
  } dma_cfg_t;

  // ---- access-pattern arithmetic ----------------------------------------
  // Linear distance d_k of element k from the first element, in units of the
  // module index step, before multiplication by r:
  //   mu(element k) = (mu(i,j) + d_k * r) mod NMOD.
  function automatic int unsigned elem_dist(acc_t t, int unsigned k, int unsigned q);
    case (t)
      ACC_COL: return k * q;
      default: return k;          // ROW, and BLOCK: (k/Q)*Q + k%Q = k
    endcase
  endfunction

  // Relative module (module index minus mu(i,j), mod NMOD) of element k.
  function automatic int unsigned rel_mod(acc_t t, int unsigned k, int unsigned r,
                                          int unsigned q, int unsigned nmod);
    return (elem_dist(t, k, q) * r) % nmod;
  endfunction

  // alpha(element k) - alpha(i,j); im = i mod P, jm = j mod Q.
  function automatic int unsigned addr_diff(acc_t t, int unsigned k, int unsigned r,
                                            int unsigned im, int unsigned jm,
                                            int unsigned p, int unsigned q,
                                            int unsigned s);
    case (t)
      ACC_ROW:   return (jm + k * r) / q;
      ACC_COL:   return ((im + k * r) / p) * s;
      ACC_BLOCK: return ((im + (k / q) * r) / p) * s + (jm + (k % q) * r) / q;
      default:   return 0;
    endcase
  endfunction

endpackage
