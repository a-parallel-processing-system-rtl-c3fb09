// pps_top -- parallel processing system for visual media (pipelined SIMD).
//
// P*Q processing elements work in lock step on P*Q image points that a
// multi-access memory delivers in one access (a row, a column or a P x Q
// block, with any constant interval).  A DMA controller fetches instruction
// pairs -- one memory-reference and one general instruction, executed in the
// same slot -- from a local memory, broadcasts the general instruction to all
// PEs and sends the memory-reference instruction to the memory, repeating the
// program at every block position of an image region.
//
// The processor unit (an embedded PCI processor that also talks to the host)
// is outside this module.  Its three connections are ports:
//   pu_lm_*   : read/write port of the local memory (programs, common data);
//   pu_cfg, pu_start, busy, done : the DMA controller's register set;
//   pu_req_*, pu_rd_* : direct access to the multi-access memory, used to move
//               image data in and out; accepted only while the DMA controller
//               is idle (pu_req_ready), because it owns the memory while an
//               application runs.  Timing as in mams: read data four cycles
//               after the request.
// Structure and the division of work follow the document; the port set and
// the arbitration between processor unit and DMA controller are this
// design's choices.
module pps_top
  import pps_pkg::*;
#(
  parameter int unsigned P        = P_DEF,
  parameter int unsigned Q        = Q_DEF,
  parameter int unsigned NMOD     = NMOD_DEF,
  parameter int unsigned ROWS     = ROWS_DEF,
  parameter int unsigned COLS     = COLS_DEF,
  parameter int unsigned DW       = DW_DEF,
  parameter int unsigned RW       = RW_DEF,
  parameter int unsigned ACW      = 16,
  parameter int unsigned LM_DEPTH = 1024,
  parameter int unsigned T_READ   = 8,
  parameter int unsigned T_WRITE  = 6,
  parameter int unsigned T_GEN    = 2,
  parameter int unsigned POOL     = 32,
  localparam int unsigned NPE     = P * Q,
  localparam int unsigned IW      = $clog2(ROWS),
  localparam int unsigned JW      = $clog2(COLS),
  localparam int unsigned LM_AW   = $clog2(LM_DEPTH)
) (
  input  logic             clk,
  input  logic             rst_n,
  // processor unit: local memory
  input  logic             pu_lm_en,
  input  logic             pu_lm_we,
  input  logic [LM_AW-1:0] pu_lm_addr,
  input  logic [31:0]      pu_lm_wdata,
  output logic [31:0]      pu_lm_rdata,
  // processor unit: DMA controller registers
  input  dma_cfg_t         pu_cfg,
  input  logic             pu_start,
  output logic             busy,
  output logic             done,
  // processor unit: direct multi-access memory port
  input  logic             pu_req_valid,
  output logic             pu_req_ready,
  input  logic             pu_req_we,
  input  acc_t             pu_req_acc,
  input  logic [IW-1:0]    pu_req_i,
  input  logic [JW-1:0]    pu_req_j,
  input  logic [RW-1:0]    pu_req_r,
  input  logic [DW-1:0]    pu_req_wdata [NPE],
  output logic             pu_rd_valid,
  output logic [DW-1:0]    pu_rd_data [NPE]
);
  // ---- local memory ----
  logic             lm_en;
  logic [LM_AW-1:0] lm_addr;
  logic [31:0]      lm_rdata;

  local_mem #(.DEPTH(LM_DEPTH)) u_lm (
    .clk,
    .a_en(pu_lm_en), .a_we(pu_lm_we), .a_addr(pu_lm_addr),
    .a_wdata(pu_lm_wdata), .a_rdata(pu_lm_rdata),
    .b_en(lm_en), .b_addr(lm_addr), .b_rdata(lm_rdata)
  );

  // ---- DMA controller ----
  logic          gen_valid, wr_latch;
  gop_t          gen_op;
  logic [11:0]   gen_imm;
  logic          d_valid, d_we;
  acc_t          d_acc;
  logic [IW-1:0] d_i;
  logic [JW-1:0] d_j;
  logic [RW-1:0] d_r;

  dma_ctrl #(.T_READ(T_READ), .T_WRITE(T_WRITE), .T_GEN(T_GEN), .POOL(POOL),
             .LM_AW(LM_AW), .IW(IW), .JW(JW), .RW(RW)) u_dma (
    .clk, .rst_n, .cfg(pu_cfg), .start(pu_start), .busy, .done,
    .lm_en, .lm_addr, .lm_rdata,
    .gen_valid, .gen_op, .gen_imm, .wr_latch,
    .mreq_valid(d_valid), .mreq_we(d_we), .mreq_acc(d_acc),
    .mreq_i(d_i), .mreq_j(d_j), .mreq_r(d_r)
  );

  // ---- processing elements ----
  logic          rd_valid, rd_tag;
  logic [DW-1:0] rd_data [NPE];
  logic [DW-1:0] pe_wdata [NPE];

  for (genvar k = 0; k < NPE; k++) begin : g_pe
    logic signed [ACW-1:0] ac_unused;
    pe #(.DW(DW), .ACW(ACW)) u_pe (
      .clk, .rst_n,
      .gen_valid, .gen_op, .gen_imm, .wr_latch,
      .rd_load(rd_valid && rd_tag), .rd_in(rd_data[k]),
      .wr_data(pe_wdata[k]), .ac(ac_unused)
    );
  end

  // ---- multi-access memory, owned by the DMA controller while busy ----
  logic          m_valid, m_we, m_tag;
  acc_t          m_acc;
  logic [IW-1:0] m_i;
  logic [JW-1:0] m_j;
  logic [RW-1:0] m_r;
  logic [DW-1:0] m_wdata [NPE];

  assign pu_req_ready = !busy;

  always_comb begin
    if (busy) begin
      m_valid = d_valid; m_we = d_we; m_acc = d_acc;
      m_i = d_i; m_j = d_j; m_r = d_r; m_tag = 1'b1;
      m_wdata = pe_wdata;
    end else begin
      m_valid = pu_req_valid; m_we = pu_req_we; m_acc = pu_req_acc;
      m_i = pu_req_i; m_j = pu_req_j; m_r = pu_req_r; m_tag = 1'b0;
      m_wdata = pu_req_wdata;
    end
  end

  mams #(.P(P), .Q(Q), .NMOD(NMOD), .ROWS(ROWS), .COLS(COLS), .DW(DW), .RW(RW)) u_mams (
    .clk, .rst_n,
    .req_valid(m_valid), .req_we(m_we), .req_acc(m_acc),
    .req_i(m_i), .req_j(m_j), .req_r(m_r), .req_tag(m_tag),
    .req_wdata(m_wdata),
    .rd_valid, .rd_tag, .rd_data
  );

  assign pu_rd_valid = rd_valid && !rd_tag;
  assign pu_rd_data  = rd_data;

endmodule
