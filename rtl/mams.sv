// mams -- multi-access memory system (memory controller plus NMOD modules).
//
// Gives P*Q PEs simultaneous access to P*Q elements of an ROWS x COLS array
// I(i,j), with no restriction on the position (i,j) of the first element, in
// one of three shapes with constant interval r (see pps_pkg):
//   ACC_ROW 1 x PQ, ACC_COL PQ x 1, ACC_BLOCK P x Q.
// Element (i,j) is kept in module mu(i,j) = (i*Q + j) mod NMOD at word
// alpha(i,j) = (i/P)*S + j/Q with S = ceil(COLS/Q).  NMOD is a prime larger
// than P*Q, so the P*Q elements of any access lie in distinct modules whenever
// r is not a multiple of NMOD, and the P*Q elements of one aligned P x Q block
// share one word address in distinct modules.
//
// The controller is three pipeline stages wide, built from three modules that
// work side by side: module selection (mams_select), address calculation and
// routing (mams_addr) and data routing (mams_route).  A request is accepted
// every cycle.  A write presented in cycle c is stored at the end of cycle
// c+2; read data for a request in cycle c is on rd_data in cycle c+4 with
// rd_valid high, together with the request's tag.  A write followed by a read
// of the same element in the next cycle returns the new value.
//
// Interface: req_* describe one access; req_wdata[k] / rd_data[k] belong to
// PE k (element k of the shape).  The caller keeps every element inside the
// array and r mod NMOD /= 0 (checked by assertions).
// Formulas, shapes and the three-module pipeline follow the document; the
// default sizes, the tag and the exact stage boundaries are this design's.
module mams
  import pps_pkg::*;
#(
  parameter int unsigned P    = P_DEF,
  parameter int unsigned Q    = Q_DEF,
  parameter int unsigned NMOD = NMOD_DEF,
  parameter int unsigned ROWS = ROWS_DEF,
  parameter int unsigned COLS = COLS_DEF,
  parameter int unsigned DW   = DW_DEF,
  parameter int unsigned RW   = RW_DEF,
  localparam int unsigned NPE = P * Q,
  localparam int unsigned IW  = $clog2(ROWS),
  localparam int unsigned JW  = $clog2(COLS)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          req_valid,
  input  logic          req_we,
  input  acc_t          req_acc,
  input  logic [IW-1:0] req_i,
  input  logic [JW-1:0] req_j,
  input  logic [RW-1:0] req_r,
  input  logic          req_tag,
  input  logic [DW-1:0] req_wdata [NPE],
  output logic          rd_valid,
  output logic          rd_tag,
  output logic [DW-1:0] rd_data [NPE]
);
  localparam int unsigned S   = (COLS + Q - 1) / Q;
  localparam int unsigned CAP = S * ((ROWS + P - 1) / P);
  localparam int unsigned AW  = $clog2(CAP);
  localparam int unsigned MW  = $clog2(NMOD);

  logic [MW-1:0]   mu_now;
  logic [NMOD-1:0] mem_en, mem_we;
  logic [AW-1:0]   mem_addr  [NMOD];
  logic [DW-1:0]   mem_wdata [NMOD];
  logic [DW-1:0]   mem_rdata [NMOD];

  mams_select #(.P(P), .Q(Q), .NMOD(NMOD), .IW(IW), .JW(JW), .RW(RW)) u_sel (
    .clk, .rst_n,
    .in_valid(req_valid), .in_we(req_we), .in_acc(req_acc),
    .in_i(req_i), .in_j(req_j), .in_r(req_r),
    .mu_now, .mem_en, .mem_we
  );

  mams_addr #(.P(P), .Q(Q), .NMOD(NMOD), .IW(IW), .JW(JW), .RW(RW), .S(S), .AW(AW)) u_addr (
    .clk, .rst_n,
    .in_acc(req_acc), .in_i(req_i), .in_j(req_j), .in_r(req_r),
    .mu_now, .mem_addr
  );

  mams_route #(.P(P), .Q(Q), .NMOD(NMOD), .RW(RW), .DW(DW)) u_route (
    .clk, .rst_n,
    .in_valid(req_valid), .in_we(req_we), .in_acc(req_acc), .in_r(req_r),
    .mu_now, .in_wdata(req_wdata), .mem_wdata, .mem_rdata,
    .rd_valid, .rd_data
  );

  for (genvar x = 0; x < NMOD; x++) begin : g_mod
    mams_mem #(.CAP(CAP), .AW(AW), .DW(DW)) u_mem (
      .clk, .en(mem_en[x]), .we(mem_we[x]), .addr(mem_addr[x]),
      .wdata(mem_wdata[x]), .rdata(mem_rdata[x])
    );
  end

  // tag travels with the read
  logic [3:0] tag_p;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) tag_p <= '0;
    else        tag_p <= {tag_p[2:0], req_tag};
  end
  assign rd_tag = tag_p[3];

  // ---- access rules ----
  function automatic int unsigned last_i(acc_t t, int unsigned i, int unsigned r);
    case (t)
      ACC_COL:   return i + (NPE - 1) * r;
      ACC_BLOCK: return i + (P - 1) * r;
      default:   return i;
    endcase
  endfunction
  function automatic int unsigned last_j(acc_t t, int unsigned j, int unsigned r);
    case (t)
      ACC_ROW:   return j + (NPE - 1) * r;
      ACC_BLOCK: return j + (Q - 1) * r;
      default:   return j;
    endcase
  endfunction

  a_interval: assert property (@(posedge clk) disable iff (!rst_n)
    req_valid |-> (int'(req_r) % NMOD != 0))
    else $error("mams: interval r=%0d is a multiple of NMOD", req_r);
  a_type: assert property (@(posedge clk) disable iff (!rst_n)
    req_valid |-> (req_acc != 2'd3))
    else $error("mams: undefined access type");
  a_inside: assert property (@(posedge clk) disable iff (!rst_n)
    req_valid |-> (last_i(req_acc, 32'(req_i), 32'(req_r)) < ROWS &&
                  last_j(req_acc, 32'(req_j), 32'(req_r)) < COLS))
    else $error("mams: access leaves the %0d x %0d array", ROWS, COLS);

endmodule
