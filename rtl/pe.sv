// pe -- processing element of the SIMD array.
//
// An ALU that executes the general instruction of each issued instruction pair
// on its own data.  It holds an accumulator AC, a scratch register R1 and the
// read register RD, which receives the PE's element of every memory read.
// All PEs receive the same instruction in the same cycle.
//
// Interface and timing:
//   gen_valid/gen_op/gen_imm : one general instruction, executed at the clock
//                              edge that ends the cycle it is presented in.
//   wr_latch                 : copies AC into the write register WR at the same
//                              edge, before the instruction of that cycle
//                              changes AC, so that a WRITE and a general
//                              instruction of one pair see the same AC.
//   rd_load/rd_in            : loads RD with the element read by the memory.
//   wr_data                  : WR clipped to the pixel range [0, 2^DW-1].
// AC and R1 are signed, ACW bits.
// The named instructions VALTRAN (AC <- immediate), COND1 (minimum, erosion)
// and COND2 (maximum, dilation) come from the document's erosion and dilation
// programs.  The document counts 16 general instructions but names only these;
// ADD, SUB, ABS, MOVR, ADDR and THRES, the register set, widths and clipping
// are this design's choices.
module pe
  import pps_pkg::*;
#(
  parameter int unsigned DW  = DW_DEF,
  parameter int unsigned ACW = 16
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          gen_valid,
  input  gop_t          gen_op,
  input  logic [11:0]   gen_imm,
  input  logic          wr_latch,
  input  logic          rd_load,
  input  logic [DW-1:0] rd_in,
  output logic [DW-1:0] wr_data,
  output logic signed [ACW-1:0] ac
);
  logic signed [ACW-1:0] r1, rd, wr, ac_nxt, imm_s;
  logic [DW-1:0]         rd_reg;

  localparam logic signed [ACW-1:0] PIX_MAX = ACW'((2 ** DW) - 1);

  always_comb begin
    rd     = ACW'(rd_reg);
    imm_s  = ACW'(gen_imm);
    ac_nxt = ac;
    case (gen_op)
      G_VALTRAN: ac_nxt = imm_s;
      G_COND1:   ac_nxt = (rd < ac) ? rd : ac;
      G_COND2:   ac_nxt = (rd > ac) ? rd : ac;
      G_ADD:     ac_nxt = ac + rd;
      G_SUB:     ac_nxt = ac - rd;
      G_ABS:     ac_nxt = (ac < 0) ? -ac : ac;
      G_ADDR:    ac_nxt = ac + r1;
      G_THRES:   ac_nxt = (ac >= imm_s) ? PIX_MAX : '0;
      default:   ac_nxt = ac;          // G_NOP, G_MOVR
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ac <= '0; r1 <= '0; wr <= '0; rd_reg <= '0;
    end else begin
      if (wr_latch) wr <= ac;
      if (gen_valid) begin
        ac <= ac_nxt;
        if (gen_op == G_MOVR) r1 <= ac;
      end
      if (rd_load) rd_reg <= rd_in;
    end
  end

  always_comb begin
    if (wr < 0)             wr_data = '0;
    else if (wr > PIX_MAX)  wr_data = '1;
    else                    wr_data = DW'(wr);
  end

endmodule
