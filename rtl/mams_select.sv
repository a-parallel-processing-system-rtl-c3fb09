// mams_select -- memory module selection module of the multi-access memory.
//
// Finds which NMOD memory modules take part in an access and in which module
// the first element lies.  Stage 1 ("Address") computes the module assignment
// mu(i,j) = (i*Q + j) mod NMOD and looks up, in a ROM indexed by access type and
// interval r, the mask of modules used relative to mu(i,j) (bit u set when some
// element k has (d_k * r) mod NMOD = u).  Stage 2 ("MUX") rotates that mask left
// by mu(i,j) into absolute module order.  Stage 3 ("Decoder") turns it into one
// enable and one write enable per module.
//
// Timing: a request presented in cycle c yields mem_en / mem_we in cycle c+2,
// where the memory modules sample them at the end of the cycle (the third
// pipeline stage).  mu_now is combinational from the request (shared with the
// other two modules).
// The formula for mu and the ROM-MUX-register-decoder chain follow the
// document; storing a relative mask in the ROM is this design's reading of it.
module mams_select
  import pps_pkg::*;
#(
  parameter int unsigned P    = P_DEF,
  parameter int unsigned Q    = Q_DEF,
  parameter int unsigned NMOD = NMOD_DEF,
  parameter int unsigned IW   = 10,
  parameter int unsigned JW   = 9,
  parameter int unsigned RW   = RW_DEF,
  localparam int unsigned MW  = $clog2(NMOD)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  input  logic          in_we,
  input  acc_t          in_acc,
  input  logic [IW-1:0] in_i,
  input  logic [JW-1:0] in_j,
  input  logic [RW-1:0] in_r,
  output logic [MW-1:0] mu_now,
  output logic [NMOD-1:0] mem_en,
  output logic [NMOD-1:0] mem_we
);
  localparam int unsigned NPE = P * Q;

  // ROM: relative module mask for every (access type, interval)
  logic [NMOD-1:0] sel_rom [4 * (2 ** RW)];
  initial begin
    for (int t = 0; t < 4; t++)
      for (int r = 0; r < 2 ** RW; r++) begin
        logic [NMOD-1:0] m;
        m = '0;
        if (t < 3)
          for (int k = 0; k < NPE; k++)
            m[rel_mod(acc_t'(t), k, r, Q, NMOD)] = 1'b1;
        sel_rom[t * (2 ** RW) + r] = m;
      end
  end

  // stage 1: module of the first element, ROM look-up
  always_comb mu_now = MW'((int'(in_i) * Q + int'(in_j)) % NMOD);

  logic [NMOD-1:0] mask_r1;
  logic [MW-1:0]   mu_r1;
  logic            v_r1, we_r1, v_r2, we_r2;
  logic [NMOD-1:0] en_r2;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v_r1 <= 1'b0; we_r1 <= 1'b0; mask_r1 <= '0; mu_r1 <= '0;
    end else begin
      v_r1    <= in_valid;
      we_r1   <= in_we;
      mask_r1 <= sel_rom[{in_acc, in_r}];
      mu_r1   <= mu_now;
    end
  end

  // stage 2: rotate the relative mask by mu into module order
  logic [NMOD-1:0] rot;
  always_comb begin
    rot = '0;
    for (int u = 0; u < NMOD; u++) begin
      int unsigned a;
      a = u + int'(mu_r1);
      if (a >= NMOD) a = a - NMOD;
      rot[a] = mask_r1[u];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v_r2 <= 1'b0; we_r2 <= 1'b0; en_r2 <= '0;
    end else begin
      v_r2  <= v_r1;
      we_r2 <= we_r1;
      en_r2 <= rot;
    end
  end

  // stage 3: decoder to per-module enables
  always_comb begin
    mem_en = v_r2 ? en_r2 : '0;
    mem_we = (v_r2 && we_r2) ? en_r2 : '0;
  end

endmodule
