// mams_addr -- address calculation and routing module of the multi-access memory.
//
// Produces the word address every memory module uses for one access.  The
// address assignment is alpha(i,j) = (i/P)*S + j/Q.  Stage 1 computes the base
// address alpha(i,j) of the first element and reads, from a ROM indexed by
// (access type, i mod P, j mod Q, r), the address differences
// alpha(element k) - alpha(i,j) already arranged in relative module order
// (entry u belongs to the element whose module is (mu(i,j) + u) mod NMOD).
// Stage 2 adds the base to all NMOD differences with NMOD adders.  Stage 3
// rotates the NMOD addresses left by mu(i,j) (barrel shifter) so that entry x
// goes to memory module x.  Entries of modules not used by the access are
// don't-care; the selection module does not enable those modules.
//
// Timing: request in cycle c, mem_addr valid in cycle c+2 (same as the module
// enables).
// The ROM of pre-arranged differences, the adders and the rotation follow the
// document (eq. (1)-(4), Figure 2); the ROM index and its size are this
// design's choices.
module mams_addr
  import pps_pkg::*;
#(
  parameter int unsigned P    = P_DEF,
  parameter int unsigned Q    = Q_DEF,
  parameter int unsigned NMOD = NMOD_DEF,
  parameter int unsigned IW   = 10,
  parameter int unsigned JW   = 9,
  parameter int unsigned RW   = RW_DEF,
  parameter int unsigned S    = 88,   // address stride of one block row, >= ceil(COLS/Q)
  parameter int unsigned AW   = 15,
  localparam int unsigned MW  = $clog2(NMOD)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  acc_t          in_acc,
  input  logic [IW-1:0] in_i,
  input  logic [JW-1:0] in_j,
  input  logic [RW-1:0] in_r,
  input  logic [MW-1:0] mu_now,
  output logic [AW-1:0] mem_addr [NMOD]
);
  localparam int unsigned NPE = P * Q;
  localparam int unsigned XN  = 4 * NPE * (2 ** RW);  // ROM depth
  localparam int unsigned XW  = $clog2(XN);          // ROM index width

  // ROM of address differences in relative module order,
  // index ((type * P + i mod P) * Q + j mod Q) * 2^RW + r
  logic [AW-1:0] diff_rom [XN][NMOD];
  initial begin
    for (int x = 0; x < XN; x++) begin
      int unsigned t, im, jm, r;
      r  = x % (2 ** RW);
      jm = (x / (2 ** RW)) % Q;
      im = (x / (2 ** RW * Q)) % P;
      t  = x / (2 ** RW * Q * P);
      for (int u = 0; u < NMOD; u++) diff_rom[x][u] = '0;
      if (t < 3)
        for (int k = 0; k < NPE; k++)
          diff_rom[x][rel_mod(acc_t'(t), k, r, Q, NMOD)] =
            AW'(addr_diff(acc_t'(t), k, r, im, jm, P, Q, S));
    end
  end

  logic [XW-1:0] rom_idx;
  logic [AW-1:0] base;
  always_comb begin
    rom_idx = XW'(((int'(in_acc) * P + int'(in_i) % P) * Q + int'(in_j) % Q) * (2 ** RW)
                  + int'(in_r));
    base    = AW'((int'(in_i) / P) * S + int'(in_j) / Q);
  end

  // stage 1 register (A1 side: base and differences)
  logic [AW-1:0] base_r1;
  logic [AW-1:0] diff_r1 [NMOD];
  logic [MW-1:0] mu_r1, mu_r2;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      base_r1 <= '0; mu_r1 <= '0;
      for (int u = 0; u < NMOD; u++) diff_r1[u] <= '0;
    end else begin
      base_r1 <= base;
      mu_r1   <= mu_now;
      for (int u = 0; u < NMOD; u++) diff_r1[u] <= diff_rom[rom_idx][u];
    end
  end

  // stage 2: NMOD adders, register A2
  logic [AW-1:0] addr_r2 [NMOD];
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mu_r2 <= '0;
      for (int u = 0; u < NMOD; u++) addr_r2[u] <= '0;
    end else begin
      mu_r2 <= mu_r1;
      for (int u = 0; u < NMOD; u++) addr_r2[u] <= base_r1 + diff_r1[u];
    end
  end

  // stage 3: rotate into module order
  always_comb begin
    for (int x = 0; x < NMOD; x++) mem_addr[x] = '0;
    for (int u = 0; u < NMOD; u++) begin
      int unsigned a;
      a = u + int'(mu_r2);
      if (a >= NMOD) a = a - NMOD;
      mem_addr[a] = addr_r2[u];
    end
  end

endmodule
