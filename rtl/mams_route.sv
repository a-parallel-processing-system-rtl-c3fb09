// mams_route -- data routing module of the multi-access memory.
//
// Moves the P*Q data elements of an access between the PEs and the NMOD memory
// modules.  Write path: the WRITE router places the datum of PE k at relative
// module position u = (d_k * r) mod NMOD (for a row access this is
// D2((k*r) mod NMOD) <- D1(k)), two pipeline registers follow, and a barrel
// shifter rotates the NMOD words left by mu(i,j) so that each reaches its
// memory module.  Read path, the same steps reversed: the words read from the
// modules are rotated right by mu(i,j), registered, and the READ router hands
// relative position u back to PE k.
//
// Timing: request in cycle c; mem_wdata valid in cycle c+2 (memory writes at
// the end of it); mem_rdata is expected in cycle c+3 (registered memory
// output); rd_data/rd_valid appear in cycle c+4.  A new request may enter
// every cycle.
// The router equation and the register/barrel-shifter chain follow the
// document (Figure 2); the routing tables are computed from it here.
module mams_route
  import pps_pkg::*;
#(
  parameter int unsigned P    = P_DEF,
  parameter int unsigned Q    = Q_DEF,
  parameter int unsigned NMOD = NMOD_DEF,
  parameter int unsigned RW   = RW_DEF,
  parameter int unsigned DW   = DW_DEF,
  localparam int unsigned NPE = P * Q,
  localparam int unsigned MW  = $clog2(NMOD),
  localparam int unsigned KW  = (NPE > 1) ? $clog2(NPE) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  input  logic          in_we,
  input  acc_t          in_acc,
  input  logic [RW-1:0] in_r,
  input  logic [MW-1:0] mu_now,
  input  logic [DW-1:0] in_wdata  [NPE],
  output logic [DW-1:0] mem_wdata [NMOD],
  input  logic [DW-1:0] mem_rdata [NMOD],
  output logic          rd_valid,
  output logic [DW-1:0] rd_data   [NPE]
);
  localparam int unsigned TX = 2 + RW;   // routing table index width

  // routing tables: PE feeding relative position u, and position of PE k
  logic [KW-1:0] wsel [2 ** TX][NMOD];
  logic          wuse [2 ** TX][NMOD];
  logic [MW-1:0] rpos [2 ** TX][NPE];
  initial begin
    for (int x = 0; x < 2 ** TX; x++) begin
      int unsigned t, r, u;
      t = x / (2 ** RW);
      r = x % (2 ** RW);
      for (int v = 0; v < NMOD; v++) begin wsel[x][v] = '0; wuse[x][v] = 1'b0; end
      for (int k = 0; k < NPE; k++) begin
        u = (t < 3) ? rel_mod(acc_t'(t), k, r, Q, NMOD) : k;
        rpos[x][k] = MW'(u);
        wsel[x][u] = KW'(k);
        wuse[x][u] = 1'b1;
      end
    end
  end

  logic [TX-1:0] tix;
  assign tix = {in_acc, in_r};

  // ---------------- write path ----------------
  logic [DW-1:0] d_r1 [NMOD];
  logic [DW-1:0] d_r2 [NMOD];
  logic [MW-1:0] mu_p [1:3];     // mu delayed to cycles c+1 .. c+3
  logic [TX-1:0] tix_p [1:4];    // routing index delayed to c+1 .. c+4
  logic          rv_p [1:4];     // read request delayed to c+1 .. c+4

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int u = 0; u < NMOD; u++) begin d_r1[u] <= '0; d_r2[u] <= '0; end
      for (int s = 1; s <= 3; s++) mu_p[s] <= '0;
      for (int s = 1; s <= 4; s++) begin tix_p[s] <= '0; rv_p[s] <= 1'b0; end
    end else begin
      for (int u = 0; u < NMOD; u++) begin
        d_r1[u] <= wuse[tix][u] ? in_wdata[wsel[tix][u]] : '0;   // Router (WRITE)
        d_r2[u] <= d_r1[u];
      end
      mu_p[1]  <= mu_now;
      tix_p[1] <= tix;
      rv_p[1]  <= in_valid && !in_we;
      for (int s = 2; s <= 3; s++) mu_p[s] <= mu_p[s-1];
      for (int s = 2; s <= 4; s++) begin tix_p[s] <= tix_p[s-1]; rv_p[s] <= rv_p[s-1]; end
    end
  end

  // barrel shifter: relative position u -> module (u + mu) mod NMOD
  always_comb begin
    for (int x = 0; x < NMOD; x++) mem_wdata[x] = '0;
    for (int u = 0; u < NMOD; u++) begin
      int unsigned a;
      a = u + int'(mu_p[2]);
      if (a >= NMOD) a = a - NMOD;
      mem_wdata[a] = d_r2[u];
    end
  end

  // ---------------- read path ----------------
  logic [DW-1:0] q_rel  [NMOD];
  logic [DW-1:0] q_r4   [NMOD];
  always_comb begin
    for (int u = 0; u < NMOD; u++) begin
      int unsigned a;
      a = u + int'(mu_p[3]);
      if (a >= NMOD) a = a - NMOD;
      q_rel[u] = mem_rdata[a];                      // barrel shifter (rotate right)
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) for (int u = 0; u < NMOD; u++) q_r4[u] <= '0;
    else        for (int u = 0; u < NMOD; u++) q_r4[u] <= q_rel[u];
  end

  always_comb begin
    for (int k = 0; k < NPE; k++) rd_data[k] = q_r4[rpos[tix_p[4]][k]];  // Router (READ)
    rd_valid = rv_p[4];
  end

endmodule
