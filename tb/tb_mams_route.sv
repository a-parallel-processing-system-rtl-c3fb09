// tb_mams_route -- testbench of the data routing module.
//
// Write: random data of PE k must reach the module of element k,
// (i*Q + j) mod NMOD, two cycles after the request.  Read: the testbench
// plays the memory modules, returning a distinct random word per module in
// cycle c+3, and checks that PE k receives the word of its element's module in
// cycle c+4 with rd_valid high, and that writes raise no rd_valid.
`timescale 1ns/1ps
module tb_mams_route;
  import pps_pkg::*;
  localparam int unsigned P = P_DEF, Q = Q_DEF, NMOD = NMOD_DEF, RW = RW_DEF, DW = DW_DEF;
  localparam int unsigned NPE = P * Q, MW = $clog2(NMOD);

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic in_valid = 1'b0, in_we = 1'b0;
  acc_t in_acc = ACC_ROW;
  logic [RW-1:0] in_r = 4'd1;
  logic [MW-1:0] mu_now = '0;
  logic [DW-1:0] in_wdata [NPE];
  logic [DW-1:0] mem_wdata [NMOD];
  logic [DW-1:0] mem_rdata [NMOD];
  logic rd_valid;
  logic [DW-1:0] rd_data [NPE];

  mams_route dut (.*);

  int checks = 0, failures = 0;

  initial begin
    for (int k = 0; k < NPE; k++) in_wdata[k] = '0;
    for (int x = 0; x < NMOD; x++) mem_rdata[x] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 3000; n++) begin
      int i, j, r, t;
      bit we;
      int mod_of [NPE];
      t = $urandom_range(0, 2);
      do r = $urandom_range(1, 15); while (r % NMOD == 0);
      i = $urandom_range(0, 150);
      j = $urandom_range(0, 200);
      we = $urandom_range(0, 1);
      for (int k = 0; k < NPE; k++) begin
        int ei, ej;
        case (t)
          0: begin ei = i; ej = j + k * r; end
          2: begin ei = i + k * r; ej = j; end
          default: begin ei = i + (k / Q) * r; ej = j + (k % Q) * r; end
        endcase
        mod_of[k] = (ei * Q + ej) % NMOD;
      end
      // cycle c
      in_valid = 1'b1; in_we = we; in_acc = acc_t'(t); in_r = RW'(r);
      mu_now = MW'((i * Q + j) % NMOD);
      for (int k = 0; k < NPE; k++) in_wdata[k] = DW'($urandom);
      @(negedge clk);                       // c+1
      in_valid = 1'b0; in_we = 1'b0;
      mu_now = MW'($urandom_range(0, NMOD - 1));
      @(negedge clk);                       // c+2
      if (we)
        for (int k = 0; k < NPE; k++) begin
          checks++;
          if (mem_wdata[mod_of[k]] !== in_wdata[k]) begin
            failures++;
            if (failures < 10) $display("FAIL write t=%0d r=%0d PE %0d", t, r, k);
          end
        end
      @(negedge clk);                       // c+3: memory answers
      for (int x = 0; x < NMOD; x++) mem_rdata[x] = DW'($urandom);
      @(negedge clk);                       // c+4
      checks++;
      if (rd_valid !== !we) begin failures++; $display("FAIL rd_valid"); end
      if (!we)
        for (int k = 0; k < NPE; k++) begin
          checks++;
          if (rd_data[k] !== mem_rdata[mod_of[k]]) begin
            failures++;
            if (failures < 10) $display("FAIL read t=%0d r=%0d PE %0d", t, r, k);
          end
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
