// tb_mams_select -- testbench of the memory module selection module.
//
// For random access types, intervals and positions it computes the coordinates
// of all P*Q elements, the module (i*Q + j) mod NMOD of each, and checks the
// combinational mu output, then the enables and write enables two cycles later.
`timescale 1ns/1ps
module tb_mams_select;
  import pps_pkg::*;
  localparam int unsigned P = P_DEF, Q = Q_DEF, NMOD = NMOD_DEF, RW = RW_DEF;
  localparam int unsigned IW = 10, JW = 9, NPE = P * Q, MW = $clog2(NMOD);

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic in_valid = 1'b0, in_we = 1'b0;
  acc_t in_acc = ACC_ROW;
  logic [IW-1:0] in_i = '0;
  logic [JW-1:0] in_j = '0;
  logic [RW-1:0] in_r = 4'd1;
  logic [MW-1:0] mu_now;
  logic [NMOD-1:0] mem_en, mem_we;

  mams_select dut (.*);

  int checks = 0, failures = 0;

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 3000; n++) begin
      int i, j, r, t;
      logic [NMOD-1:0] exp_en;
      bit we;
      t = $urandom_range(0, 2);
      do r = $urandom_range(1, 15); while (r % NMOD == 0);
      i = $urandom_range(0, 150);
      j = $urandom_range(0, 300);
      we = $urandom_range(0, 1);
      exp_en = '0;
      for (int k = 0; k < NPE; k++) begin
        int ei, ej;
        case (t)
          0: begin ei = i; ej = j + k * r; end
          2: begin ei = i + k * r; ej = j; end
          default: begin ei = i + (k / Q) * r; ej = j + (k % Q) * r; end
        endcase
        exp_en[(ei * Q + ej) % NMOD] = 1'b1;
      end
      @(negedge clk);
      in_valid = 1'b1; in_we = we; in_acc = acc_t'(t);
      in_i = IW'(i); in_j = JW'(j); in_r = RW'(r);
      #1;
      checks++;
      if (int'(mu_now) != (i * Q + j) % NMOD) begin
        failures++; $display("FAIL mu (%0d,%0d) got %0d", i, j, mu_now);
      end
      @(negedge clk); in_valid = 1'b0;
      @(negedge clk);
      checks++;
      if (mem_en !== exp_en || mem_we !== (we ? exp_en : '0) || $countones(mem_en) != NPE) begin
        failures++;
        if (failures < 10) $display("FAIL en t=%0d r=%0d (%0d,%0d): got %b exp %b", t, r, i, j, mem_en, exp_en);
      end
      @(negedge clk);
      checks++;
      if (mem_en !== '0) begin failures++; $display("FAIL enable without request"); end
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
