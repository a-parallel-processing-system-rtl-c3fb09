// tb_mams_addr -- testbench of the address calculation and routing module.
//
// For random accesses it computes, for every element k, its module
// (i*Q + j) mod NMOD and its address (i/P)*S + j/Q straight from the
// coordinates, and checks that the module receives that address two cycles
// after the request.  Requests are issued one per cycle.
`timescale 1ns/1ps
module tb_mams_addr;
  import pps_pkg::*;
  localparam int unsigned P = P_DEF, Q = Q_DEF, NMOD = NMOD_DEF, RW = RW_DEF;
  localparam int unsigned IW = 10, JW = 9, NPE = P * Q, MW = $clog2(NMOD);
  localparam int unsigned S = 88, AW = 15;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  acc_t in_acc = ACC_ROW;
  logic [IW-1:0] in_i = '0;
  logic [JW-1:0] in_j = '0;
  logic [RW-1:0] in_r = 4'd1;
  logic [MW-1:0] mu_now;
  logic [AW-1:0] mem_addr [NMOD];

  mams_addr dut (.*);
  assign mu_now = MW'((int'(in_i) * Q + int'(in_j)) % NMOD);

  int checks = 0, failures = 0;
  // expected address per module, -1 = unused; two requests in flight
  int exp_a [3][NMOD];

  initial begin
    for (int s = 0; s < 3; s++) for (int x = 0; x < NMOD; x++) exp_a[s][x] = -1;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 5000; n++) begin
      int i, j, r, t;
      t = $urandom_range(0, 2);
      do r = $urandom_range(1, 15); while (r % NMOD == 0);
      i = $urandom_range(0, 150);
      j = $urandom_range(0, 200);
      in_acc = acc_t'(t); in_i = IW'(i); in_j = JW'(j); in_r = RW'(r);
      exp_a[2] = exp_a[1];
      exp_a[1] = exp_a[0];
      for (int x = 0; x < NMOD; x++) exp_a[0][x] = -1;
      for (int k = 0; k < NPE; k++) begin
        int ei, ej;
        case (t)
          0: begin ei = i; ej = j + k * r; end
          2: begin ei = i + k * r; ej = j; end
          default: begin ei = i + (k / Q) * r; ej = j + (k % Q) * r; end
        endcase
        exp_a[0][(ei * Q + ej) % NMOD] = (ei / P) * S + ej / Q;
      end
      // outputs now belong to the request of two cycles ago
      if (n >= 2)
        for (int x = 0; x < NMOD; x++)
          if (exp_a[2][x] >= 0) begin
            checks++;
            if (int'(mem_addr[x]) != exp_a[2][x]) begin
              failures++;
              if (failures < 10) $display("FAIL module %0d got %0d exp %0d", x, mem_addr[x], exp_a[2][x]);
            end
          end
      @(negedge clk);
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
