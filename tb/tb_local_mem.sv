// tb_local_mem -- testbench of the local memory: words written through the
// processor port are read back through both ports one cycle after the address.
`timescale 1ns/1ps
module tb_local_mem;
  localparam int unsigned DEPTH = 1024, AW = 10;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic a_en = 1'b0, a_we = 1'b0, b_en = 1'b0;
  logic [AW-1:0] a_addr = '0, b_addr = '0;
  logic [31:0] a_wdata = '0, a_rdata, b_rdata;
  local_mem dut (.*);

  int checks = 0, failures = 0;
  logic [31:0] refm [DEPTH];

  initial begin
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk);
      a_en = 1'b1; a_we = 1'b1; a_addr = AW'(a); a_wdata = $urandom; refm[a] = a_wdata;
    end
    @(negedge clk); a_we = 1'b0;
    for (int n = 0; n < 3000; n++) begin
      int x, y;
      x = $urandom_range(0, DEPTH - 1);
      y = $urandom_range(0, DEPTH - 1);
      a_en = 1'b1; a_addr = AW'(x); b_en = 1'b1; b_addr = AW'(y);
      @(negedge clk);
      checks += 2;
      if (a_rdata !== refm[x]) begin failures++; if (failures < 10) $display("FAIL port A %0d", x); end
      if (b_rdata !== refm[y]) begin failures++; if (failures < 10) $display("FAIL port B %0d", y); end
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
