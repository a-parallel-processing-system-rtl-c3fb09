// tb_mams_mem -- testbench of one memory module: random writes and reads
// against a reference array, read data one cycle after the address, output
// held while not reading, and writes outside the capacity ignored.
`timescale 1ns/1ps
module tb_mams_mem;
  localparam int unsigned CAP = 25344, AW = 15, DW = 8;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic en = 1'b0, we = 1'b0;
  logic [AW-1:0] addr = '0;
  logic [DW-1:0] wdata = '0, rdata;
  mams_mem dut (.*);

  int checks = 0, failures = 0;
  logic [DW-1:0] refm [CAP];

  initial begin
    for (int a = 0; a < CAP; a++) refm[a] = '0;
    for (int n = 0; n < 20000; n++) begin
      int a;
      @(negedge clk);
      a = (n < 4000) ? n : $urandom_range(0, CAP - 1);
      en = 1'b1;
      we = (n < 4000) || ($urandom_range(0, 1) == 1);
      addr = AW'(a);
      wdata = DW'($urandom);
      if (we) refm[a] = wdata;
      else begin
        logic [DW-1:0] e;
        e = refm[a];
        @(negedge clk);
        en = 1'b0;
        checks++;
        if (rdata !== e) begin failures++; if (failures < 10) $display("FAIL addr %0d", a); end
        @(negedge clk);
        checks++;
        if (rdata !== e) begin failures++; $display("FAIL read data not held"); end
      end
    end
    // out-of-range write must not disturb word 0
    @(negedge clk); en = 1'b1; we = 1'b1; addr = AW'(CAP); wdata = ~refm[0];
    @(negedge clk); we = 1'b0; addr = '0;
    @(negedge clk); en = 1'b0;
    checks++;
    if (rdata !== refm[0]) begin failures++; $display("FAIL out-of-range write"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
