// tb_pe -- testbench of the processing element: random instruction streams
// with random read data, compared with a reference model of the registers;
// checks that WR captures AC before the instruction of the same cycle and that
// wr_data is clipped to the pixel range.
`timescale 1ns/1ps
module tb_pe;
  import pps_pkg::*;
  localparam int unsigned DW = 8, ACW = 16;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic gen_valid = 1'b0, wr_latch = 1'b0, rd_load = 1'b0;
  gop_t gen_op = G_NOP;
  logic [11:0] gen_imm = '0;
  logic [DW-1:0] rd_in = '0, wr_data;
  logic signed [ACW-1:0] ac;
  pe dut (.*);

  int checks = 0, failures = 0;
  int m_ac = 0, m_r1 = 0, m_rd = 0, m_wr = 0;

  function automatic int wrap(int v);   // ACW-bit two's complement
    v = v & 32'hFFFF;
    return (v >= 32768) ? v - 65536 : v;
  endfunction

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 20000; n++) begin
      int op, imm, nac, exp_wd;
      op  = $urandom_range(0, 9);
      imm = $urandom_range(0, 511);
      gen_valid = ($urandom_range(0, 7) != 0);
      gen_op    = gop_t'(op);
      gen_imm   = 12'(imm);
      wr_latch  = ($urandom_range(0, 3) == 0);
      rd_load   = ($urandom_range(0, 1) == 1);
      rd_in     = DW'($urandom);
      // reference
      nac = m_ac;
      case (op)
        1: nac = imm;
        2: nac = (m_rd < m_ac) ? m_rd : m_ac;
        3: nac = (m_rd > m_ac) ? m_rd : m_ac;
        4: nac = wrap(m_ac + m_rd);
        5: nac = wrap(m_ac - m_rd);
        6: nac = wrap((m_ac < 0) ? -m_ac : m_ac);
        8: nac = wrap(m_ac + m_r1);
        9: nac = (m_ac >= imm) ? 255 : 0;
        default: nac = m_ac;
      endcase
      if (wr_latch) m_wr = m_ac;
      if (gen_valid) begin
        if (op == 7) m_r1 = m_ac;
        m_ac = nac;
      end
      if (rd_load) m_rd = int'(rd_in);
      @(negedge clk);
      exp_wd = (m_wr < 0) ? 0 : (m_wr > 255) ? 255 : m_wr;
      checks += 2;
      if (int'(ac) != m_ac) begin failures++; if (failures < 10) $display("FAIL op %0d: ac %0d exp %0d", op, ac, m_ac); end
      if (int'(wr_data) != exp_wd) begin failures++; if (failures < 10) $display("FAIL wr_data %0d exp %0d", wr_data, exp_wd); end
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
