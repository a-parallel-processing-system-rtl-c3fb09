// mams_mem -- one memory module of the multi-access memory system.
//
// A single-port synchronous RAM of CAP words of DW bits.  When en is high the
// word at addr is written with wdata (we high) or read (we low); read data is
// registered and appears in the next cycle and holds until the next read
// (it is undefined before the first read).
// The document gives only the role of the modules (m external modules holding
// the image); word width, depth and the synchronous read are this design's
// choices.  The contents are cleared at start-up only for simulation
// determinism; no reset clears the array.
module mams_mem #(
  parameter int unsigned CAP = 25344,
  parameter int unsigned AW  = 15,
  parameter int unsigned DW  = 8
) (
  input  logic          clk,
  input  logic          en,
  input  logic          we,
  input  logic [AW-1:0] addr,
  input  logic [DW-1:0] wdata,
  output logic [DW-1:0] rdata
);
  logic [DW-1:0] mem [CAP];

  initial begin
    for (int a = 0; a < CAP; a++) mem[a] = '0;
  end

  always_ff @(posedge clk) begin
    if (en) begin
      if (we) begin
        if (32'(addr) < CAP) mem[addr] <= wdata;
      end else begin
        rdata <= (32'(addr) < CAP) ? mem[addr] : '0;
      end
    end
  end

endmodule
