// local_mem -- local memory holding the instruction pairs and common data.
//
// A dual-port synchronous RAM of DEPTH words of 32 bits.  Port A belongs to the
// processor unit (load programs and data, read them back); port B is the read
// port of the DMA controller, which fetches one instruction pair per access.
// Both ports read synchronously: data appear in the cycle after the address.
// The document gives only the memory's role; size, width and the two ports
// are this design's choices.  Contents start at zero for simulation
// determinism only.
module local_mem #(
  parameter int unsigned DEPTH = 1024,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic          clk,
  // port A: processor unit
  input  logic          a_en,
  input  logic          a_we,
  input  logic [AW-1:0] a_addr,
  input  logic [31:0]   a_wdata,
  output logic [31:0]   a_rdata,
  // port B: DMA controller instruction fetch
  input  logic          b_en,
  input  logic [AW-1:0] b_addr,
  output logic [31:0]   b_rdata
);
  logic [31:0] mem [DEPTH];

  initial for (int a = 0; a < DEPTH; a++) mem[a] = '0;

  always_ff @(posedge clk) begin
    if (a_en) begin
      if (a_we) mem[a_addr] <= a_wdata;
      else      a_rdata     <= mem[a_addr];
    end
  end

  always_ff @(posedge clk) begin
    if (b_en) b_rdata <= mem[b_addr];
  end

endmodule
