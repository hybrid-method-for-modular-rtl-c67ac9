// precomp_table -- storage for the precomputed powers F[it][iq] =
// g^(3^it * 5^iq) mod P.
//
// Because g is fixed, these values are computed once, outside this design, and
// loaded through the write port before any exponentiation. Only the pairs with
// 3^it * 5^iq < 2^N are kept (35888 words for N = 512), packed row after row:
// row it holds row_len(N, it) consecutive words for iq = 0, 1, ... A host loads
// the table by writing those words at increasing addresses in that order.
// The packing is this design's choice.
//
// Interface: one write port (we, waddr, wdata) and one read port with one cycle
// of read latency (rdata valid the cycle after re). Contents are not reset.
module precomp_table
  import htqns_pkg::*;
#(
  parameter int unsigned N       = 512,
  parameter int unsigned ENTRIES = table_entries(N),
  parameter int unsigned TAW     = addr_bits(ENTRIES)
) (
  input  logic           clk,
  input  logic           we,
  input  logic [TAW-1:0] waddr,
  input  logic [N-1:0]   wdata,
  input  logic           re,
  input  logic [TAW-1:0] raddr,
  output logic [N-1:0]   rdata
);
  logic [N-1:0] mem [ENTRIES];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    if (re) rdata <= mem[raddr];
  end

  a_waddr_in_range: assert property (@(posedge clk) we |-> (waddr < TAW'(ENTRIES)));
  a_raddr_in_range: assert property (@(posedge clk) re |-> (raddr < TAW'(ENTRIES)));

endmodule
