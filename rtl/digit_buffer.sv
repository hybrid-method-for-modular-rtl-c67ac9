// digit_buffer -- holds the HTQNS digit[] and base[] arrays of one exponent.
//
// The encoder writes the digits in order, least significant first; the
// exponentiation controller then reads them twice, once per pass. Each word is
// one 2-bit htqns_digit_e (ternary digit 0..2, or the quinary zero). A simple
// dual-port memory: one write port, one read port with one cycle of read
// latency (rd_digit is valid the cycle after rd_en). Depth MAXD is the largest
// digit count of an N-bit exponent. The contents are not reset; only written
// words are ever read.
module digit_buffer
  import htqns_pkg::*;
#(
  parameter int unsigned MAXD = 324,
  parameter int unsigned DAW  = addr_bits(MAXD)
) (
  input  logic           clk,
  input  logic           wr_en,
  input  logic [DAW-1:0] wr_addr,
  input  htqns_digit_e   wr_digit,
  input  logic           rd_en,
  input  logic [DAW-1:0] rd_addr,
  output htqns_digit_e   rd_digit
);
  htqns_digit_e mem [MAXD];

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_addr] <= wr_digit;
    if (rd_en) rd_digit <= mem[rd_addr];
  end

  a_wr_in_range: assert property (@(posedge clk) wr_en |-> (wr_addr < DAW'(MAXD)));
  a_rd_in_range: assert property (@(posedge clk) rd_en |-> (rd_addr < DAW'(MAXD)));

endmodule
