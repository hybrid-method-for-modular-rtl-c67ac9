// const_div -- combinational division of an N-bit unsigned number by a small
// constant D, giving quotient and remainder.
//
// Plain restoring long division, one quotient bit per input bit from the top:
// the running remainder stays below D, so each step is a small compare and
// subtract on RW bits. The chain is N steps deep; it is used by the HTQNS
// encoder to produce one digit per clock. No timing: purely combinational.
module const_div #(
  parameter int unsigned N = 512,
  parameter int unsigned D = 3
) (
  input  logic [N-1:0]               x,
  output logic [N-1:0]               q,
  output logic [$clog2(D+1)-1:0]     rem
);
  localparam int unsigned RW = $clog2(D + 1);

  always_comb begin
    logic [RW:0] r;
    r = '0;
    for (int i = N - 1; i >= 0; i--) begin
      r = {r[RW-1:0], x[i]};
      if (r >= (RW+1)'(D)) begin
        r    = r - (RW+1)'(D);
        q[i] = 1'b1;
      end else begin
        q[i] = 1'b0;
      end
    end
    rem = r[RW-1:0];
  end

endmodule
