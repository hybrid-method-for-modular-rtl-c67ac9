// htqns_encoder -- converts a binary exponent x into its hybrid ternary-quinary
// (HTQNS) digits, least significant digit first, one digit per clock.
//
// The rule is the method's own: while x is not zero, if 5 divides x emit a
// quinary position (base 5, digit 0) and divide x by 5; otherwise emit the
// ternary digit x mod 3 and replace x by floor(x/3). Example: 47 gives
// base[] = 3,5,3,3 and digit[] = 2,0,0,1. Both divisions are computed in the
// same cycle by two constant dividers and the quotient register is updated
// with one of them; that datapath is this design's choice.
//
// Interface: pulse start with x valid. Each busy cycle writes one digit
// (wr_en, wr_addr = i, wr_digit). When the quotient reaches zero, done pulses
// for one cycle and num_digits holds the digit count m (0 for x = 0) until the
// next start. Latency: m + 1 cycles from start to done.
module htqns_encoder
  import htqns_pkg::*;
#(
  parameter int unsigned N    = 512,
  parameter int unsigned MAXD = max_digits(N),
  parameter int unsigned DAW  = addr_bits(MAXD)
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               start,
  input  logic [N-1:0]       x,
  output logic               busy,
  output logic               done,
  output logic               wr_en,
  output logic [DAW-1:0]     wr_addr,
  output htqns_digit_e       wr_digit,
  output logic [DAW:0]       num_digits
);
  logic [N-1:0] x_q, q3, q5;
  logic [1:0]   r3;
  logic [2:0]   r5;
  logic [DAW:0] i_q;

  const_div #(.N(N), .D(3)) u_div3 (.x(x_q), .q(q3), .rem(r3));
  const_div #(.N(N), .D(5)) u_div5 (.x(x_q), .q(q5), .rem(r5));

  wire   quinary = (r5 == 3'd0);
  assign wr_en    = busy && (x_q != '0);
  assign wr_addr  = i_q[DAW-1:0];
  assign wr_digit = quinary ? DIG_Q0 : htqns_digit_e'(r3);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x_q        <= '0;
      i_q        <= '0;
      busy       <= 1'b0;
      done       <= 1'b0;
      num_digits <= '0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          x_q  <= x;
          i_q  <= '0;
          busy <= 1'b1;
        end
      end else if (x_q == '0) begin
        busy       <= 1'b0;
        done       <= 1'b1;
        num_digits <= i_q;
      end else begin
        x_q <= quinary ? q5 : q3;
        i_q <= i_q + 1'b1;
      end
    end
  end

  a_digit_fits: assert property (@(posedge clk) disable iff (!rst_n)
    wr_en |-> (i_q < (DAW+1)'(MAXD)));

endmodule
