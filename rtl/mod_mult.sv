// mod_mult -- sequential modular multiplier, r = a * b mod p.
//
// The exponentiation method treats one modular multiplication as its unit of
// cost and leaves the multiplier itself open; this is the simplest one that
// works for any modulus: MSB-first interleaved (shift-and-add) multiplication.
// Each cycle takes one bit of a, from the top: t = 2r + (bit ? b : 0), then
// reduces t (< 3p) back below p by subtracting p or 2p.
//
// Interface: pulse start for one cycle with a, b, p valid (a, b < p, p > 1).
// Operands are captured on that edge. busy is high for N cycles, then done
// pulses for one cycle with r valid; r holds until the next start. A start
// while busy is ignored. Latency from start to done: N + 1 cycles.
module mod_mult #(
  parameter int unsigned N = 512
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic [N-1:0] p,
  output logic         busy,
  output logic         done,
  output logic [N-1:0] r
);
  localparam int unsigned CW = $clog2(N + 1);

  logic [N-1:0]  a_q, b_q, p_q;
  logic [N-1:0]  acc_q;
  logic [CW-1:0] cnt_q;
  logic [N+1:0]  t, t_p, t_2p, acc_d;

  // One interleaved step: double, add, reduce.
  always_comb begin
    t    = {1'b0, acc_q, 1'b0} + (a_q[N-1] ? {2'b00, b_q} : '0);
    t_p  = t - {2'b00, p_q};
    t_2p = t - {1'b0, p_q, 1'b0};
    if (t >= {1'b0, p_q, 1'b0})  acc_d = t_2p;
    else if (t >= {2'b00, p_q})  acc_d = t_p;
    else                         acc_d = t;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_q   <= '0;
      b_q   <= '0;
      p_q   <= '0;
      acc_q <= '0;
      cnt_q <= '0;
      busy  <= 1'b0;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          a_q   <= a;
          b_q   <= b;
          p_q   <= p;
          acc_q <= '0;
          cnt_q <= CW'(N);
          busy  <= 1'b1;
        end
      end else begin
        acc_q <= acc_d[N-1:0];
        a_q   <= a_q << 1;
        cnt_q <= cnt_q - 1'b1;
        if (cnt_q == CW'(1)) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

  assign r = acc_q;

  // Operands must already be reduced, or the single-step reduction overflows.
  a_operands_reduced: assert property (@(posedge clk) disable iff (!rst_n)
    (start && !busy) |-> (a < p && b < p));

endmodule
