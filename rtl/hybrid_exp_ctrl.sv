// hybrid_exp_ctrl -- computes g^x mod P from the HTQNS digits of x and the
// precomputed table F[it][iq] = g^(3^it * 5^iq) mod P.
//
// It follows the two-pass method: with d = 2 and then d = 1, walk the digits
// from the least significant, keeping it (ternary positions seen) and iq
// (quinary positions seen); at each ternary digit equal to d multiply
// b = b * F[it][iq]. b is not cleared between passes. After the d = 2 pass
// a = b; after the d = 1 pass a = a * b. The result is
// a = B2^2 * B1 = g^x, with B2 and B1 the products of the entries under the
// twos and the ones. As in the method's cost count, a product with an operand
// still equal to 1 is a copy, not a multiplication, so an exponent with N1
// ones and N2 twos (N2 > 0) costs N1 + N2 multiplications.
//
// The table address is tracked incrementally (this design's choice): rows are
// packed, so moving to the next quinary position adds 1 and moving to the next
// ternary position adds the length of the current row, taken from a small
// constant ROM built at elaboration.
//
// Interface: pulse start once the digits are in the digit buffer and
// num_digits is valid. Each digit takes two cycles (read, evaluate) plus
// N + 1 cycles for every multiplication; from the edge that samples start to
// the edge that raises done: 4m + 3 + (N + 1) * mult_count cycles (1 for
// m = 0). done pulses for one cycle with result valid; result and mult_count
// hold until the next start. The pass order, the digit test and the product
// rule are the method's; the state machine and its timing are this design's.
module hybrid_exp_ctrl
  import htqns_pkg::*;
#(
  parameter int unsigned N       = 512,
  parameter int unsigned MAXD    = max_digits(N),
  parameter int unsigned DAW     = addr_bits(MAXD),
  parameter int unsigned ROWS    = table_rows(N),
  parameter int unsigned ENTRIES = table_entries(N),
  parameter int unsigned TAW     = addr_bits(ENTRIES),
  parameter int unsigned MCW     = addr_bits(MAXD + 2) + 1
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start,
  input  logic [DAW:0]   num_digits,
  // digit buffer read port (one cycle latency)
  output logic           dig_rd_en,
  output logic [DAW-1:0] dig_rd_addr,
  input  htqns_digit_e   dig_rd,
  // precomputed table read port (one cycle latency)
  output logic           tbl_re,
  output logic [TAW-1:0] tbl_raddr,
  input  logic [N-1:0]   tbl_rdata,
  // modular multiplier
  output logic           mm_start,
  output logic [N-1:0]   mm_a,
  output logic [N-1:0]   mm_b,
  input  logic           mm_done,
  input  logic [N-1:0]   mm_r,
  // status and result
  output logic           busy,
  output logic           done,
  output logic [N-1:0]   result,
  output logic [MCW-1:0] mult_count
);
  localparam int unsigned IW = addr_bits(ROWS + 1);
  localparam int unsigned QW = addr_bits(row_len(N, 0) + 1);

  typedef enum logic [2:0] {
    S_IDLE, S_READ, S_EVAL, S_MUL, S_PASS_END, S_MUL_AB, S_FINISH
  } state_e;

  state_e         state_q;
  logic           d_two_q;           // current pass: 1 -> d = 2, 0 -> d = 1
  logic [DAW:0]   i_q;
  logic [IW-1:0]  it_q;
  logic [TAW-1:0] addr_q;
  logic [N-1:0]   a_q, b_q;
  logic           a_one_q, b_one_q;  // a / b still equal to 1

  // Row lengths of the packed table.
  logic [QW-1:0] row_len_rom [ROWS];
  for (genvar k = 0; k < ROWS; k++) begin : g_row_len
    localparam int unsigned RL = row_len(N, k);
    assign row_len_rom[k] = QW'(RL);
  end

  logic [QW-1:0] cur_row_len;
  assign cur_row_len = (it_q < IW'(ROWS)) ? row_len_rom[it_q] : '0;

  htqns_digit_e want;
  assign want = d_two_q ? DIG_T2 : DIG_T1;
  wire hit = (dig_rd != DIG_Q0) && (dig_rd == want);

  assign dig_rd_en   = (state_q == S_READ);
  assign dig_rd_addr = i_q[DAW-1:0];
  assign tbl_re      = (state_q == S_READ);
  assign tbl_raddr   = addr_q;

  assign mm_start = ((state_q == S_EVAL) && hit && !b_one_q) ||
                    ((state_q == S_PASS_END) && !d_two_q && !a_one_q && !b_one_q);
  assign mm_a     = (state_q == S_PASS_END) ? a_q : b_q;
  assign mm_b     = (state_q == S_PASS_END) ? b_q : tbl_rdata;
  assign busy     = (state_q != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q    <= S_IDLE;
      d_two_q    <= 1'b1;
      i_q        <= '0;
      it_q       <= '0;
      addr_q     <= '0;
      a_q        <= '0;
      b_q        <= '0;
      a_one_q    <= 1'b1;
      b_one_q    <= 1'b1;
      done       <= 1'b0;
      result     <= '0;
      mult_count <= '0;
    end else begin
      done <= 1'b0;
      unique case (state_q)
        S_IDLE: if (start) begin
          d_two_q    <= 1'b1;
          i_q        <= '0;
          it_q       <= '0;
          addr_q     <= '0;
          a_one_q    <= 1'b1;
          b_one_q    <= 1'b1;
          mult_count <= '0;
          state_q    <= (num_digits == '0) ? S_FINISH : S_READ;
        end
        S_READ: state_q <= S_EVAL;
        S_EVAL: begin
          if (dig_rd == DIG_Q0) begin
            addr_q <= addr_q + 1'b1;
          end else begin
            it_q   <= it_q + 1'b1;
            addr_q <= addr_q + TAW'(cur_row_len);
          end
          i_q <= i_q + 1'b1;
          if (hit && b_one_q) begin
            b_q     <= tbl_rdata;
            b_one_q <= 1'b0;
          end
          if (mm_start) begin
            mult_count <= mult_count + 1'b1;
            state_q    <= S_MUL;
          end else begin
            state_q <= (i_q + 1'b1 == num_digits) ? S_PASS_END : S_READ;
          end
        end
        S_MUL: if (mm_done) begin
          b_q     <= mm_r;
          state_q <= (i_q == num_digits) ? S_PASS_END : S_READ;
        end
        S_PASS_END: begin
          if (d_two_q) begin
            a_q     <= b_q;
            a_one_q <= b_one_q;
            d_two_q <= 1'b0;
            i_q     <= '0;
            it_q    <= '0;
            addr_q  <= '0;
            state_q <= S_READ;
          end else if (a_one_q) begin
            a_q     <= b_q;
            a_one_q <= b_one_q;
            state_q <= S_FINISH;
          end else if (b_one_q) begin
            state_q <= S_FINISH;
          end else begin
            mult_count <= mult_count + 1'b1;
            state_q    <= S_MUL_AB;
          end
        end
        S_MUL_AB: if (mm_done) begin
          a_q     <= mm_r;
          state_q <= S_FINISH;
        end
        S_FINISH: begin
          result  <= a_one_q ? N'(1) : a_q;
          done    <= 1'b1;
          state_q <= S_IDLE;
        end
        default: state_q <= S_IDLE;
      endcase
    end
  end

  a_addr_in_range: assert property (@(posedge clk) disable iff (!rst_n)
    tbl_re |-> (tbl_raddr < TAW'(ENTRIES)));

endmodule
