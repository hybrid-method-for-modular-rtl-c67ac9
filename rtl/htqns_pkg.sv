// htqns_pkg -- shared types and size functions for the hybrid ternary-quinary
// (HTQNS) modular exponentiator.
//
// An exponent x is rewritten as a string of digits, least significant first.
// A position is either quinary (base 5, always digit 0) or ternary (base 3,
// digit 0, 1 or 2); the weight of a position is 3^it * 5^iq, where it and iq
// count the ternary and quinary positions below it. The precomputed table holds
// F[it][iq] = g^(3^it * 5^iq) mod P for every weight below 2^N, stored row by
// row (it = row, iq = column), each row holding only the columns whose weight
// is below 2^N. That packing is this design's choice; the digit rules and the
// weight bound come from the method itself.
//
// The functions below size the digit buffer and the table at elaboration time
// with exact integer arithmetic on BIGW-bit numbers (moduli up to BIGW-8 bits).
package htqns_pkg;

  // One HTQNS position: base[i] and digit[i] in 2 bits.
  typedef enum logic [1:0] {
    DIG_T0 = 2'd0,  // base 3, digit 0
    DIG_T1 = 2'd1,  // base 3, digit 1
    DIG_T2 = 2'd2,  // base 3, digit 2
    DIG_Q0 = 2'd3   // base 5, digit 0
  } htqns_digit_e;

  localparam int unsigned BIGW = 2056;
  typedef logic [BIGW-1:0] big_t;

  // Largest number of HTQNS digits of an n-bit exponent: every digit divides
  // the remaining quotient by at least 3, so it is the least m with 3^m >= 2^n.
  function automatic int unsigned max_digits(int unsigned n);
    big_t p, lim;
    int unsigned m;
    p = big_t'(1);
    lim = big_t'(1) << n;
    m = 0;
    while (p < lim) begin
      p = p * big_t'(3);
      m++;
    end
    return m;
  endfunction

  // Number of table rows: ternary exponents it with 3^it < 2^n.
  function automatic int unsigned table_rows(int unsigned n);
    big_t p, lim;
    int unsigned r;
    p = big_t'(1);
    lim = big_t'(1) << n;
    r = 0;
    while (p < lim) begin
      p = p * big_t'(3);
      r++;
    end
    return r;
  endfunction

  // Length of table row k: quinary exponents iq with 3^k * 5^iq < 2^n.
  function automatic int unsigned row_len(int unsigned n, int unsigned k);
    big_t p, lim;
    int unsigned q;
    p = big_t'(1);
    lim = big_t'(1) << n;
    for (int unsigned j = 0; j < k; j++) p = p * big_t'(3);
    q = 0;
    while (p < lim) begin
      p = p * big_t'(5);
      q++;
    end
    return q;
  endfunction

  // Total number of stored values: pairs (it, iq) with 3^it * 5^iq < 2^n.
  function automatic int unsigned table_entries(int unsigned n);
    big_t p3, p, lim;
    int unsigned cnt;
    p3 = big_t'(1);
    lim = big_t'(1) << n;
    cnt = 0;
    while (p3 < lim) begin
      p = p3;
      while (p < lim) begin
        p = p * big_t'(5);
        cnt++;
      end
      p3 = p3 * big_t'(3);
    end
    return cnt;
  endfunction

  // Bits needed to address 'depth' words (at least 1).
  function automatic int unsigned addr_bits(int unsigned depth);
    return (depth > 1) ? $clog2(depth) : 1;
  endfunction

endpackage
