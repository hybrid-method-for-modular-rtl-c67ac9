// tb_hybrid_exp_ctrl -- self-checking test of hybrid_exp_ctrl at N = 32,
// connected to a digit_buffer, a precomp_table and a mod_mult.
// The testbench itself encodes each exponent into HTQNS digits, writes them to
// the digit buffer, and loads the table with g^(3^it * 5^iq) mod p computed
// by repeated cubing and fifth powers. The result is compared with g^x mod p
// from plain binary square-and-multiply, the multiplication count with
// N1 + N2 (N2 > 0) or max(N1 - 1, 0) (N2 = 0), where N1 and N2 count the ones
// and twos, and the latency, counted in clock edges after the start edge up to the one that
// raises done, with 4m + 3 + (N + 1) * mults (1 for m = 0).
module tb_hybrid_exp_ctrl;
  import htqns_pkg::*;
  localparam int unsigned N       = 32;
  localparam int unsigned MAXD    = max_digits(N);
  localparam int unsigned DAW     = addr_bits(MAXD);
  localparam int unsigned ENTRIES = table_entries(N);
  localparam int unsigned TAW     = addr_bits(ENTRIES);
  localparam int unsigned MCW     = addr_bits(MAXD + 2) + 1;

  logic           clk = 1'b0;
  logic           rst_n = 1'b0;
  logic           start = 1'b0;
  logic [DAW:0]   num_digits = '0;
  logic [N-1:0]   p = N'(7);
  logic           dig_rd_en, tb_dig_we = 1'b0;
  logic [DAW-1:0] dig_rd_addr, tb_dig_waddr = '0;
  htqns_digit_e   dig_rd, tb_dig = DIG_T0;
  logic           tbl_re, tb_tbl_we = 1'b0;
  logic [TAW-1:0] tbl_raddr, tb_tbl_waddr = '0;
  logic [N-1:0]   tbl_rdata, tb_tbl_wdata = '0;
  logic           mm_start, mm_busy, mm_done;
  logic [N-1:0]   mm_a, mm_b, mm_r;
  logic           busy, done;
  logic [N-1:0]   result;
  logic [MCW-1:0] mult_count;
  int unsigned    checks = 0, failures = 0;

  hybrid_exp_ctrl #(.N(N)) dut (
    .clk, .rst_n, .start, .num_digits, .dig_rd_en, .dig_rd_addr, .dig_rd,
    .tbl_re, .tbl_raddr, .tbl_rdata, .mm_start, .mm_a, .mm_b, .mm_done, .mm_r,
    .busy, .done, .result, .mult_count);
  digit_buffer #(.MAXD(MAXD)) u_digits (
    .clk, .wr_en(tb_dig_we), .wr_addr(tb_dig_waddr), .wr_digit(tb_dig),
    .rd_en(dig_rd_en), .rd_addr(dig_rd_addr), .rd_digit(dig_rd));
  precomp_table #(.N(N)) u_table (
    .clk, .we(tb_tbl_we), .waddr(tb_tbl_waddr), .wdata(tb_tbl_wdata),
    .re(tbl_re), .raddr(tbl_raddr), .rdata(tbl_rdata));
  mod_mult #(.N(N)) u_mult (
    .clk, .rst_n, .start(mm_start), .a(mm_a), .b(mm_b), .p, .busy(mm_busy),
    .done(mm_done), .r(mm_r));

  always #5 clk = ~clk;

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [N-1:0] mulmod(logic [N-1:0] a, logic [N-1:0] b);
    logic [2*N-1:0] t;
    t = {{N{1'b0}}, a} * {{N{1'b0}}, b};
    return N'(t % {{N{1'b0}}, p});
  endfunction

  function automatic logic [N-1:0] powmod(logic [N-1:0] g, logic [N-1:0] e);
    logic [N-1:0] r;
    r = N'(1) % p;
    for (int i = N - 1; i >= 0; i--) begin
      r = mulmod(r, r);
      if (e[i]) r = mulmod(r, g);
    end
    return r;
  endfunction

  task automatic load_table(logic [N-1:0] g);
    logic [N+3:0] w3, w;
    logic [N-1:0] f3, f;
    int unsigned  a;
    a = 0;
    w3 = 1;
    f3 = g;
    while (w3 < ((N+4)'(1) << N)) begin
      w = w3;
      f = f3;
      while (w < ((N+4)'(1) << N)) begin
        @(negedge clk);
        tb_tbl_we = 1'b1; tb_tbl_waddr = TAW'(a); tb_tbl_wdata = f;
        a++;
        w = w * 5;
        f = mulmod(mulmod(mulmod(f, f), mulmod(f, f)), f);
      end
      w3 = w3 * 3;
      f3 = mulmod(mulmod(f3, f3), f3);
    end
    @(negedge clk);
    tb_tbl_we = 1'b0;
    checks++;
    if (a != ENTRIES) begin
      failures++;
      $display("FAIL table holds %0d words, loaded %0d", ENTRIES, a);
    end
  endtask

  int unsigned n_q_ops = 0, n_no_two = 0, n_final_mul = 0, n_zero = 0;

  task automatic run(logic [N-1:0] x, logic [N-1:0] g);
    logic [N-1:0] v, want;
    int unsigned  m, n1, n2, nq, want_mults, want_cyc, cyc;
    htqns_digit_e d;
    v = x; m = 0; n1 = 0; n2 = 0; nq = 0;
    while (v != 0) begin
      if (v % 5 == 0) begin
        d = DIG_Q0; v = v / 5; nq++;
      end else begin
        d = htqns_digit_e'(2'(v % 3)); v = v / 3;
        if (d == DIG_T1) n1++;
        if (d == DIG_T2) n2++;
      end
      @(negedge clk);
      tb_dig_we = 1'b1; tb_dig_waddr = DAW'(m); tb_dig = d;
      m++;
    end
    @(negedge clk);
    tb_dig_we = 1'b0;
    want_mults = (n2 > 0) ? n1 + n2 : ((n1 > 0) ? n1 - 1 : 0);
    want_cyc = (m == 0) ? 1 : 4 * m + 3 + (N + 1) * want_mults;
    if (nq > 0) n_q_ops++;
    if (n2 == 0 && n1 > 0) n_no_two++;
    if (n2 > 0) n_final_mul++;
    if (m == 0) n_zero++;
    num_digits = (DAW+1)'(m);
    start = 1'b1;
    @(posedge clk);
    #1 start = 1'b0;
    cyc = 0;
    do begin
      @(posedge clk);
      #1 cyc++;
    end while (!done && cyc < 100 * N * N);
    want = powmod(g, x);
    checks++;
    if (result !== want) begin
      failures++;
      $display("FAIL g=%0d x=%0d p=%0d: got %0d want %0d", g, x, p, result, want);
    end
    checks++;
    if (int'(mult_count) != want_mults) begin
      failures++;
      $display("FAIL x=%0d: %0d multiplications, want %0d", x, mult_count, want_mults);
    end
    checks++;
    if (cyc != want_cyc) begin
      failures++;
      $display("FAIL x=%0d: latency %0d, want %0d", x, cyc, want_cyc);
    end
  endtask

  initial begin
    logic [N-1:0] g;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 4; t++) begin
      p = {1'b1, N'($urandom)} | N'(t == 0);
      g = N'($urandom) % p;
      if (g < 2) g = 2;
      load_table(g);
      run(N'(47), g);
      run('0, g);
      run(N'(1), g);
      run(N'(2), g);
      run(N'(3), g);
      run(N'(25), g);
      run(N'(4), g);
      run('1, g);
      run(N'(1220703125), g);  // 5^13
      for (int k = 0; k < 25; k++) run(N'($urandom) >> ($urandom % N), g);
    end
    checks++;
    if (n_q_ops == 0 || n_no_two == 0 || n_final_mul == 0 || n_zero == 0) begin
      failures++;
      $display("FAIL a case was not exercised: quinary %0d, no-two %0d, final %0d, zero %0d",
               n_q_ops, n_no_two, n_final_mul, n_zero);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
