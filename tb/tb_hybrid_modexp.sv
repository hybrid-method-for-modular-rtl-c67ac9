// tb_hybrid_modexp -- end-to-end test of hybrid_modexp at its default size,
// a 512-bit modulus (no parameter is overridden).
//
// The testbench loads the 35888-word table with g^(3^it * 5^iq) mod p, row by
// row, computing each word by cubing or raising to the fifth power, then runs
// exponents through the whole design: the worked example 47, zero, small
// exponents that have only ones or only twos, powers of five, 2^512 - 1, and
// 64 random 512-bit exponents. For each it checks
//   - the result against g^x mod p from binary square-and-multiply,
//   - the HTQNS digit count against a reference encoding,
//   - the multiplication count: N1 + N2 if there is a two, else max(N1-1, 0),
//   - the latency: 5m + 5 + 513 * mults clock edges after the start edge up
//     to the one that raises done (3 for x = 0).
// It counts how often each mechanism occurred (quinary digits, a pass with no
// multiplication, a skipped multiplication by one, the final a * b product,
// x = 0) and fails if one never did. Over the random exponents it reports the
// average multiplications per exponent bit and digits per bit, and checks them
// against the expected 0.325 and 0.585 within 0.015.
module tb_hybrid_modexp;
  import htqns_pkg::*;
  localparam int unsigned N       = 512;
  localparam int unsigned MAXD    = max_digits(N);
  localparam int unsigned DAW     = addr_bits(MAXD);
  localparam int unsigned ENTRIES = table_entries(N);
  localparam int unsigned TAW     = addr_bits(ENTRIES);
  localparam int unsigned MCW     = addr_bits(MAXD + 2) + 1;
  localparam int unsigned NRAND   = 64;

  logic           clk = 1'b0;
  logic           rst_n = 1'b0;
  logic           tbl_we = 1'b0;
  logic [TAW-1:0] tbl_waddr = '0;
  logic [N-1:0]   tbl_wdata = '0;
  logic           start = 1'b0;
  logic [N-1:0]   x = '0, p = '0;
  logic           busy, done;
  logic [N-1:0]   result;
  logic [MCW-1:0] mult_count;
  logic [DAW:0]   num_digits;
  int unsigned    checks = 0, failures = 0;

  hybrid_modexp dut (.clk, .rst_n, .tbl_we, .tbl_waddr, .tbl_wdata, .start, .x, .p, .busy,
                     .done, .result, .mult_count, .num_digits);

  always #5 clk = ~clk;

  initial begin
    repeat (20000000) @(posedge clk);
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

  function automatic logic [N-1:0] rnd();
    logic [N-1:0] v;
    for (int w = 0; w < N / 32; w++) v[w*32 +: 32] = $urandom;
    return v;
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
        tbl_we = 1'b1; tbl_waddr = TAW'(a); tbl_wdata = f;
        a++;
        w = w * 5;
        f = mulmod(mulmod(mulmod(f, f), mulmod(f, f)), f);
      end
      w3 = w3 * 3;
      f3 = mulmod(mulmod(f3, f3), f3);
    end
    @(negedge clk);
    tbl_we = 1'b0;
    checks++;
    if (a != ENTRIES || ENTRIES != 35888) begin
      failures++;
      $display("FAIL table holds %0d words, loaded %0d", ENTRIES, a);
    end
  endtask

  int unsigned n_quinary = 0, n_empty_pass = 0, n_copy = 0, n_final_mul = 0, n_zero = 0;
  int unsigned last_mults, last_digits;

  task automatic run(logic [N-1:0] tx, logic [N-1:0] g);
    logic [N-1:0] v, want;
    int unsigned  m, n1, n2, nq, want_mults, want_cyc, cyc;
    v = tx; m = 0; n1 = 0; n2 = 0; nq = 0;
    while (v != 0) begin
      if (v % 5 == 0) begin
        v = v / 5; nq++;
      end else begin
        if (v % 3 == 1) n1++;
        if (v % 3 == 2) n2++;
        v = v / 3;
      end
      m++;
    end
    want_mults = (n2 > 0) ? n1 + n2 : ((n1 > 0) ? n1 - 1 : 0);
    want_cyc = (m == 0) ? 3 : 5 * m + 5 + (N + 1) * want_mults;
    if (nq > 0) n_quinary++;
    if (n2 == 0 || n1 == 0) n_empty_pass++;
    if (n1 + n2 > 0) n_copy++;
    if (n2 > 0) n_final_mul++;
    if (m == 0) n_zero++;
    @(negedge clk);
    x = tx;
    start = 1'b1;
    @(posedge clk);
    #1 start = 1'b0;
    cyc = 0;
    do begin
      @(posedge clk);
      #1 cyc++;
    end while (!done && cyc < 4 * N * N);
    want = powmod(g, tx);
    checks++;
    if (result !== want) begin
      failures++;
      $display("FAIL x=%h: result %h want %h", tx, result, want);
    end
    checks++;
    if (int'(num_digits) != m) begin
      failures++;
      $display("FAIL x=%h: %0d digits, want %0d", tx, num_digits, m);
    end
    checks++;
    if (int'(mult_count) != want_mults) begin
      failures++;
      $display("FAIL x=%h: %0d multiplications, want %0d", tx, mult_count, want_mults);
    end
    checks++;
    if (cyc != want_cyc) begin
      failures++;
      $display("FAIL x=%h: latency %0d, want %0d", tx, cyc, want_cyc);
    end
    last_mults = int'(mult_count);
    last_digits = m;
  endtask

  initial begin
    logic [N-1:0] g, v;
    real          sum_mults, sum_digits, mpb, dpb;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    p = rnd();
    p[N-1] = 1'b1;
    p[0] = 1'b1;
    g = rnd() % p;
    load_table(g);
    $display("table loaded: %0d words", ENTRIES);
    run(N'(47), g);
    checks++;
    if (last_digits != 4 || last_mults != 2) begin
      failures++;
      $display("FAIL 47 should take 4 digits and 2 multiplications");
    end
    run('0, g);
    run(N'(1), g);
    run(N'(2), g);
    run(N'(4), g);
    run(N'(13), g);
    v = N'(1);
    for (int k = 0; k < 220; k++) v = v * N'(5);
    run(v, g);
    run(v * N'(2), g);
    run('1, g);
    sum_mults = 0.0;
    sum_digits = 0.0;
    for (int k = 0; k < NRAND; k++) begin
      run(rnd(), g);
      sum_mults += real'(last_mults);
      sum_digits += real'(last_digits);
    end
    mpb = sum_mults / (NRAND * N);
    dpb = sum_digits / (NRAND * N);
    $display("random %0d-bit exponents: %0.4f multiplications per bit, %0.4f digits per bit",
             N, mpb, dpb);
    checks++;
    if (mpb < 0.31 || mpb > 0.34 || dpb < 0.57 || dpb > 0.60) begin
      failures++;
      $display("FAIL averages outside the expected range");
    end
    $display("mechanisms: quinary digits %0d, pass without multiplication %0d, one-copy %0d, final product %0d, x=0 %0d",
             n_quinary, n_empty_pass, n_copy, n_final_mul, n_zero);
    checks++;
    if (n_quinary == 0 || n_empty_pass == 0 || n_copy == 0 || n_final_mul == 0 || n_zero == 0) begin
      failures++;
      $display("FAIL a mechanism never occurred");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
