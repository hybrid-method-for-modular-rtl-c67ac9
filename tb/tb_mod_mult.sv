// tb_mod_mult -- self-checking test of mod_mult at N = 64.
// Compares r with (a * b) % p computed on 128-bit numbers, for edge cases
// (zero, one, p - 1, the smallest moduli, even and odd p) and random operands,
// and checks the start-to-done latency of N + 1 cycles.
module tb_mod_mult;
  localparam int unsigned N = 64;

  logic         clk = 1'b0;
  logic         rst_n = 1'b0;
  logic         start = 1'b0;
  logic [N-1:0] a = '0, b = '0, p = 64'd7;
  logic         busy, done;
  logic [N-1:0] r;
  int unsigned  checks = 0, failures = 0;

  mod_mult #(.N(N)) dut (.clk, .rst_n, .start, .a, .b, .p, .busy, .done, .r);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [N-1:0] ref_mulmod(logic [N-1:0] x, logic [N-1:0] y,
                                              logic [N-1:0] m);
    logic [2*N-1:0] t;
    t = {{N{1'b0}}, x} * {{N{1'b0}}, y};
    return N'(t % {{N{1'b0}}, m});
  endfunction

  task automatic run(logic [N-1:0] ta, logic [N-1:0] tb_, logic [N-1:0] tp);
    int unsigned cyc;
    logic [N-1:0] exp_r;
    @(negedge clk);
    a = ta; b = tb_; p = tp; start = 1'b1;
    @(posedge clk);
    #1 start = 1'b0;
    cyc = 0;
    do begin
      @(posedge clk);
      #1 cyc++;
    end while (!done && cyc < 10 * N);
    exp_r = ref_mulmod(ta, tb_, tp);
    checks++;
    if (r !== exp_r) begin
      failures++;
      $display("FAIL %h * %h mod %h: got %h want %h", ta, tb_, tp, r, exp_r);
    end
    checks++;
    if (cyc != N) begin
      failures++;
      $display("FAIL latency %0d cycles after the start edge, want %0d", cyc, N);
    end
  endtask

  function automatic logic [N-1:0] rnd();
    return {$urandom, $urandom};
  endfunction

  initial begin
    logic [N-1:0] tp;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    run(0, 0, 2);
    run(1, 1, 2);
    run(2, 2, 3);
    run(64'hFFFF_FFFF_FFFF_FFFE, 64'hFFFF_FFFF_FFFF_FFFE, 64'hFFFF_FFFF_FFFF_FFFF);
    run(64'hFFFF_FFFF_FFFF_FFFD, 64'h1, 64'hFFFF_FFFF_FFFF_FFFE);
    run(12345, 0, 99991);
    for (int k = 0; k < 300; k++) begin
      tp = rnd();
      if (k % 3 == 0) tp = tp >> ($urandom % 60);
      if (tp < 2) tp = 2;
      if (k % 2 == 0) tp[0] = 1'b1;
      run(rnd() % tp, rnd() % tp, tp);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
