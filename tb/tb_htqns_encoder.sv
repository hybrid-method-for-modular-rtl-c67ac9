// tb_htqns_encoder -- self-checking test of htqns_encoder at its default
// N = 512. A reference encoder in the testbench applies the digit rule with
// the % and / operators on 512-bit numbers; every written digit, its address,
// the digit count and the m + 1 cycle latency are compared. Cases: the worked
// example 47 -> base 3,5,3,3 / digit 2,0,0,1, zero, one, 2^512 - 1, a pure
// power of five, and random exponents of random length.
module tb_htqns_encoder;
  import htqns_pkg::*;
  localparam int unsigned N    = 512;
  localparam int unsigned MAXD = max_digits(N);
  localparam int unsigned DAW  = addr_bits(MAXD);

  logic           clk = 1'b0;
  logic           rst_n = 1'b0;
  logic           start = 1'b0;
  logic [N-1:0]   x = '0;
  logic           busy, done, wr_en;
  logic [DAW-1:0] wr_addr;
  htqns_digit_e   wr_digit;
  logic [DAW:0]   num_digits;
  int unsigned    checks = 0, failures = 0;

  htqns_digit_e got [MAXD];
  int unsigned  n_written;

  htqns_encoder #(.N(N)) dut (.clk, .rst_n, .start, .x, .busy, .done, .wr_en,
                              .wr_addr, .wr_digit, .num_digits);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Capture the write port.
  always @(posedge clk) if (wr_en && rst_n) begin
    if (int'(wr_addr) != n_written) begin
      failures++;
      $display("FAIL write address %0d, expected %0d", wr_addr, n_written);
    end
    if (int'(wr_addr) < MAXD) got[wr_addr] = wr_digit;
    n_written++;
  end

  task automatic run(logic [N-1:0] tx);
    logic [N-1:0] v;
    int unsigned  m, cyc;
    htqns_digit_e want [MAXD];
    v = tx;
    m = 0;
    while (v != 0) begin
      if (v % 5 == 0) begin
        want[m] = DIG_Q0;
        v = v / 5;
      end else begin
        want[m] = htqns_digit_e'(2'(v % 3));
        v = v / 3;
      end
      m++;
    end
    @(negedge clk);
    n_written = 0;
    x = tx;
    start = 1'b1;
    @(posedge clk);
    #1 start = 1'b0;
    cyc = 0;
    do begin
      @(posedge clk);
      #1 cyc++;
    end while (!done && cyc < 2 * MAXD);
    checks++;
    if (int'(num_digits) != m || n_written != m) begin
      failures++;
      $display("FAIL x=%0d: %0d digits reported, %0d written, want %0d", tx, num_digits,
               n_written, m);
    end
    for (int i = 0; i < m; i++) begin
      checks++;
      if (got[i] != want[i]) begin
        failures++;
        $display("FAIL x=%0d digit %0d: got %s want %s", tx, i, got[i].name(), want[i].name());
      end
    end
    checks++;
    if (cyc != m + 1) begin
      failures++;
      $display("FAIL x=%0d latency %0d, want %0d", tx, cyc, m + 1);
    end
  endtask

  initial begin
    logic [N-1:0] v;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    // Worked example from the method's description.
    run(N'(47));
    checks++;
    if (got[0] != DIG_T2 || got[1] != DIG_Q0 || got[2] != DIG_T0 || got[3] != DIG_T1) begin
      failures++;
      $display("FAIL 47 is not base 3,5,3,3 / digit 2,0,0,1");
    end
    run('0);
    run(N'(1));
    run(N'(15));
    run('1);
    v = N'(1);
    for (int k = 0; k < 200; k++) v = v * N'(5);
    run(v);
    for (int k = 0; k < 40; k++) begin
      for (int w = 0; w < N / 32; w++) v[w*32 +: 32] = $urandom;
      v = v >> ($urandom % N);
      run(v);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
