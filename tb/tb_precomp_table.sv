// tb_precomp_table -- self-checking test of precomp_table at N = 64
// (591 words). Checks that the default depth equals the number of pairs
// (it, iq) with 3^it * 5^iq < 2^64, counted here by brute force; then fills
// the table with random words, reads them back in random order with one cycle
// of latency, and checks that a write does not disturb other words.
module tb_precomp_table;
  import htqns_pkg::*;
  localparam int unsigned N       = 64;
  localparam int unsigned ENTRIES = table_entries(N);
  localparam int unsigned TAW     = addr_bits(ENTRIES);

  logic           clk = 1'b0;
  logic           we = 1'b0, re = 1'b0;
  logic [TAW-1:0] waddr = '0, raddr = '0;
  logic [N-1:0]   wdata = '0, rdata;
  logic [N-1:0]   model [ENTRIES];
  int unsigned    checks = 0, failures = 0;

  precomp_table #(.N(N)) dut (.clk, .we, .waddr, .wdata, .re, .raddr, .rdata);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic write(int unsigned a, logic [N-1:0] d);
    @(negedge clk);
    we = 1'b1; waddr = TAW'(a); wdata = d;
    model[a] = d;
    @(negedge clk);
    we = 1'b0;
  endtask

  task automatic read(int unsigned a);
    @(negedge clk);
    re = 1'b1; raddr = TAW'(a);
    @(negedge clk);
    re = 1'b0;
    checks++;
    if (rdata !== model[a]) begin
      failures++;
      $display("FAIL word %0d: got %h want %h", a, rdata, model[a]);
    end
  endtask

  initial begin
    logic [N+3:0] w3, w;
    int unsigned  pairs;
    // Brute-force count of stored values for a 64-bit modulus.
    pairs = 0;
    w3 = 1;
    while (w3 < (68'(1) << N)) begin
      w = w3;
      while (w < (68'(1) << N)) begin
        pairs++;
        w = w * 5;
      end
      w3 = w3 * 3;
    end
    checks++;
    if (pairs != ENTRIES || ENTRIES != 591) begin
      failures++;
      $display("FAIL table depth %0d, brute-force count %0d", ENTRIES, pairs);
    end
    for (int a = 0; a < ENTRIES; a++) write(a, {$urandom, $urandom});
    for (int k = 0; k < 800; k++) read($urandom % ENTRIES);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
