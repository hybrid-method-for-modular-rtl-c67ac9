// tb_digit_buffer -- self-checking test of digit_buffer at its default depth
// of 324 digits. Fills every word with random digits, then reads them back in
// random order and in sequence, checking the data and the one-cycle read
// latency (a read issued on one edge is visible after it and holds while
// rd_en is low). Also overwrites a few words and reads them again.
module tb_digit_buffer;
  import htqns_pkg::*;
  localparam int unsigned MAXD = 324;
  localparam int unsigned DAW  = addr_bits(MAXD);

  logic           clk = 1'b0;
  logic           wr_en = 1'b0, rd_en = 1'b0;
  logic [DAW-1:0] wr_addr = '0, rd_addr = '0;
  htqns_digit_e   wr_digit = DIG_T0, rd_digit;
  htqns_digit_e   model [MAXD];
  int unsigned    checks = 0, failures = 0;

  digit_buffer #(.MAXD(MAXD)) dut (.clk, .wr_en, .wr_addr, .wr_digit, .rd_en, .rd_addr,
                                   .rd_digit);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic write(int unsigned a, htqns_digit_e d);
    @(negedge clk);
    wr_en = 1'b1; wr_addr = DAW'(a); wr_digit = d;
    model[a] = d;
    @(negedge clk);
    wr_en = 1'b0;
  endtask

  task automatic read(int unsigned a);
    htqns_digit_e held;
    @(negedge clk);
    rd_en = 1'b1; rd_addr = DAW'(a);
    @(negedge clk);
    rd_en = 1'b0;
    rd_addr = DAW'(($urandom % MAXD));
    checks++;
    if (rd_digit != model[a]) begin
      failures++;
      $display("FAIL word %0d: got %s want %s", a, rd_digit.name(), model[a].name());
    end
    held = rd_digit;
    @(negedge clk);
    checks++;
    if (rd_digit != held) begin
      failures++;
      $display("FAIL read data changed while rd_en was low");
    end
  endtask

  initial begin
    for (int a = 0; a < MAXD; a++) write(a, htqns_digit_e'(2'($urandom)));
    for (int k = 0; k < 400; k++) read($urandom % MAXD);
    for (int k = 0; k < 20; k++) write($urandom % MAXD, htqns_digit_e'(2'($urandom)));
    for (int a = 0; a < MAXD; a++) read(a);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
