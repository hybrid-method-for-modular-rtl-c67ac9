// hybrid_modexp -- fixed-base modular exponentiation g^x mod P using the
// hybrid ternary-quinary number system (HTQNS) and a table of precomputed
// powers of g.
//
// Structure: htqns_encoder turns the binary exponent x into HTQNS digits,
// one per clock, into digit_buffer. hybrid_exp_ctrl then makes two passes
// over the digits, reading precomp_table and driving one mod_mult, and needs
// on average about 0.325 N modular multiplications for an N-bit exponent.
//
// Use: first load the table through tbl_we / tbl_waddr / tbl_wdata with
// F[it][iq] = g^(3^it * 5^iq) mod P for every 3^it * 5^iq < 2^N, row by row
// (it outer, iq inner, see precomp_table). Then pulse start with x and p
// valid; p must stay stable until done and satisfy p > 1, with the table
// entries reduced below p. done pulses for one cycle; result (g^x mod p),
// mult_count (modular multiplications used) and num_digits (HTQNS length of x)
// then hold until the next start. start is ignored while busy.
// Timing: m + 1 cycles of encoding, one cycle of hand-over, then two cycles
// per digit and pass plus N + 1 cycles per multiplication;
// from the start edge to the edge that raises done: 5m + 5 + (N + 1) * mult_count
// cycles for m > 0 digits, 3 cycles for x = 0.
//
// The digit rule, the two-pass product and the table contents follow the
// hybrid ternary-quinary method; the block split, the shared bit-serial
// multiplier, the packed table layout and all handshakes are this design's.
module hybrid_modexp
  import htqns_pkg::*;
#(
  parameter int unsigned N       = 512,
  parameter int unsigned MAXD    = max_digits(N),
  parameter int unsigned DAW     = addr_bits(MAXD),
  parameter int unsigned ENTRIES = table_entries(N),
  parameter int unsigned TAW     = addr_bits(ENTRIES),
  parameter int unsigned MCW     = addr_bits(MAXD + 2) + 1
) (
  input  logic           clk,
  input  logic           rst_n,
  // table load port
  input  logic           tbl_we,
  input  logic [TAW-1:0] tbl_waddr,
  input  logic [N-1:0]   tbl_wdata,
  // operation
  input  logic           start,
  input  logic [N-1:0]   x,
  input  logic [N-1:0]   p,
  output logic           busy,
  output logic           done,
  output logic [N-1:0]   result,
  output logic [MCW-1:0] mult_count,
  output logic [DAW:0]   num_digits
);
  logic           enc_busy, enc_done, enc_we;
  logic [DAW-1:0] enc_waddr;
  htqns_digit_e   enc_digit;

  logic           dig_re;
  logic [DAW-1:0] dig_raddr;
  htqns_digit_e   dig_rdata;

  logic           tbl_re;
  logic [TAW-1:0] tbl_raddr;
  logic [N-1:0]   tbl_rdata;

  logic           mm_start, mm_busy, mm_done;
  logic [N-1:0]   mm_a, mm_b, mm_r;

  logic           ctrl_busy;

  htqns_encoder #(.N(N), .MAXD(MAXD), .DAW(DAW)) u_encoder (
    .clk, .rst_n,
    .start      (start && !busy),
    .x,
    .busy       (enc_busy),
    .done       (enc_done),
    .wr_en      (enc_we),
    .wr_addr    (enc_waddr),
    .wr_digit   (enc_digit),
    .num_digits (num_digits)
  );

  digit_buffer #(.MAXD(MAXD), .DAW(DAW)) u_digits (
    .clk,
    .wr_en    (enc_we),
    .wr_addr  (enc_waddr),
    .wr_digit (enc_digit),
    .rd_en    (dig_re),
    .rd_addr  (dig_raddr),
    .rd_digit (dig_rdata)
  );

  precomp_table #(.N(N), .ENTRIES(ENTRIES), .TAW(TAW)) u_table (
    .clk,
    .we    (tbl_we),
    .waddr (tbl_waddr),
    .wdata (tbl_wdata),
    .re    (tbl_re),
    .raddr (tbl_raddr),
    .rdata (tbl_rdata)
  );

  hybrid_exp_ctrl #(.N(N), .MAXD(MAXD), .DAW(DAW), .ENTRIES(ENTRIES), .TAW(TAW),
                    .MCW(MCW)) u_ctrl (
    .clk, .rst_n,
    .start       (enc_done),
    .num_digits  (num_digits),
    .dig_rd_en   (dig_re),
    .dig_rd_addr (dig_raddr),
    .dig_rd      (dig_rdata),
    .tbl_re      (tbl_re),
    .tbl_raddr   (tbl_raddr),
    .tbl_rdata   (tbl_rdata),
    .mm_start    (mm_start),
    .mm_a        (mm_a),
    .mm_b        (mm_b),
    .mm_done     (mm_done),
    .mm_r        (mm_r),
    .busy        (ctrl_busy),
    .done        (done),
    .result      (result),
    .mult_count  (mult_count)
  );

  mod_mult #(.N(N)) u_mult (
    .clk, .rst_n,
    .start (mm_start),
    .a     (mm_a),
    .b     (mm_b),
    .p     (p),
    .busy  (mm_busy),
    .done  (mm_done),
    .r     (mm_r)
  );

  // enc_done and the controller's start are the same cycle, so busy has no gap.
  assign busy = enc_busy || enc_done || ctrl_busy;

  a_no_load_while_busy: assert property (@(posedge clk) disable iff (!rst_n)
    busy |-> !tbl_we);
  a_mult_idle_on_start: assert property (@(posedge clk) disable iff (!rst_n)
    mm_start |-> !mm_busy);

endmodule
