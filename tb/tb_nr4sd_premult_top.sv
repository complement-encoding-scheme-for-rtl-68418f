// tb_nr4sd_premult_top -- end-to-end test of the pre-encoded NR4SD multiplier
// system at its default size (N = 16, 512-word ROM, NR4SD- digits).
//
// Streams random operands A against every coefficient of the ROM in one
// operation, then runs shorter operations (address wrap-around, a single
// word, a count of 0, a start pulse while busy).  Every product is compared
// with A * B, B taken from the built-in coefficient set; the latency from
// a_take to p_valid must be 2 cycles and the operation must take one
// coefficient per cycle.  It also counts how often each mechanism occurred:
// each NR4SD digit value, each Booth top-digit value, negative products,
// address wrap-around, idle cycles (ROM chip enable off), ignored start
// pulses and words checked on the side pre-encoder; a mechanism that never occurred counts as a failure.
module tb_nr4sd_premult_top;
  import nr4sd_pkg::*;
  import tb_ref_pkg::*;

  localparam int N = 16, DEPTH = 512, AW = 9, LAT = 2;

  logic           clk = 1'b0, rst_n = 1'b0;
  logic           start = 1'b0;
  logic [AW-1:0]  base_addr = '0;
  logic [AW:0]    count = '0;
  logic [N-1:0]   a_in = '0;
  logic           a_take, busy, p_valid, p_last, done;
  logic [2*N-1:0] p;
  logic [N-1:0]   coef_in = '0;
  logic [N:0]     coef_enc;
  int checks = 0, failures = 0, cyc = 0;

  // mechanism counters
  int nr_digit_seen [4];      // NR4SD- digit values -2, -1, 0, +1
  int mb_digit_seen [5];      // top digit values -2 .. +2
  int neg_products = 0, wraps = 0, idle_rom = 0, ignored_starts = 0;
  int next_addr = 0;          // address the next operand belongs to
  int conversions = 0;        // words checked on the side pre-encoder

  nr4sd_premult_top dut (
    .clk(clk), .rst_n(rst_n), .start(start), .base_addr(base_addr), .count(count),
    .a_in(a_in), .a_take(a_take), .busy(busy), .p(p), .p_valid(p_valid),
    .p_last(p_last), .done(done), .coef_in(coef_in), .coef_enc(coef_enc));

  always #5 clk = ~clk;

  typedef struct {
    longint expected;
    int     issue_cycle;
  } pending_t;
  pending_t pending[$];

  task automatic fail(string msg);
    failures++;
    $display("cycle %0d: %s", cyc, msg);
  endtask

  // Reference: record every issue (A and its coefficient), check every result.
  always @(posedge clk) begin
    cyc++;
    // side pre-encoder: the word must decode to the coefficient
    checks++;
    if (decode(128'(coef_enc), N, 1'b0) != sext(64'(coef_in), N))
      fail($sformatf("pre-encoder: %h does not encode %0d", coef_enc, sext(64'(coef_in), N)));
    else conversions++;
    if (rst_n && !busy) idle_rom++;
    if (rst_n && a_take) begin
      longint bv;
      logic [N:0] w;
      int addr_i;
      addr_i = next_addr % DEPTH;
      next_addr++;
      bv = sext(coef_value(0, addr_i, N), N);
      w  = (N+1)'(preencode(coef_value(0, addr_i, N), N, NR4SD_MINUS));
      for (int j = 0; j < N / 2 - 1; j++) nr_digit_seen[digit_of(128'(w), N, j, 1'b0) + 2]++;
      mb_digit_seen[digit_of(128'(w), N, N / 2 - 1, 1'b0) + 2]++;
      pending.push_back('{bv * sext(64'(a_in), N), cyc});
    end
    if (rst_n && p_valid) begin
      pending_t e;
      checks += 2;
      if (pending.size() == 0) fail("result without an operand");
      else begin
        e = pending.pop_front();
        if (cyc - e.issue_cycle != LAT) fail($sformatf("latency %0d", cyc - e.issue_cycle));
        if (sext(64'(p), 2 * N) != e.expected)
          fail($sformatf("P = %0d expected %0d", sext(64'(p), 2 * N), e.expected));
        if (e.expected < 0) neg_products++;
      end
    end
  end

  task automatic run(int base, int n, bit poke_start);
    int first = -1, last = -1, takes = 0, dones = 0;
    @(negedge clk);
    base_addr = AW'(base);
    count     = (AW+1)'(n);
    start     = 1'b1;
    next_addr = base;
    if (base + n > DEPTH) wraps++;
    @(negedge clk);
    start = 1'b0;
    while (busy) begin
      a_in    = N'($urandom);
      coef_in = N'($urandom);
      if (poke_start && takes == 3) begin
        start = 1'b1;
        base_addr = AW'(base + 11);
        ignored_starts++;
      end else start = 1'b0;
      @(posedge clk);
      if (a_take) begin
        if (first < 0) first = cyc;
        last = cyc;
        takes++;
      end
      if (done) dones++;
      @(negedge clk);
    end
    start = 1'b0;
    checks += 3;
    if (takes != n) fail($sformatf("%0d operands taken for count %0d", takes, n));
    if (n > 0 && last - first != n - 1) fail($sformatf("%0d words took %0d cycles", n, last - first + 1));
    if (dones != (n > 0 ? 1 : 0)) fail("done not pulsed once");
    repeat (2) @(negedge clk);
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    run(0, DEPTH, 1'b0);       // one complete pass over the coefficient ROM
    run(500, 30, 1'b1);        // wraps to address 0; start while busy
    run(77, 1, 1'b0);
    run(200, 0, 1'b0);
    run(3, 64, 1'b1);
    checks++;
    if (pending.size() != 0) fail("operands without a result");
    for (int v = 0; v < 4; v++) begin
      checks++;
      if (nr_digit_seen[v] == 0) fail($sformatf("NR4SD digit %0d never used", v - 2));
    end
    for (int v = 0; v < 5; v++) begin
      checks++;
      if (mb_digit_seen[v] == 0) fail($sformatf("top digit %0d never used", v - 2));
    end
    checks += 5;
    if (conversions == 0) fail("no pre-encoder conversion");
    if (neg_products == 0) fail("no negative product");
    if (wraps == 0) fail("no address wrap-around");
    if (idle_rom == 0) fail("no idle ROM cycle");
    if (ignored_starts == 0) fail("no start pulse while busy");
    $display("mechanisms: NR4SD digits -2/-1/0/+1 %0d/%0d/%0d/%0d, top digits -2..2 %0d/%0d/%0d/%0d/%0d",
             nr_digit_seen[0], nr_digit_seen[1], nr_digit_seen[2], nr_digit_seen[3],
             mb_digit_seen[0], mb_digit_seen[1], mb_digit_seen[2], mb_digit_seen[3], mb_digit_seen[4]);
    $display("mechanisms: negative products %0d, wraps %0d, idle ROM cycles %0d, ignored starts %0d, pre-encoded words %0d",
             neg_products, wraps, idle_rom, ignored_starts, conversions);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
