// tb_mult_ctrl -- controller check (AW = 4, LAT = 2).  Runs operations with
// several counts, including a full wrap of the address space and a count of
// 0: every issued address must follow base, base+1, ... modulo 16, the read
// enable must equal 'issue', exactly 'count' reads must happen, out_valid
// must follow each issue by LAT cycles, out_last/done must mark the last one,
// and a start pulse while busy must be ignored.
module tb_mult_ctrl;
  localparam int AW = 4, LAT = 2;

  logic          clk = 1'b0, rst_n = 1'b0;
  logic          start = 1'b0;
  logic [AW-1:0] base_addr = '0;
  logic [AW:0]   count = '0;
  logic          cen_n, issue, out_valid, out_last, busy, done;
  logic [AW-1:0] addr;
  int checks = 0, failures = 0;
  int cyc = 0;

  mult_ctrl #(.AW(AW), .LAT(LAT)) dut (
    .clk(clk), .rst_n(rst_n), .start(start), .base_addr(base_addr), .count(count),
    .cen_n(cen_n), .addr(addr), .issue(issue), .out_valid(out_valid),
    .out_last(out_last), .busy(busy), .done(done));

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  task automatic fail(string msg);
    failures++;
    $display("cycle %0d: %s", cyc, msg);
  endtask

  // Runs one operation and checks it cycle by cycle.
  task automatic run(int base, int n, bit poke_start);
    int issued = 0, results = 0, lasts = 0;
    int issue_cyc[$];
    @(negedge clk);
    base_addr = AW'(base);
    count     = (AW+1)'(n);
    start     = 1'b1;
    @(negedge clk);
    start = 1'b0;
    checks++;
    if (!busy) fail("not busy after start");
    for (int c = 0; c < n + 10; c++) begin
      if (poke_start && c == 1) begin
        start = 1'b1;              // must be ignored
        base_addr = AW'(base + 7);
        count = 3;
      end else start = 1'b0;
      checks++;
      if (cen_n !== !issue) fail("cen_n is not the inverse of issue");
      if (issue) begin
        checks++;
        if (addr !== AW'(base + issued)) fail($sformatf("addr %0d expected %0d", addr, AW'(base + issued)));
        issued++;
        issue_cyc.push_back(cyc);
      end
      if (out_valid) begin
        checks++;
        if (issue_cyc.size() == 0 || cyc - issue_cyc.pop_front() != LAT)
          fail("out_valid not LAT cycles after its issue");
        results++;
        checks++;
        if (out_last !== (results == n)) fail("out_last wrong");
        if (out_last) lasts++;
      end
      checks++;
      if (done !== out_last) fail("done differs from out_last");
      @(negedge clk);
    end
    start = 1'b0;
    checks += 4;
    if (issued != n) fail($sformatf("%0d reads for count %0d", issued, n));
    if (results != n) fail($sformatf("%0d results for count %0d", results, n));
    if (lasts != (n > 0 ? 1 : 0)) fail("wrong number of last markers");
    if (busy) fail("still busy at the end");
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    run(0, 5, 1'b0);
    run(3, 1, 1'b0);
    run(12, 16, 1'b1);   // wraps, and a start while busy
    run(9, 0, 1'b0);
    run(15, 2, 1'b0);
    for (int i = 0; i < 10; i++) run(int'($urandom_range(0, 15)), int'($urandom_range(1, 16)), 1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
