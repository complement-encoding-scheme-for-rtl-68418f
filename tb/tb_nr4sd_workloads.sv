// tb_nr4sd_workloads -- the evaluation workload: 20 different sets of 512
// coefficients, each streamed completely through the multiplier system with
// random operands, for both digit sets at N = 16, plus one set for each digit
// set at N = 24.  Every product is compared with A * B; a run must take one
// coefficient per cycle and deliver each product 2 cycles after its operand.
module tb_nr4sd_workloads;
  import nr4sd_pkg::*;
  import tb_ref_pkg::*;

  localparam int DEPTH = 512, AW = 9, LAT = 2, SETS = 20;
  localparam int NCFG = 2 * SETS + 2;

  logic          clk = 1'b0, rst_n = 1'b0;
  logic          start = 1'b0;
  logic [AW-1:0] base_addr = '0;
  logic [AW:0]   count = '0;
  logic [23:0]   a_in = '0;
  int checks = 0, failures = 0, cyc = 0;
  int results [NCFG];
  logic [NCFG-1:0] busy_v;

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  for (genvar c = 0; c < NCFG; c++) begin : g_cfg
    localparam int          N    = (c < 2 * SETS) ? 16 : 24;
    localparam int unsigned SET  = (c < 2 * SETS) ? c / 2 : 0;
    localparam nr_variant_e VAR  = (c % 2 == 0) ? NR4SD_MINUS : NR4SD_PLUS;

    logic           a_take, busy, p_valid, p_last, done;
    logic [2*N-1:0] p;
    longint         exp_q[$];
    time            iss_q[$];
    int             next_addr;

    nr4sd_premult_top #(.N(N), .DEPTH(DEPTH), .VARIANT(VAR), .COEF_SET(SET)) dut (
      .clk(clk), .rst_n(rst_n), .start(start), .base_addr(base_addr), .count(count),
      .a_in(a_in[N-1:0]), .a_take(a_take), .busy(busy), .p(p), .p_valid(p_valid),
      .p_last(p_last), .done(done), .coef_in('0), .coef_enc());

    assign busy_v[c] = busy;

    always @(posedge clk) begin
      if (start && !busy) next_addr = int'(base_addr);
      if (rst_n && a_take) begin
        exp_q.push_back(sext(coef_value(SET, next_addr % DEPTH, N), N) * sext(64'(a_in[N-1:0]), N));
        iss_q.push_back($time);
        next_addr++;
      end
      if (rst_n && p_valid) begin
        checks += 2;
        if (exp_q.size() == 0) begin
          failures++;
          $display("config %0d: result without operand", c);
        end else begin
          longint e;
          e = exp_q.pop_front();
          if (($time - iss_q.pop_front()) != LAT * 10) begin
            failures++;
            $display("config %0d: wrong latency", c);
          end
          if (sext(64'(p), 2 * N) != e) begin
            failures++;
            $display("config %0d (N=%0d set %0d): P=%0d expected %0d", c, N, SET,
                     sext(64'(p), 2 * N), e);
          end
        end
        results[c]++;
      end
    end
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int t0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    base_addr = '0;
    count     = DEPTH;
    start     = 1'b1;
    @(negedge clk);
    start = 1'b0;
    t0 = cyc;
    while (busy_v != '0) begin
      a_in = 24'($urandom);
      @(negedge clk);
    end
    checks++;
    if (cyc - t0 != DEPTH + LAT) begin
      failures++;
      $display("512 words took %0d cycles, expected %0d", cyc - t0, DEPTH + LAT);
    end
    for (int c = 0; c < NCFG; c++) begin
      checks++;
      if (results[c] != DEPTH) begin
        failures++;
        $display("config %0d: %0d results", c, results[c]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
