// tb_nr4sd_ppg -- partial product generator check: for every digit of both
// NR4SD digit sets and for corner and random multiplicands,
// signed({~row[N], row[N-1:0]}) + cin must equal digit * A.
module tb_nr4sd_ppg;
  import nr4sd_pkg::*;
  import tb_ref_pkg::*;

  localparam int N = 16;

  logic [N-1:0] a;
  nr_sel_t      sel_m, sel_p;
  logic [N:0]   row_m, row_p;
  logic         cin_m, cin_p;
  int checks = 0, failures = 0;

  nr4sd_ppg #(.N(N), .VARIANT(NR4SD_MINUS)) dut_m (.a(a), .sel(sel_m), .row(row_m), .cin(cin_m));
  nr4sd_ppg #(.N(N), .VARIANT(NR4SD_PLUS))  dut_p (.a(a), .sel(sel_p), .row(row_p), .cin(cin_p));

  function automatic nr_sel_t sel_of(int v);
    nr_sel_t s = '0;
    s.one_p = (v == 1);
    s.one_m = (v == -1);
    s.two   = (v == 2) || (v == -2);
    return s;
  endfunction

  task automatic check(int v, bit plus, logic [N:0] row, logic cin);
    longint got, exp;
    got = sext(64'({~row[N], row[N-1:0]}), N + 1) + longint'(cin);
    exp = longint'(v) * sext(64'(a), N);
    checks++;
    if (got != exp) begin
      failures++;
      $display("%s digit %0d A=%0d: got %0d expected %0d", plus ? "NR4SD+" : "NR4SD-",
               v, sext(64'(a), N), got, exp);
    end
  endtask

  initial begin
    #100000 failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 400; t++) begin
      case (t)
        0: a = '0;
        1: a = '1;
        2: a = {1'b1, {(N-1){1'b0}}};
        3: a = {1'b0, {(N-1){1'b1}}};
        default: a = N'($urandom);
      endcase
      for (int v = -2; v <= 1; v++) begin
        sel_m = sel_of(v);
        sel_p = sel_of(-v);
        #1;
        check(v, 1'b0, row_m, cin_m);
        check(-v, 1'b1, row_p, cin_p);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
