// tb_mb_ppg -- Modified Booth partial product generator check: for digits
// -2..+2 and corner and random multiplicands,
// signed({~row[N], row[N-1:0]}) + cin must equal digit * A.
module tb_mb_ppg;
  import nr4sd_pkg::*;
  import tb_ref_pkg::*;

  localparam int N = 16;

  logic [N-1:0] a;
  mb_sel_t      sel;
  logic [N:0]   row;
  logic         cin;
  int checks = 0, failures = 0;

  mb_ppg #(.N(N)) dut (.a(a), .sel(sel), .row(row), .cin(cin));

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
      for (int v = -2; v <= 2; v++) begin
        longint got, exp;
        sel.neg = (v < 0);
        sel.one = (v == 1) || (v == -1);
        sel.two = (v == 2) || (v == -2);
        #1;
        got = sext(64'({~row[N], row[N-1:0]}), N + 1) + longint'(cin);
        exp = longint'(v) * sext(64'(a), N);
        checks++;
        if (got != exp) begin
          failures++;
          $display("MB digit %0d A=%0d: got %0d expected %0d", v, sext(64'(a), N), got, exp);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
