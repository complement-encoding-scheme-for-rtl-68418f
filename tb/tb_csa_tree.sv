// tb_csa_tree -- carry-save tree check: for row counts 3, 10 and 14 and
// random and all-ones operands, sum + carry must equal the sum of all rows
// modulo 2^W.
module tb_csa_tree;
  localparam int W = 32;

  logic [2:0][W-1:0]  r3;
  logic [9:0][W-1:0]  r10;
  logic [13:0][W-1:0] r14;
  logic [W-1:0] s3, c3, s10, c10, s14, c14;
  int checks = 0, failures = 0;

  csa_tree #(.W(W), .ROWS(3))  dut3  (.rows(r3),  .sum(s3),  .carry(c3));
  csa_tree #(.W(W), .ROWS(10)) dut10 (.rows(r10), .sum(s10), .carry(c10));
  csa_tree #(.W(W), .ROWS(14)) dut14 (.rows(r14), .sum(s14), .carry(c14));

  task automatic check(string tag, logic [W-1:0] s, logic [W-1:0] c, logic [W-1:0] exp);
    checks++;
    if (W'(s + c) !== exp) begin
      failures++;
      $display("%s: sum+carry %h expected %h", tag, W'(s + c), exp);
    end
  endtask

  initial begin
    #100000 failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 500; t++) begin
      logic [W-1:0] e3, e10, e14;
      e3 = '0; e10 = '0; e14 = '0;
      for (int i = 0; i < 14; i++) begin
        logic [W-1:0] v;
        v = (t == 0) ? '1 : W'($urandom);
        if (i < 3)  begin r3[i]  = v; e3  += v; end
        if (i < 10) begin r10[i] = v; e10 += v; end
        r14[i] = v; e14 += v;
      end
      #1;
      check("rows=3", s3, c3, e3);
      check("rows=10", s10, c10, e10);
      check("rows=14", s14, c14, e14);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
