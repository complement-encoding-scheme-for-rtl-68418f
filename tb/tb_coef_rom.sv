// tb_coef_rom -- coefficient ROM check.  Reads all 512 words of the default
// NR4SD- ROM and a NR4SD+ ROM with another coefficient set: each word must
// appear one cycle after its address, decode to the coefficient of the
// built-in set, and the output must hold while the chip enable is high.
module tb_coef_rom;
  import nr4sd_pkg::*;
  import tb_ref_pkg::*;

  localparam int N = 16, DEPTH = 512, AW = 9;

  logic          clk = 1'b0;
  logic          cen_n;
  logic [AW-1:0] addr;
  logic [N:0]    dout_m, dout_p;
  int checks = 0, failures = 0;

  coef_rom #(.N(N), .DEPTH(DEPTH), .VARIANT(NR4SD_MINUS), .COEF_SET(0)) dut_m (
    .clk(clk), .cen_n(cen_n), .addr(addr), .dout(dout_m));
  coef_rom #(.N(N), .DEPTH(DEPTH), .VARIANT(NR4SD_PLUS), .COEF_SET(7)) dut_p (
    .clk(clk), .cen_n(cen_n), .addr(addr), .dout(dout_p));

  always #5 clk = ~clk;

  task automatic check(int i);
    longint em, ep;
    em = sext(coef_value(0, i, N), N);
    ep = sext(coef_value(7, i, N), N);
    checks += 2;
    if (decode(128'(dout_m), N, 1'b0) != em) begin
      failures++;
      $display("NR4SD- word %0d: %h decodes to %0d, expected %0d", i, dout_m,
               decode(128'(dout_m), N, 1'b0), em);
    end
    if (decode(128'(dout_p), N, 1'b1) != ep) begin
      failures++;
      $display("NR4SD+ word %0d: %h decodes to %0d, expected %0d", i, dout_p,
               decode(128'(dout_p), N, 1'b1), ep);
    end
  endtask

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cen_n = 1'b1;
    addr  = '0;
    @(negedge clk);
    for (int i = 0; i < DEPTH; i++) begin
      cen_n = 1'b0;
      addr  = AW'(i);
      @(negedge clk);               // one edge later the word is there
      check(i);
      if (i % 37 == 5) begin       // disabled cycles: output must hold
        cen_n = 1'b1;
        addr  = AW'(i + 100);
        repeat (2) @(negedge clk);
        check(i);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
