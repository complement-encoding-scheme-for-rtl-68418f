// tb_nr4sd_multiplier -- combinational multiplier check at N = 16 (both digit
// sets) and N = 8 (NR4SD-, exhaustive): P must equal A * B for corner and
// random operands, with B pre-encoded off-line by nr4sd_pkg::preencode.
module tb_nr4sd_multiplier;
  import nr4sd_pkg::*;
  import tb_ref_pkg::*;

  logic [15:0] a16, b16;
  logic [16:0] e16_m, e16_p;
  logic [31:0] p16_m, p16_p;
  logic [7:0]  a8, b8;
  logic [8:0]  e8;
  logic [15:0] p8;
  int checks = 0, failures = 0;

  nr4sd_multiplier #(.N(16), .VARIANT(NR4SD_MINUS)) dut_m (.a(a16), .b_enc(e16_m), .p(p16_m));
  nr4sd_multiplier #(.N(16), .VARIANT(NR4SD_PLUS))  dut_p (.a(a16), .b_enc(e16_p), .p(p16_p));
  nr4sd_multiplier #(.N(8),  .VARIANT(NR4SD_MINUS)) dut_8 (.a(a8),  .b_enc(e8),    .p(p8));

  task automatic check(string tag, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("%s: got %0d expected %0d", tag, got, exp);
    end
  endtask

  initial begin
    #10000000 failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] corner [6] = '{16'h0000, 16'hFFFF, 16'h8000, 16'h7FFF, 16'h0001, 16'hAAAA};
    for (int t = 0; t < 20036; t++) begin
      if (t < 36) begin
        a16 = corner[t % 6];
        b16 = corner[t / 6];
      end else begin
        a16 = 16'($urandom);
        b16 = 16'($urandom);
      end
      e16_m = 17'(preencode(64'(b16), 16, NR4SD_MINUS));
      e16_p = 17'(preencode(64'(b16), 16, NR4SD_PLUS));
      #1;
      check("N=16 NR4SD-", sext(64'(p16_m), 32), sext(64'(a16), 16) * sext(64'(b16), 16));
      check("N=16 NR4SD+", sext(64'(p16_p), 32), sext(64'(a16), 16) * sext(64'(b16), 16));
    end
    for (int i = 0; i < 65536; i++) begin
      a8 = 8'(i);
      b8 = 8'(i >> 8);
      e8 = 9'(preencode(64'(b8), 8, NR4SD_MINUS));
      #1;
      check("N=8 NR4SD-", sext(64'(p8), 16), sext(64'(a8), 8) * sext(64'(b8), 8));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
