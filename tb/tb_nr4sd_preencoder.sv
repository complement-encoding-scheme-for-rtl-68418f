// tb_nr4sd_preencoder -- exhaustive check of the pre-encoder at N = 16 for
// both digit sets: every word must decode (by the digit definitions) to the
// coefficient it came from, the top digit's signals must be a legal Booth
// code, and the result must match the elaboration-time encoder that fills
// the ROM.  A run at N = 8 checks a second size.
module tb_nr4sd_preencoder;
  import nr4sd_pkg::*;
  import tb_ref_pkg::*;

  logic [15:0] b16;
  logic [16:0] w16_m, w16_p;
  logic [7:0]  b8;
  logic [8:0]  w8_m;
  int checks = 0, failures = 0;

  nr4sd_preencoder #(.N(16), .VARIANT(NR4SD_MINUS)) dut_m (.b(b16), .b_enc(w16_m));
  nr4sd_preencoder #(.N(16), .VARIANT(NR4SD_PLUS))  dut_p (.b(b16), .b_enc(w16_p));
  nr4sd_preencoder #(.N(8),  .VARIANT(NR4SD_MINUS)) dut_8 (.b(b8),  .b_enc(w8_m));

  task automatic check_word(logic [127:0] w, logic [63:0] b, int n, bit plus);
    longint got, exp;
    got = decode(w, n, plus);
    exp = sext(b, n);
    checks++;
    if (got != exp || (w[n-1] && w[n-2]) || (w[n] && !w[n-1] && !w[n-2])) begin
      failures++;
      $display("n=%0d %s b=%0d: word %h decodes to %0d", n, plus ? "+" : "-", exp, w, got);
    end
  endtask

  initial begin
    #10000000 failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 65536; v++) begin
      b16 = 16'(v);
      b8  = 8'(v);
      #1;
      check_word(128'(w16_m), 64'(b16), 16, 1'b0);
      check_word(128'(w16_p), 64'(b16), 16, 1'b1);
      if (v < 256) check_word(128'(w8_m), 64'(b8), 8, 1'b0);
      checks += 2;
      if (w16_m !== 17'(preencode(64'(b16), 16, NR4SD_MINUS))) failures++;
      if (w16_p !== 17'(preencode(64'(b16), 16, NR4SD_PLUS)))  failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
