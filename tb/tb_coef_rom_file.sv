// tb_coef_rom_file -- ROM image loading: a 16-word coef_rom reads
// tb/coef_rom_init.hex, which holds the NR4SD- encodings of the coefficients
// listed below.  Each word read back must decode to its coefficient, and a
// multiplier fed from the ROM must return A * B for random operands A.
module tb_coef_rom_file;
  import nr4sd_pkg::*;
  import tb_ref_pkg::*;

  localparam int N = 16, DEPTH = 16, AW = 4;
  localparam int COEF [DEPTH] = '{-32768, 32767, 0, -1, 1, -2, 2, 12345, -12345,
                                  21845, -21846, 7, -7, 1000, -1000, 10922};

  logic          clk = 1'b0;
  logic          cen_n = 1'b1;
  logic [AW-1:0] addr = '0;
  logic [N:0]    dout;
  logic [N-1:0]  a;
  logic [2*N-1:0] p;
  int checks = 0, failures = 0;

  coef_rom #(.N(N), .DEPTH(DEPTH), .VARIANT(NR4SD_MINUS),
             .INIT_FILE("tb/coef_rom_init.hex")) dut (
    .clk(clk), .cen_n(cen_n), .addr(addr), .dout(dout));

  nr4sd_multiplier #(.N(N), .VARIANT(NR4SD_MINUS)) mult (.a(a), .b_enc(dout), .p(p));

  always #5 clk = ~clk;

  initial begin
    repeat (500) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(negedge clk);
    for (int i = 0; i < DEPTH; i++) begin
      cen_n = 1'b0;
      addr  = AW'(i);
      @(negedge clk);
      checks++;
      if (decode(128'(dout), N, 1'b0) != longint'(COEF[i])) begin
        failures++;
        $display("word %0d: %h decodes to %0d, expected %0d", i, dout,
                 decode(128'(dout), N, 1'b0), COEF[i]);
      end
      for (int t = 0; t < 4; t++) begin   // 4 ns, before the next edge
        a = N'($urandom);
        #1;
        checks++;
        if (sext(64'(p), 2 * N) != longint'(COEF[i]) * sext(64'(a), N)) begin
          failures++;
          $display("word %0d: A=%0d P=%0d", i, sext(64'(a), N), sext(64'(p), 2 * N));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
