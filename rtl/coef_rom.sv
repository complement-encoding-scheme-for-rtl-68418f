// coef_rom -- synchronous coefficient ROM holding pre-encoded coefficients.
//
// DEPTH words of N+1 bits; each word is one coefficient in the pre-encoded
// NR4SD form of nr4sd_pkg (k-1 two-bit NR4SD digits and a 3-bit Modified Booth
// top digit).  Timing: when the active-low chip enable cen_n is low at a
// rising clock edge, the word at addr appears on dout after that edge (one
// cycle of latency, one word per cycle); while cen_n is high, dout holds.
// Contents: if INIT_FILE is set, it is read with $readmemh and must hold
// already encoded words; otherwise the built-in coefficient set COEF_SET of
// nr4sd_pkg::coef_value is encoded at elaboration.  The 512-word synchronous
// organisation follows the published architecture; the enable polarity, the
// hold behaviour and the built-in contents are this design's own choices.
module coef_rom
  import nr4sd_pkg::*;
#(
  parameter int          N         = 16,
  parameter int          DEPTH     = 512,
  parameter nr_variant_e VARIANT   = NR4SD_MINUS,
  parameter int unsigned COEF_SET  = 0,
  parameter string       INIT_FILE = "",
  localparam int         AW        = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          cen_n,   // chip enable, active low
  input  logic [AW-1:0] addr,
  output logic [N:0]    dout
);

  logic [N:0] mem [DEPTH];

  initial begin
    if (INIT_FILE != "") begin
      $readmemh(INIT_FILE, mem);
    end else begin
      for (int i = 0; i < DEPTH; i++) begin
        mem[i] = (N+1)'(preencode(coef_value(COEF_SET, i, N), N, VARIANT));
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!cen_n) dout <= mem[addr];
  end

endmodule
