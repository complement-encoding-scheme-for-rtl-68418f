// nr4sd_encoder -- NR4SD digit encoding block.
//
// Turns one stored 2-bit NR4SD digit {n_hi, n_lo} into the three selection
// signals of a partial product generator.  The signals are one-hot, or all
// zero for the digit 0, so the generator needs no separate sign signal:
//   NR4SD-  (digit = -2*n_hi + n_lo):  one_p = +1, one_m = -1, two = -2
//   NR4SD+  (digit = +2*n_hi - n_lo):  one_p = +1, one_m = -1, two = +2
// Purely combinational, two gate levels.  That each 2-bit digit feeds a block
// with a 3-bit output follows the system diagram; the gate equations and the
// bit order of the stored digit are this design's own.
module nr4sd_encoder
  import nr4sd_pkg::*;
#(
  parameter nr_variant_e VARIANT = NR4SD_MINUS
) (
  input  logic [1:0] digit,   // {n_hi, n_lo} as stored in the ROM
  output nr_sel_t    sel
);

  logic n_hi, n_lo;
  assign {n_hi, n_lo} = digit;

  always_comb begin
    sel.two = n_hi & ~n_lo;
    if (VARIANT == NR4SD_MINUS) begin
      sel.one_p = ~n_hi & n_lo;
      sel.one_m =  n_hi & n_lo;
    end else begin
      sel.one_p =  n_hi & n_lo;
      sel.one_m = ~n_hi & n_lo;
    end
  end

endmodule
