// nr4sd_ppg -- partial product generator for one NR4SD digit.
//
// Forms digit*A, where A is an N-bit 2's complement multiplicand and the digit
// is given by its one-hot selection signals (see nr4sd_encoder).  Bit i of the
// (N+1)-bit row is an AND-OR of a_i, ~a_i and a_(i-1) (or ~a_(i-1) for the -2
// digit of NR4SD-), so a negative multiple is produced as the one's complement
// plus the carry-in bit 'cin', which is added at the row's least significant
// position by the carry-save tree.  The row's sign bit is delivered inverted:
// together with the constant the multiplier adds, that replaces sign
// extension.  So  signed({~row[N], row[N-1:0]}) + cin == digit * A.
// Combinational.  That the generator sees A and 3 selection bits follows the
// system diagram; the gate equations are this design's own.
module nr4sd_ppg
  import nr4sd_pkg::*;
#(
  parameter int          N       = 16,
  parameter nr_variant_e VARIANT = NR4SD_MINUS
) (
  input  logic [N-1:0] a,
  input  nr_sel_t      sel,
  output logic [N:0]   row,
  output logic         cin
);

  logic [N:0] a_x;      // A sign-extended to N+1 bits
  logic [N:0] a_sh;     // 2A in N+1 bits
  logic [N:0] pp;

  assign a_x  = {a[N-1], a};
  assign a_sh = {a, 1'b0};

  always_comb begin
    if (VARIANT == NR4SD_MINUS) begin
      pp  = ({(N+1){sel.one_p}} & a_x) | ({(N+1){sel.one_m}} & ~a_x)
          | ({(N+1){sel.two}} & ~a_sh);
      cin = sel.one_m | sel.two;
    end else begin
      pp  = ({(N+1){sel.one_p}} & a_x) | ({(N+1){sel.one_m}} & ~a_x)
          | ({(N+1){sel.two}} & a_sh);
      cin = sel.one_m;
    end
  end

  assign row = {~pp[N], pp[N-1:0]};

endmodule
