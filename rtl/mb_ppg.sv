// mb_ppg -- partial product generator for the Modified Booth digit.
//
// The most significant radix-4 digit of a pre-encoded coefficient is kept in
// Modified Booth form, {neg, two, one}, digit set {-2..+2}.  Bit i of the
// (N+1)-bit row is ((one & a_i) | (two & a_(i-1))) XOR neg and the carry-in is
// neg, so a negative multiple is the one's complement plus one.  As in
// nr4sd_ppg the sign bit of the row is delivered inverted:
//   signed({~row[N], row[N-1:0]}) + cin == digit * A.
// Combinational.  The 3-bit MB input follows the system diagram; the gate
// equations are the usual Booth selector and this design's own.
module mb_ppg
  import nr4sd_pkg::*;
#(
  parameter int N = 16
) (
  input  logic [N-1:0] a,
  input  mb_sel_t      sel,
  output logic [N:0]   row,
  output logic         cin
);

  logic [N:0] a_x, a_sh, pp;

  assign a_x  = {a[N-1], a};
  assign a_sh = {a, 1'b0};
  assign pp   = (({(N+1){sel.one}} & a_x) | ({(N+1){sel.two}} & a_sh))
              ^ {(N+1){sel.neg}};
  assign cin  = sel.neg;
  assign row  = {~pp[N], pp[N-1:0]};

endmodule
