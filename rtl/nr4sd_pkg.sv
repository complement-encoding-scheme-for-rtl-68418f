// nr4sd_pkg -- types, constants and off-line encoding helpers shared by the
// pre-encoded NR4SD multiplier.
//
// A coefficient B of n = 2k bits (2's complement) is stored in the ROM as an
// (n+1)-bit word: the k-1 low radix-4 digits in Non-Redundant radix-4
// Signed-Digit (NR4SD) form, 2 bits each, and the most significant digit in
// Modified Booth (MB) form, 3 bits.  Word layout (this design's choice):
//   word[2j+1:2j]  = {n_hi, n_lo} of NR4SD digit j, j = 0 .. k-2
//   word[n:n-2]    = {neg, two, one} of the MB digit k-1
// NR4SD- digit = -2*n_hi + n_lo, digit set {-2,-1,0,+1}
// NR4SD+ digit = +2*n_hi - n_lo, digit set {-1,0,+1,+2}
//
// The helpers below (preencode, coef_value) are elaboration-time functions:
// preencode is the off-line conversion that fills the ROM, coef_value is the
// built-in coefficient set used when no ROM image file is given.  The digit
// sets, the (n+1)-bit word and the Booth-coded top digit follow the published
// architecture; the bit layout and the built-in coefficient sets are this
// design's own.
package nr4sd_pkg;

  // Which of the two non-redundant digit sets the low digits use.
  typedef enum logic {
    NR4SD_MINUS = 1'b0,   // digits {-2,-1,0,+1}
    NR4SD_PLUS  = 1'b1    // digits {-1,0,+1,+2}
  } nr_variant_e;

  // Selection signals of an NR4SD digit, one-hot or all zero (digit 0).
  // 'two' means -2 for NR4SD- and +2 for NR4SD+.
  typedef struct packed {
    logic two;
    logic one_m;
    logic one_p;
  } nr_sel_t;

  // Modified Booth selection signals of the most significant digit.
  typedef struct packed {
    logic neg;
    logic two;
    logic one;
  } mb_sel_t;

  // Widest coefficient the elaboration helpers handle.
  localparam int MAXN = 64;

  // Off-line pre-encoding of an n-bit coefficient b (n even) into the
  // (n+1)-bit ROM word, by the half-adder chain of the NR4SD algorithm.
  function automatic logic [MAXN:0] preencode(logic [MAXN-1:0] b, int n,
                                              nr_variant_e variant);
    logic [MAXN:0] w;
    logic c, c1, n0, n1, b0, b1;
    int   d;
    w = '0;
    c = 1'b0;
    for (int j = 0; j < n/2 - 1; j++) begin
      b0 = b[2*j];
      b1 = b[2*j+1];
      if (variant == NR4SD_MINUS) begin
        n0 = b0 ^ c;  c1 = b0 & c;     // HA:  b0 + c = 2*c1 + n0
        n1 = b1 ^ c1; c  = b1 | c1;    // HA*: b1 + c1 = 2*c - n1
      end else begin
        n0 = b0 ^ c;  c1 = b0 | c;     // HA*: b0 + c = 2*c1 - n0
        n1 = b1 ^ c1; c  = b1 & c1;    // HA:  b1 + c1 = 2*c + n1
      end
      w[2*j]   = n0;
      w[2*j+1] = n1;
    end
    // Most significant digit, Modified Booth: -2*b[n-1] + b[n-2] + c
    d = -2 * int'(b[n-1]) + int'(b[n-2]) + int'(c);
    w[n-2] = (d == 1) || (d == -1);
    w[n-1] = (d == 2) || (d == -2);
    w[n]   = (d < 0);
    return w;
  endfunction

  // Built-in coefficient set 'set_id': word idx holds a pseudo-random n-bit
  // value, except the first four words, which hold the corner values
  // -2^(n-1), 2^(n-1)-1, 0 and -1.
  function automatic logic [MAXN-1:0] coef_value(int unsigned set_id,
                                                 int unsigned idx, int n);
    logic [31:0]     x;
    logic [MAXN-1:0] v;
    logic [MAXN-1:0] mask;
    mask = (n >= MAXN) ? '1 : ((MAXN'(1) << n) - 1);
    case (idx)
      0:       return MAXN'(1) << (n - 1);
      1:       return mask >> 1;
      2:       return '0;
      3:       return mask;
      default: ;
    endcase
    v = '0;
    for (int part = 0; part < MAXN / 32; part++) begin
      x = (32'(idx) * 32'h9E37_79B9) ^ (32'(set_id + 1) * 32'h85EB_CA6B)
          ^ (32'(part) * 32'hC2B2_AE35);
      x = x ^ (x >> 16);
      x = x * 32'h7FEB_352D;
      x = x ^ (x >> 15);
      x = x * 32'h846C_A68B;
      x = x ^ (x >> 16);
      v[32*part +: 32] = x;
    end
    return v & mask;
  endfunction

endpackage
