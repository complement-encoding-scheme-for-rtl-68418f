// nr4sd_preencoder -- conversion of a 2's complement coefficient into the
// pre-encoded ROM word (the off-line encoding step, as logic).
//
// Radix-4 digit j of B = (b_2j+1, b_2j) plus the incoming carry c_2j is
// rewritten by two half adders into a non-redundant digit and a carry c_2j+2
// into the next digit.  NR4SD-: a plain half adder on b_2j (positive sum bit)
// then a "negative-sum" half adder on b_2j+1 (sum bit of weight -2, carry =
// OR); NR4SD+: the two kinds in the opposite order.  The top digit -2*b_n-1 +
// b_n-2 + c_n-2, in {-2..+2}, is written in Modified Booth form so the stored
// word covers the whole 2's complement range.  Combinational; the carry
// ripples through k-1 digits.  The published flow does this step in software
// before filling the ROM; this module gives the same conversion as hardware
// for building or checking ROM images, and the bit layout is this design's.
module nr4sd_preencoder
  import nr4sd_pkg::*;
#(
  parameter int          N       = 16,
  parameter nr_variant_e VARIANT = NR4SD_MINUS
) (
  input  logic [N-1:0] b,       // coefficient, 2's complement
  output logic [N:0]   b_enc    // ROM word
);

  localparam int K = N / 2;

  logic [K-1:0] c;      // c[j] = carry into digit j
  logic [2:0]   msd;    // -2*b[N-1] + b[N-2] + c[K-1], 3-bit 2's complement

  assign c[0] = 1'b0;

  for (genvar j = 0; j < K - 1; j++) begin : g_digit
    logic c_mid;
    if (VARIANT == NR4SD_MINUS) begin : g_minus
      assign b_enc[2*j]   = b[2*j] ^ c[j];
      assign c_mid        = b[2*j] & c[j];
      assign b_enc[2*j+1] = b[2*j+1] ^ c_mid;
      assign c[j+1]       = b[2*j+1] | c_mid;
    end else begin : g_plus
      assign b_enc[2*j]   = b[2*j] ^ c[j];
      assign c_mid        = b[2*j] | c[j];
      assign b_enc[2*j+1] = b[2*j+1] ^ c_mid;
      assign c[j+1]       = b[2*j+1] & c_mid;
    end
  end

  assign msd = {b[N-1], b[N-1], 1'b0} + {2'b00, b[N-2]} + {2'b00, c[K-1]};

  // {neg, two, one}
  assign b_enc[N]   = msd[2];
  assign b_enc[N-1] = (msd == 3'b010) || (msd == 3'b110);
  assign b_enc[N-2] = (msd == 3'b001) || (msd == 3'b111);

endmodule
