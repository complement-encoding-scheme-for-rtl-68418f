// nr4sd_multiplier -- combinational pre-encoded NR4SD multiplier, P = A * B.
//
// B arrives already encoded, as the (n+1)-bit ROM word described in nr4sd_pkg.
// Each of the k-1 low 2-bit NR4SD digits goes through an nr4sd_encoder into an
// nr4sd_ppg; the Modified Booth top digit drives an mb_ppg directly.  The k
// partial product rows (row j shifted left by 2j, sign bit inverted), the
// sign-extension constant and the vector of carry-in bits (cin_j at bit 2j)
// are reduced by a carry-save tree to two rows, which a carry-lookahead adder
// sums.  The constant is -2^N * (4^k - 1)/3 mod 2^(2N), i.e. the N-bit
// pattern 1010...1011 placed at bit N; it undoes the inverted sign bits.
// A and P are 2's complement; P has 2N bits and is exact.
// The structure (encoders, generators, CSA tree, CLA, constant and carry-in
// vector) follows the system diagram; the gate-level contents of each block
// are this design's own.
module nr4sd_multiplier
  import nr4sd_pkg::*;
#(
  parameter int          N       = 16,           // coefficient / operand width, even
  parameter nr_variant_e VARIANT = NR4SD_MINUS
) (
  input  logic [N-1:0]   a,      // multiplicand A, 2's complement
  input  logic [N:0]     b_enc,  // pre-encoded coefficient B (ROM word)
  output logic [2*N-1:0] p       // product A*B, 2's complement
);

  localparam int K    = N / 2;       // radix-4 digits
  localparam int W    = 2 * N;
  localparam int ROWS = K + 2;       // K partial products, constant, carry-ins

  function automatic logic [W-1:0] sign_const();
    logic [W-1:0] s = '0;
    for (int j = 0; j < K; j++) s = s + (W'(1) << (N + 2 * j));
    return -s;
  endfunction

  localparam logic [W-1:0] SIGN_CONST = sign_const();

  logic [K-1:0][N:0]     pp_row;
  logic [K-1:0]          pp_cin;
  logic [ROWS-1:0][W-1:0] rows;
  logic [W-1:0]          cs_sum, cs_carry;
  logic                  unused_cout;

  for (genvar j = 0; j < K - 1; j++) begin : g_nr
    nr_sel_t sel;
    nr4sd_encoder #(.VARIANT(VARIANT)) u_enc (
      .digit (b_enc[2*j +: 2]),
      .sel   (sel)
    );
    nr4sd_ppg #(.N(N), .VARIANT(VARIANT)) u_ppg (
      .a   (a),
      .sel (sel),
      .row (pp_row[j]),
      .cin (pp_cin[j])
    );
  end

  mb_ppg #(.N(N)) u_ppg_msd (
    .a   (a),
    .sel (mb_sel_t'(b_enc[N:N-2])),
    .row (pp_row[K-1]),
    .cin (pp_cin[K-1])
  );

  always_comb begin
    for (int j = 0; j < K; j++) rows[j] = W'(pp_row[j]) << (2 * j);
    rows[K]   = SIGN_CONST;
    rows[K+1] = '0;
    for (int j = 0; j < K; j++) rows[K+1][2*j] = pp_cin[j];
  end

  csa_tree #(.W(W), .ROWS(ROWS)) u_csa (
    .rows  (rows),
    .sum   (cs_sum),
    .carry (cs_carry)
  );

  cla_adder #(.W(W)) u_cla (
    .a    (cs_sum),
    .b    (cs_carry),
    .cin  (1'b0),
    .sum  (p),
    .cout (unused_cout)
  );

  if (N % 2 != 0 || N < 4) begin : g_bad_n
    initial $fatal(1, "nr4sd_multiplier: N must be even and at least 4");
  end

endmodule
