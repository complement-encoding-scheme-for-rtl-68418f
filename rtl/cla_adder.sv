// cla_adder -- fast carry-lookahead adder, W bits.
//
// Bit generate g = a & b and propagate p = a ^ b are combined by a parallel
// prefix (Kogge-Stone) lookahead network of ceil(log2 W) levels, so every
// carry is available after a logarithmic number of gate levels; then sum = p ^
// carry.  cin enters as the carry into bit 0, cout is the carry out of bit
// W-1.  Combinational.  The published architecture takes this adder from a
// cell library; the prefix structure here is this design's own choice.
module cla_adder #(
  parameter int W = 32
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] sum,
  output logic         cout
);

  localparam int L = (W < 2) ? 1 : $clog2(W);

  // Group generate / propagate of the span ending at bit i, per level.
  logic [L:0][W-1:0] gg, pp;
  logic [W:0]        c;

  assign gg[0] = a & b;
  assign pp[0] = a ^ b;

  for (genvar l = 0; l < L; l++) begin : g_lvl
    for (genvar i = 0; i < W; i++) begin : g_bit
      if (i >= (1 << l)) begin : g_comb
        assign gg[l+1][i] = gg[l][i] | (pp[l][i] & gg[l][i - (1 << l)]);
        assign pp[l+1][i] = pp[l][i] & pp[l][i - (1 << l)];
      end else begin : g_pass
        assign gg[l+1][i] = gg[l][i];
        assign pp[l+1][i] = pp[l][i];
      end
    end
  end

  assign c[0] = cin;
  for (genvar i = 0; i < W; i++) begin : g_carry
    assign c[i+1] = gg[L][i] | (pp[L][i] & cin);
  end

  assign sum  = pp[0] ^ c[W-1:0];
  assign cout = c[W];

endmodule
