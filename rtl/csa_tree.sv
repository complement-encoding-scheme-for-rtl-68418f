// csa_tree -- carry-save (Wallace) reduction of ROWS operands to two.
//
// Each level groups its rows in threes and replaces every group by a sum row
// (bitwise XOR) and a carry row (bitwise majority, shifted left by one); the
// rows left over pass to the next level unchanged.  Levels repeat until two
// rows remain, so sum + carry == the sum of all inputs, modulo 2^W.  A row
// count of ROWS needs about log_1.5(ROWS/2) levels of full adders.
// Combinational.  The published architecture takes this tree from a cell
// library; this one is this design's own plain Wallace tree of 3:2
// compressors.
module csa_tree #(
  parameter int W    = 32,
  parameter int ROWS = 10
) (
  input  logic [ROWS-1:0][W-1:0] rows,
  output logic [W-1:0]           sum,
  output logic [W-1:0]           carry
);

  // Rows left after one level of 3:2 compression.
  function automatic int next_rows(int r);
    return (r / 3) * 2 + (r % 3);
  endfunction

  function automatic int num_levels(int r);
    int n = 0;
    while (r > 2) begin
      r = next_rows(r);
      n++;
    end
    return n;
  endfunction

  localparam int LEVELS = num_levels(ROWS);

  always_comb begin
    logic [ROWS-1:0][W-1:0] cur, nxt;
    int r, g;
    cur = rows;
    r   = ROWS;
    for (int l = 0; l < LEVELS; l++) begin
      nxt = '0;
      g   = r / 3;
      for (int i = 0; i < ROWS / 3; i++) begin
        if (i < g) begin
          nxt[2*i]   = cur[3*i] ^ cur[3*i+1] ^ cur[3*i+2];
          nxt[2*i+1] = ((cur[3*i] & cur[3*i+1]) | (cur[3*i] & cur[3*i+2]) |
                        (cur[3*i+1] & cur[3*i+2])) << 1;
        end
      end
      for (int i = 0; i < 2; i++) begin
        if (3 * g + i < r) nxt[2*g+i] = cur[3*g+i];
      end
      cur = nxt;
      r   = next_rows(r);
    end
    sum   = cur[0];
    carry = (ROWS < 2) ? '0 : cur[1];
  end

endmodule
