// tb_ref_pkg -- reference models shared by the testbenches.
//
// decode() gives the integer value of a pre-encoded coefficient word directly
// from the digit definitions (NR4SD- digit -2*h + l, NR4SD+ digit 2*h - l, top
// digit (one ? 1 : two ? 2 : 0) with sign neg), independently of the RTL's
// encoding logic.  digit_of() returns the value of one digit.
package tb_ref_pkg;

  function automatic int digit_of(logic [127:0] w, int n, int j, bit plus);
    int h, l, mag;
    if (j < n / 2 - 1) begin
      h = int'(w[2*j+1]);
      l = int'(w[2*j]);
      return plus ? (2 * h - l) : (-2 * h + l);
    end
    mag = w[n-2] ? 1 : (w[n-1] ? 2 : 0);
    return w[n] ? -mag : mag;
  endfunction

  function automatic longint decode(logic [127:0] w, int n, bit plus);
    longint v = 0;
    for (int j = n / 2 - 1; j >= 0; j--) v = v * 4 + longint'(digit_of(w, n, j, plus));
    return v;
  endfunction

  // Sign-extend the low n bits of x.
  function automatic longint sext(logic [63:0] x, int n);
    return longint'(x << (64 - n)) >>> (64 - n);
  endfunction

endpackage
