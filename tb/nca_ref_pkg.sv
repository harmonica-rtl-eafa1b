// nca_ref_pkg: reference arithmetic for the testbenches. mvm() is the
// crossbar layer written independently of the array model: a plain signed
// dot product per column, divided by 2^shift (arithmetic shift) and
// saturated to the signed 4-bit code range.
package nca_ref_pkg;
  typedef logic [63:0][63:0][7:0] wmat_t;

  function automatic logic [63:0][3:0] mvm(logic [63:0][3:0] x, wmat_t w, int shift);
    logic [63:0][3:0] y;
    for (int j = 0; j < 64; j++) begin
      int s;
      s = 0;
      for (int i = 0; i < 64; i++) s += int'(signed'(x[i])) * int'(signed'(w[i][j]));
      s = s >>> shift;
      if (s > 7) s = 7;
      if (s < -8) s = -8;
      y[j] = 4'(s);
    end
    return y;
  endfunction

  // random signed weight in [-lim, lim]
  function automatic logic [7:0] rand_w(int lim);
    int v;
    v = int'($urandom_range(2 * lim)) - lim;
    return 8'(v);
  endfunction
endpackage
