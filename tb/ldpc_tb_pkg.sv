// ldpc_tb_pkg: test helpers for the decoder testbenches.
//
// Builds the 126 x 672 parity-check matrix H from the base matrix in ldpc_pkg (each
// non-zero circulant of layer l, block column c and shift s connects check l*P+a to bit
// c*P + (a+s) mod P), brings it to reduced row-echelon form over GF(2) and uses that to
// make random codewords: the non-pivot bits are drawn at random and every pivot bit is
// the parity of its row over them. Also checks syndromes and builds channel LLRs.
package ldpc_tb_pkg;
  import ldpc_pkg::*;

  typedef logic [N-1:0] cw_t;

  class code_c;
    cw_t h    [M];   // rows of H
    cw_t r    [M];   // reduced rows
    int  piv  [M];   // pivot column of reduced row i, -1 if the row is zero
    int  rank;

    function new();
      for (int i = 0; i < M; i++) h[i] = '0;
      for (int l = 0; l < NB_ROW; l++)
        for (int e = 0; e < layer_dc(l); e++) begin
          entry_t x = layer_entry(l, e);
          for (int a = 0; a < P; a++)
            h[l*P + a][int'(x.col)*P + (a + int'(x.shift)) % P] = 1'b1;
        end
      reduce();
    endfunction

    function void reduce();
      int row;
      for (int i = 0; i < M; i++) begin r[i] = h[i]; piv[i] = -1; end
      row = 0;
      for (int c = N - 1; c >= 0 && row < M; c--) begin
        int sel = -1;
        for (int i = row; i < M; i++) if (r[i][c]) begin sel = i; break; end
        if (sel < 0) continue;
        begin cw_t t = r[sel]; r[sel] = r[row]; r[row] = t; end
        for (int i = 0; i < M; i++) if (i != row && r[i][c]) r[i] ^= r[row];
        piv[row] = c;
        row++;
      end
      rank = row;
    endfunction

    function cw_t random_codeword();
      cw_t x;
      logic [N-1:0] is_piv = '0;
      for (int i = 0; i < rank; i++) is_piv[piv[i]] = 1'b1;
      for (int b = 0; b < N; b++) x[b] = is_piv[b] ? 1'b0 : 1'($urandom());
      for (int i = 0; i < rank; i++) begin
        cw_t rest = r[i];
        rest[piv[i]] = 1'b0;
        x[piv[i]] = ^(rest & x);
      end
      return x;
    endfunction

    function int syndrome_weight(cw_t x);
      int w = 0;
      for (int i = 0; i < M; i++) w += int'(^(h[i] & x));
      return w;
    endfunction
  endclass

  // LLRs for codeword x: correct sign with magnitude in [lo, hi]; nerr positions chosen
  // at random get the wrong sign with magnitude in [1, emag].
  function automatic void make_llr(input cw_t x, input int lo, input int hi, input int nerr,
                                   input int emag, output int llr [N]);
    for (int b = 0; b < N; b++) begin
      int m = lo + int'($urandom() % (hi - lo + 1));
      llr[b] = x[b] ? -m : m;
    end
    for (int k = 0; k < nerr; k++) begin
      int b = int'($urandom() % N);
      int m = 1 + int'($urandom() % emag);
      llr[b] = x[b] ? m : -m;
    end
  endfunction

endpackage
