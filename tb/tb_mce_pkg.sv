// tb_mce_pkg: reference arithmetic and key/ciphertext generation for the
// testbenches, written independently of the RTL.
//
// GF(2^12) with z^12 + z^3 + 1: multiplication LSB first with repeated
// multiplication by z, inversion by square-and-multiply. A test key is a
// random support (n distinct 12-bit integers, field element = bit-reversed
// integer) and a monic square-free Goppa polynomial g(x) = prod (x - r_k)
// whose t roots r_k lie outside the support; such a g decodes t errors with
// the double syndrome exactly like an irreducible one. The ciphertext of a
// weight-t error e is the c with H[:, 0..mt-1] c = H e, where column i of H
// stacks the bits of alpha_i^j / g(alpha_i), j = 0..t-1; this equals the
// syndrome under the systematic public key. Keys whose first mt columns are
// singular are drawn again.
package tb_mce_pkg;

  localparam int M  = 12;
  localparam int Q  = 4096;

  function automatic logic [11:0] rf_xtime(input logic [11:0] a);
    return {a[10:0], 1'b0} ^ (a[11] ? 12'h009 : 12'h000);
  endfunction

  function automatic logic [11:0] rf_mul(input logic [11:0] a, input logic [11:0] b);
    logic [11:0] r, x;
    r = '0; x = a;
    for (int i = 0; i < 12; i++) begin
      if (b[i]) r ^= x;
      x = rf_xtime(x);
    end
    return r;
  endfunction

  function automatic logic [11:0] rf_pow(input logic [11:0] a, input int e);
    logic [11:0] r, x;
    r = 12'd1; x = a;
    while (e > 0) begin
      if ((e & 1) != 0) r = rf_mul(r, x);
      x = rf_mul(x, x);
      e = e >> 1;
    end
    return r;
  endfunction

  function automatic logic [11:0] rf_inv(input logic [11:0] a);
    return rf_pow(a, Q - 2);
  endfunction

  function automatic logic [11:0] rf_rev(input logic [11:0] k);
    logic [11:0] r;
    for (int i = 0; i < 12; i++) r[i] = k[11-i];
    return r;
  endfunction

  // evaluate sum c[i] x^i by explicit powers
  function automatic logic [11:0] rf_eval(input logic [11:0] c[], input logic [11:0] x);
    logic [11:0] r, p;
    r = '0; p = 12'd1;
    for (int i = 0; i < c.size(); i++) begin
      r ^= rf_mul(c[i], p);
      p = rf_mul(p, x);
    end
    return r;
  endfunction

  // random permutation of 0..Q-1 (Fisher-Yates)
  function automatic void rand_perm(ref int perm[Q]);
    for (int i = 0; i < Q; i++) perm[i] = i;
    for (int i = Q - 1; i > 0; i--) begin
      int j, tmp;
      j = int'($urandom_range(i, 0));
      tmp = perm[i]; perm[i] = perm[j]; perm[j] = tmp;
    end
  endfunction

  // A test key and one ciphertext. n, t as in the design; e has weight t.
  class mce_case;
    int n, t, mt;
    logic [11:0] support[];      // support integers
    logic [11:0] g[];            // g[0..t], monic
    bit          e[];            // error vector, e[i] for support index i
    bit          c[];            // ciphertext, c[k] = bit k
    int          err_pos[];

    function new(int n_, int t_);
      n = n_; t = t_; mt = M * t_;
      support = new[n]; g = new[t+1]; e = new[n]; c = new[mt]; err_pos = new[t];
    endfunction

    // column i of the parity-check matrix: bits of alpha^j / g(alpha)
    function automatic void column(int i, ref bit col[]);
      logic [11:0] a, v;
      a = rf_rev(support[i]);
      v = rf_inv(rf_eval(g, a));
      for (int j = 0; j < t; j++) begin
        for (int b = 0; b < M; b++) col[M*j + b] = v[b];
        v = rf_mul(v, a);
      end
    endfunction

    // new key; returns 0 if the first mt columns are singular
    function automatic bit make_key(bit force_zero_point);
      int perm[Q];
      rand_perm(perm);
      if (force_zero_point) begin   // make support index 1 the point 0
        for (int i = 0; i < Q; i++) if (perm[i] == 0) begin perm[i] = perm[1]; perm[1] = 0; break; end
      end
      for (int i = 0; i < n; i++) support[i] = 12'(perm[i]);
      foreach (g[i]) g[i] = '0;
      g[0] = 12'd1;
      for (int k = 0; k < t; k++) begin        // g <- g * (x + r)
        logic [11:0] r;
        r = rf_rev(12'(perm[n + k]));
        for (int i = t; i >= 1; i--) g[i] = g[i-1] ^ rf_mul(g[i], r);
        g[0] = rf_mul(g[0], r);
      end
      return 1'b1;
    endfunction

    // random error of weight t (optionally forcing positions) and its ciphertext;
    // returns 0 if the key's first mt columns are singular
    function automatic bit encrypt(int forced[$]);
      bit [767:0] A[];            // rows of [H_0 .. H_{mt-1}]
      bit [767:0] s;
      bit col[];
      int cnt;
      A = new[mt];
      col = new[mt];
      foreach (e[i]) e[i] = 0;
      cnt = 0;
      foreach (forced[k]) begin e[forced[k]] = 1; err_pos[cnt++] = forced[k]; end
      while (cnt < t) begin
        int p;
        p = int'($urandom_range(n - 1, 0));
        if (!e[p]) begin e[p] = 1; err_pos[cnt++] = p; end
      end
      s = '0;
      for (int k = 0; k < t; k++) begin
        column(err_pos[k], col);
        for (int r = 0; r < mt; r++) s[r] = s[r] ^ col[r];
      end
      foreach (A[r]) A[r] = '0;
      for (int i = 0; i < mt; i++) begin
        column(i, col);
        for (int r = 0; r < mt; r++) begin
          bit [767:0] tr;
          tr = A[r]; tr[i] = col[r]; A[r] = tr;
        end
      end
      // Gauss-Jordan on [A | s]
      for (int cidx = 0; cidx < mt; cidx++) begin
        int p;
        p = -1;
        for (int r = cidx; r < mt; r++) if (A[r][cidx]) begin p = r; break; end
        if (p < 0) return 1'b0;
        if (p != cidx) begin
          bit [767:0] tr;
          bit tb;
          tr = A[p]; A[p] = A[cidx]; A[cidx] = tr;
          tb = s[p]; s[p] = s[cidx]; s[cidx] = tb;
        end
        for (int r = 0; r < mt; r++)
          if (r != cidx && A[r][cidx]) begin
            A[r] ^= A[cidx];
            s[r] ^= s[cidx];
          end
      end
      for (int k = 0; k < mt; k++) c[k] = s[k];
      return 1'b1;
    endfunction
  endclass

endpackage
