// mce_pkg: shared constants, types and GF(2^m) arithmetic for the Classic
// McEliece decryption design.
//
// The crypto parameters are those of the mceliece348864 parameter set used by
// the design: field size m = 12, code length n = 3488 and t = 64 correctable
// errors. The field is GF(2)[z]/(z^12 + z^3 + 1), the smallest irreducible
// polynomial of degree 12 (the key-generation software picks "the smallest"
// irreducible polynomial; that choice is this design's reading of it).
//
// Field elements are m-bit vectors with bit i the coefficient of z^i. A support
// point is stored as an m-bit integer k; the decryption core treats it as the
// field element with the bits of k reversed (bit 0 of k is the coefficient of
// z^(m-1)), the convention the key generation follows for this core. The
// evaluation table (FFT memory) is indexed by that integer.
package mce_pkg;

  localparam int unsigned GF_M   = 12;
  localparam int unsigned GF_Q   = 1 << GF_M;        // 4096 field elements
  localparam logic [GF_M:0] GF_POLY = 13'h1009;      // z^12 + z^3 + 1

  typedef logic [GF_M-1:0] gf_t;

  // Product of two field elements: carry-less multiply, then reduce.
  function automatic gf_t gf_mul(input gf_t a, input gf_t b);
    logic [2*GF_M-2:0] p;
    p = '0;
    for (int i = 0; i < GF_M; i++)
      if (b[i]) p ^= ((2*GF_M-1)'(a) << i);
    for (int i = 2*GF_M-2; i >= GF_M; i--)
      if (p[i]) p ^= ((2*GF_M-1)'(GF_POLY) << (i - GF_M));
    return p[GF_M-1:0];
  endfunction

  function automatic gf_t gf_sq(input gf_t a);
    return gf_mul(a, a);
  endfunction

  // Inverse by Fermat: a^(2^m - 2) = prod_{i=1}^{m-1} a^(2^i). gf_inv(0) = 0.
  function automatic gf_t gf_inv(input gf_t a);
    gf_t r, s;
    r = gf_t'(1);
    s = a;
    for (int i = 1; i < GF_M; i++) begin
      s = gf_sq(s);
      r = gf_mul(r, s);
    end
    return r;
  endfunction

  // Support integer -> field element (bit-reversed interpretation).
  function automatic gf_t support_to_gf(input gf_t k);
    gf_t r;
    for (int i = 0; i < GF_M; i++) r[i] = k[GF_M-1-i];
    return r;
  endfunction

  // Decryption steps, in the order the core runs them.
  typedef enum logic [2:0] {
    STEP_IDLE     = 3'd0,
    STEP_EVAL_G   = 3'd1,   // step 1: evaluate g(x) at every field element
    STEP_SYNDROME = 3'd2,   // step 2: double-size syndrome
    STEP_BM       = 3'd3,   // step 3: Berlekamp-Massey
    STEP_EVAL_ELP = 3'd4,   // step 4: evaluate the error locator polynomial
    STEP_LOCATE   = 3'd5    // step 5: recover the plaintext bits
  } step_t;

  // Register numbers of the USB register map.
  localparam logic [7:0] REG_CLKSETTINGS  = 8'h00;
  localparam logic [7:0] REG_USER_LED     = 8'h01;
  localparam logic [7:0] REG_CRYPT_TYPE   = 8'h02;
  localparam logic [7:0] REG_CRYPT_REV    = 8'h03;
  localparam logic [7:0] REG_IDENTIFY     = 8'h04;
  localparam logic [7:0] REG_CRYPT_GO     = 8'h05;
  localparam logic [7:0] REG_BUILDTIME    = 8'h0B;
  localparam logic [7:0] REG_P_MATRIX_IN  = 8'h0C;
  localparam logic [7:0] REG_POLY_G_IN    = 8'h0D;
  localparam logic [7:0] REG_CIPHER_IN    = 8'h0E;
  localparam logic [7:0] REG_REC_ERR_OUT  = 8'h0F;

endpackage
