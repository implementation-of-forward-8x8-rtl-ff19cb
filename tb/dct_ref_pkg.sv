// dct_ref_pkg: reference models used by the testbenches of the forward 8x8
// integer DCT. They work on plain integer arrays, independently of the RTL:
//   ref_exact   - Y = C X C^T with the integer FRExt matrix (times 8)
//   ref_bfly8   - the 8-point butterfly with arithmetic right shifts
//   ref_bfly2d  - rows, then columns, with ref_bfly8
// plus helpers to pack and unpack the 512-bit and 1344-bit buses and to
// generate residual blocks.
package dct_ref_pkg;

  typedef int blk_t [8][8];
  typedef int vec_t [8];

  // FRExt 8x8 forward matrix scaled by 8: even rows from {8, 4}, odd rows
  // from {12, 10, 6, 3}, with the usual DCT symmetries.
  function automatic int cmat(int k, int n);
    int base [8][4];
    int v;
    base = '{'{8, 8, 8, 8}, '{12, 10, 6, 3}, '{8, 4, -4, -8}, '{10, -3, -12, -6},
             '{8, -8, -8, 8}, '{6, -12, 3, 10}, '{4, -8, 8, -4}, '{3, -6, 10, -12}};
    if (n < 4) v = base[k][n];
    else       v = (k % 2 == 0) ? base[k][7-n] : -base[k][7-n];
    return v;
  endfunction

  function automatic blk_t ref_exact(blk_t x);
    blk_t t, y;
    for (int i = 0; i < 8; i++)
      for (int j = 0; j < 8; j++) begin
        t[i][j] = 0;
        for (int k = 0; k < 8; k++) t[i][j] += cmat(i, k) * x[k][j];
      end
    for (int i = 0; i < 8; i++)
      for (int j = 0; j < 8; j++) begin
        y[i][j] = 0;
        for (int k = 0; k < 8; k++) y[i][j] += t[i][k] * cmat(j, k);
      end
    return y;
  endfunction

  function automatic vec_t ref_bfly8(vec_t x);
    vec_t a, b, y;
    for (int i = 0; i < 4; i++) begin
      a[i]   = x[i] + x[7-i];
      a[i+4] = x[i] - x[7-i];
    end
    b[0] = a[0] + a[3];  b[1] = a[1] + a[2];
    b[2] = a[0] - a[3];  b[3] = a[1] - a[2];
    b[4] = a[5] + a[6] + ((a[4] >>> 1) + a[4]);
    b[5] = a[4] - a[7] - ((a[6] >>> 1) + a[6]);
    b[6] = a[4] + a[7] - ((a[5] >>> 1) + a[5]);
    b[7] = a[5] - a[6] + ((a[7] >>> 1) + a[7]);
    y[0] = b[0] + b[1];            y[4] = b[0] - b[1];
    y[2] = b[2] + (b[3] >>> 1);    y[6] = (b[2] >>> 1) - b[3];
    y[1] = b[4] + (b[7] >>> 2);    y[3] = b[5] + (b[6] >>> 2);
    y[5] = b[6] - (b[5] >>> 2);    y[7] = (b[4] >>> 2) - b[7];
    return y;
  endfunction

  function automatic blk_t ref_bfly2d(blk_t x);
    blk_t r, y;
    vec_t v, w;
    for (int i = 0; i < 8; i++) begin
      for (int j = 0; j < 8; j++) v[j] = x[i][j];
      w = ref_bfly8(v);
      for (int j = 0; j < 8; j++) r[i][j] = w[j];
    end
    for (int j = 0; j < 8; j++) begin
      for (int i = 0; i < 8; i++) v[i] = r[i][j];
      w = ref_bfly8(v);
      for (int i = 0; i < 8; i++) y[i][j] = w[i];
    end
    return y;
  endfunction

  function automatic logic [511:0] pack_res(blk_t x);
    logic [511:0] p;
    for (int i = 0; i < 64; i++) p[i*8 +: 8] = 8'(x[i/8][i%8]);
    return p;
  endfunction

  function automatic blk_t unpack_out(logic [1343:0] p);
    blk_t y;
    for (int i = 0; i < 64; i++) y[i/8][i%8] = int'(signed'(p[i*21 +: 21]));
    return y;
  endfunction

  function automatic logic [1343:0] pack_out(blk_t y);
    logic [1343:0] p;
    for (int i = 0; i < 64; i++) p[i*21 +: 21] = 21'(y[i/8][i%8]);
    return p;
  endfunction

  // kind 0: random residuals in [-128,127]; 1: all -128; 2: all 127;
  // 3: signs following rows/cols of C for large odd coefficients;
  // 4: small residuals in [-8,7]; 5: single impulse
  function automatic blk_t gen_block(int kind);
    blk_t x;
    int pos;
    pos = $urandom_range(63);
    for (int i = 0; i < 8; i++)
      for (int j = 0; j < 8; j++)
        case (kind)
          1: x[i][j] = -128;
          2: x[i][j] = 127;
          3: x[i][j] = ((cmat(1, i) * cmat(1, j)) >= 0) ? 127 : -128;
          4: x[i][j] = int'($urandom_range(15)) - 8;
          5: x[i][j] = (i*8+j == pos) ? -128 : 0;
          default: x[i][j] = int'($urandom_range(255)) - 128;
        endcase
    return x;
  endfunction

endpackage
