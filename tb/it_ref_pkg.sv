// it_ref_pkg -- testbench reference models of the 16/32-point inverse transform.
//
// idct16 / idct32 evaluate Chen's flow graph node by node (names follow the
// node columns a..g of the graph), with the rotation coefficients computed
// here from $cos as floor(256*cos(k*pi/64)) and every rotation followed by an
// arithmetic shift right by 8.  idct_real is the exact inverse DCT
//     y[n] = sum_k w_k X[k] cos((2n+1) k pi / 2N),  w_0 = 1/sqrt(2), w_k = 1
// used to check that the integer graph approximates the real transform.
package it_ref_pkg;
  localparam real PI = 3.14159265358979323846;

  function automatic longint cf(input int k);
    return longint'($floor(256.0 * $cos(real'(k) * PI / 64.0) + 1.0e-9));
  endfunction

  // (a*u + b*v) >>> 8
  function automatic longint r8(input longint a, input longint u, input longint b, input longint v);
    return (a * u + b * v) >>> 8;
  endfunction

  // 16-point: x[] are the 16 coefficients, y[] the 16 outputs
  function automatic void idct16(input longint x [16], output longint y [16]);
    longint c [16], d [16], e [16], f [16], b [16];
    // 4-point part (inputs x0, x4, x8, x12)
    d[0] = r8(181, x[8], 181, x[0]);
    d[1] = r8(181, x[0], -181, x[8]);
    d[2] = r8(cf(24), x[4], -cf(8), x[12]);
    d[3] = r8(cf(24), x[12], cf(8), x[4]);
    c[0] = d[0] + d[3];  c[1] = d[1] + d[2];
    c[2] = d[1] - d[2];  c[3] = d[0] - d[3];
    // 8-point odd part (x2, x10, x6, x14)
    e[4] = r8(cf(28), x[2], -cf(4), x[14]);
    e[7] = r8(cf(28), x[14], cf(4), x[2]);
    e[5] = r8(cf(12), x[10], -cf(20), x[6]);
    e[6] = r8(cf(12), x[6], cf(20), x[10]);
    d[4] = e[4] + e[5];  d[5] = e[4] - e[5];
    d[6] = e[7] - e[6];  d[7] = e[6] + e[7];
    c[4] = d[4];         c[7] = d[7];
    c[5] = r8(-181, d[5], 181, d[6]);
    c[6] = r8(181, d[6], 181, d[5]);
    for (int n = 0; n < 4; n++) begin
      b[n]     = c[n] + c[7 - n];
      b[7 - n] = c[n] - c[7 - n];
    end
    // 16-point odd part (x1, x9, x5, x13, x3, x11, x7, x15)
    f[8]  = r8(cf(30), x[1],  -cf(2),  x[15]);
    f[15] = r8(cf(30), x[15],  cf(2),  x[1]);
    f[9]  = r8(cf(14), x[9],  -cf(18), x[7]);
    f[14] = r8(cf(14), x[7],   cf(18), x[9]);
    f[10] = r8(cf(22), x[5],  -cf(10), x[11]);
    f[13] = r8(cf(22), x[11],  cf(10), x[5]);
    f[11] = r8(cf(6),  x[13], -cf(26), x[3]);
    f[12] = r8(cf(6),  x[3],   cf(26), x[13]);
    e[8]  = f[8] + f[9];    e[9]  = f[8] - f[9];
    e[10] = f[11] - f[10];  e[11] = f[10] + f[11];
    e[12] = f[12] + f[13];  e[13] = f[12] - f[13];
    e[14] = f[15] - f[14];  e[15] = f[14] + f[15];
    d[8]  = e[8];  d[11] = e[11];  d[12] = e[12];  d[15] = e[15];
    d[9]  = r8(-cf(8), e[9], cf(24), e[14]);
    d[14] = r8(cf(8), e[14], cf(24), e[9]);
    d[10] = r8(-cf(24), e[10], -cf(8), e[13]);
    d[13] = r8(cf(24), e[13], -cf(8), e[10]);
    c[8]  = d[8] + d[11];   c[11] = d[8] - d[11];
    c[9]  = d[9] + d[10];   c[10] = d[9] - d[10];
    c[12] = d[15] - d[12];  c[15] = d[12] + d[15];
    c[13] = d[14] - d[13];  c[14] = d[13] + d[14];
    b[8]  = c[8];  b[9] = c[9];  b[14] = c[14];  b[15] = c[15];
    b[10] = r8(-181, c[10], 181, c[13]);
    b[13] = r8(181, c[13], 181, c[10]);
    b[11] = r8(-181, c[11], 181, c[12]);
    b[12] = r8(181, c[12], 181, c[11]);
    for (int n = 0; n < 8; n++) begin
      y[n]      = b[n] + b[15 - n];
      y[15 - n] = b[n] - b[15 - n];
    end
  endfunction

  // odd half of the 32-point transform: returns o[n] ~ sum over odd k of
  // X[k] cos((2n+1) k pi / 64)
  function automatic void odd32(input longint x [32], output longint o [16]);
    longint g [16], f [16], e [16], d [16], c [16], b [16], a [16];
    int     kk [16];
    // line i carries X[kk[i]], bit-reversed odd order
    for (int i = 0; i < 16; i++) begin
      int r;
      r = 0;
      for (int j = 0; j < 4; j++) if ((i >> j) & 1) r |= (8 >> j);
      kk[i] = 2 * r + 1;
    end
    // g: rotations of X[k] with X[32-k]
    for (int i = 0; i < 8; i++) begin
      int k;
      k = kk[i];
      g[i]      = r8(cf(32 - k), x[k], -cf(k), x[32 - k]);
      g[15 - i] = r8(cf(32 - k), x[32 - k], cf(k), x[k]);
    end
    // f: butterflies of neighbours, sign pattern alternating per pair
    for (int i = 0; i < 16; i += 4) begin
      f[i]     = g[i] + g[i + 1];      f[i + 1] = g[i] - g[i + 1];
      f[i + 2] = g[i + 3] - g[i + 2];  f[i + 3] = g[i + 2] + g[i + 3];
    end
    // e: rotations by pi/16 (lines 1,14 and 2,13) and 5pi/16 (5,10 and 6,9)
    e = f;
    e[1]  = r8(-cf(4), f[1], cf(28), f[14]);   e[14] = r8(cf(4), f[14], cf(28), f[1]);
    e[2]  = r8(-cf(28), f[2], -cf(4), f[13]);  e[13] = r8(cf(28), f[13], -cf(4), f[2]);
    e[5]  = r8(-cf(20), f[5], cf(12), f[10]);  e[10] = r8(cf(20), f[10], cf(12), f[5]);
    e[6]  = r8(-cf(12), f[6], -cf(20), f[9]);  e[9]  = r8(cf(12), f[9], -cf(20), f[6]);
    // d: butterflies of groups of four
    for (int i = 0; i < 16; i += 8) begin
      d[i]     = e[i] + e[i + 3];      d[i + 3] = e[i] - e[i + 3];
      d[i + 1] = e[i + 1] + e[i + 2];  d[i + 2] = e[i + 1] - e[i + 2];
      d[i + 4] = e[i + 7] - e[i + 4];  d[i + 7] = e[i + 4] + e[i + 7];
      d[i + 5] = e[i + 6] - e[i + 5];  d[i + 6] = e[i + 5] + e[i + 6];
    end
    // c: rotations by pi/8
    c = d;
    for (int i = 2; i <= 3; i++) begin
      c[i]      = r8(-cf(8), d[i], cf(24), d[15 - i]);
      c[15 - i] = r8(cf(8), d[15 - i], cf(24), d[i]);
    end
    for (int i = 4; i <= 5; i++) begin
      c[i]      = r8(-cf(24), d[i], -cf(8), d[15 - i]);
      c[15 - i] = r8(cf(24), d[15 - i], -cf(8), d[i]);
    end
    // b: butterflies of groups of eight
    for (int i = 0; i < 4; i++) begin
      b[i]      = c[i] + c[7 - i];       b[7 - i]  = c[i] - c[7 - i];
      b[8 + i]  = c[15 - i] - c[8 + i];  b[15 - i] = c[8 + i] + c[15 - i];
    end
    // a: rotations by pi/4
    a = b;
    for (int i = 4; i < 8; i++) begin
      a[i]      = r8(-181, b[i], 181, b[15 - i]);
      a[15 - i] = r8(181, b[15 - i], 181, b[i]);
    end
    for (int n = 0; n < 16; n++) o[n] = a[15 - n];
  endfunction

  function automatic void idct32(input longint x [32], output longint y [32]);
    longint xe [16], ye [16], o [16];
    for (int i = 0; i < 16; i++) xe[i] = x[2 * i];
    idct16(xe, ye);
    odd32(x, o);
    for (int n = 0; n < 16; n++) begin
      y[n]      = ye[n] + o[n];
      y[31 - n] = ye[n] - o[n];
    end
  endfunction

  function automatic real idct_real(input longint x [32], input int n_pts, input int n);
    real s;
    s = 0.0;
    for (int k = 0; k < n_pts; k++)
      s += ((k == 0) ? 0.70710678118654752 : 1.0) * real'(x[k])
           * $cos(real'((2 * n + 1) * k) * PI / real'(2 * n_pts));
    return s;
  endfunction
endpackage
