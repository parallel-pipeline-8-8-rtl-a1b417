// Reference models shared by the testbenches: the integer kernel of the
// ICT(10,9,6,2,3,1) written out as a plain 8x8 matrix, the exact 2-D
// transform, and K_H computed in floating point from its definition.
package ict_tb_pkg;

  // J(k, n): row k of the integer kernel, in natural order.
  function automatic int jmat(input int k, input int n);
    int m [8][8] = '{
      '{ 1,  1,  1,  1,  1,  1,  1,  1},
      '{10,  9,  6,  2, -2, -6, -9,-10},
      '{ 3,  1, -1, -3, -3, -1,  1,  3},
      '{ 9, -2,-10, -6,  6, 10,  2, -9},
      '{ 1, -1, -1,  1,  1, -1, -1,  1},
      '{ 6,-10,  2,  9, -9, -2, 10, -6},
      '{ 1, -3,  3, -1, -1,  3, -3,  1},
      '{ 2, -6,  9,-10, 10, -9,  6, -2}};
    return m[k][n];
  endfunction

  // 1-D: Y(k) = sum_n J(k,n) x(n).
  function automatic longint j1d_ref(input longint x [8], input int k);
    longint s = 0;
    for (int n = 0; n < 8; n++) s += longint'(jmat(k, n)) * x[n];
    return s;
  endfunction

  // 2-D: Y(u,v) = sum_{r,c} J(u,r) J(v,c) x(r,c)   (r = row, c = column).
  function automatic longint j2d_ref(input longint x [8][8], input int u, input int v);
    longint s = 0;
    for (int r = 0; r < 8; r++)
      for (int c = 0; c < 8; c++)
        s += longint'(jmat(u, r)) * longint'(jmat(v, c)) * x[r][c];
    return s;
  endfunction

  // Squared row norm of J: sum_n J(k,n)^2 (8, 442 or 40).
  function automatic int jnorm2(input int k);
    int s = 0;
    for (int n = 0; n < 8; n++) s += jmat(k, n) * jmat(k, n);
    return s;
  endfunction

  // K_H(u,v) = 1 / sqrt(|J_u|^2 |J_v|^2), exact where the root is an integer.
  function automatic real kh(input int u, input int v);
    return 1.0 / $sqrt(real'(jnorm2(u) * jnorm2(v)));
  endfunction

  // Quantised K_H(u,v) on 18 fraction bits.
  function automatic longint kh_q18(input int u, input int v);
    real k = kh(u, v);
    return longint'($floor(k * 262144.0 + 0.5));
  endfunction

  // Rounded (halves away from zero), saturated normalised coefficient.
  function automatic int norm_ref(input longint y, input int u, input int v);
    longint p = y * kh_q18(u, v);
    longint q = (p < 0) ? -((-p + 64'sd131072) >>> 18) : ((p + 64'sd131072) >>> 18);
    if (q > 2047) q = 2047;
    if (q < -2048) q = -2048;
    return int'(q);
  endfunction

endpackage
