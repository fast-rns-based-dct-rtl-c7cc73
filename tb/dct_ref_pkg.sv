// dct_ref_pkg - reference models for the RNS DCT testbenches.
//
// Independent of the RTL: the fixed-point coefficients are recomputed here
// from their cosine definitions, the fast cosine transform is evaluated in
// ordinary 64-bit integer arithmetic (no modular reduction), and the plain
// orthonormal DCT is evaluated in floating point from its definition.
package dct_ref_pkg;

  localparam int FRAC = 8;               // coefficient fraction bits
  localparam real PI  = 3.14159265358979323846;

  function automatic real cc(int m, int n);
    return $cos(PI * n / m);
  endfunction

  // Quantized coefficient K_i = round(k_i * 2^FRAC).
  function automatic longint kq(int i);
    real k;
    case (i)
      0:  k = 1.0 / cc(4, 1);
      1:  k = $sqrt(2.0) / 4.0;
      2:  k = cc(4, 1) / 2.0;
      3:  k = cc(4, 1) / (4.0 * cc(8, 1));
      4:  k = cc(4, 1) / (4.0 * cc(8, 3));
      5:  k = cc(4, 1) / cc(8, 1);
      6:  k = 1.0 / cc(8, 1);
      7:  k = cc(8, 3) / cc(8, 1);
      8:  k = cc(8, 1) / (4.0 * cc(16, 1));
      9:  k = cc(8, 1) / (4.0 * cc(16, 7));
      10: k = cc(8, 1) / (4.0 * cc(16, 3));
      default: k = cc(8, 1) / (4.0 * cc(16, 5));
    endcase
    return longint'($floor(k * real'(1 << FRAC) + 0.5));
  endfunction

  // Fixed-point fast cosine transform in exact integer arithmetic.
  task automatic fct_int(input longint x [8], output longint y [8]);
    longint a1, a2, a3, a4, a5, a6, a7, a8;
    longint b1, b2, b3, b4, b5, b6, b7, b8;
    longint c1, c2, c3, c4, c5, c6, c7, c8;
    longint e;
    e  = longint'(1) << FRAC;
    a1 = x[0] + x[7];  a2 = x[1] + x[6];  a3 = x[2] + x[5];  a4 = x[3] + x[4];
    a5 = x[3] - x[4];  a6 = x[2] - x[5];  a7 = x[1] - x[6];  a8 = x[0] - x[7];
    b1 = a1 + a4;      b2 = a2 + a3;      b3 = a2 - a3;      b4 = a1 - a4;
    b5 = a5 + a6;      b6 = kq(5) * (a6 + a7);
    b7 = a7 + a8;      b8 = kq(6) * a8;
    c1 = b1 + b2;      c2 = b1 - b2;      c3 = e * (b3 + b4); c4 = kq(0) * b4;
    c5 = kq(7) * b5 + e * b7;  c6 = b6 + b8;
    c7 = kq(7) * b7 - e * b5;  c8 = b8 - b6;
    y[0] = kq(1) * c1;          y[4] = kq(2) * c2;
    y[2] = kq(3) * (c3 + c4);   y[6] = kq(4) * (c4 - c3);
    y[1] = kq(8) * (c5 + c6);   y[7] = kq(9) * (c6 - c5);
    y[3] = kq(10) * (c7 + c8);  y[5] = kq(11) * (c8 - c7);
  endtask

  // Orthonormal 8-point DCT from its definition.
  function automatic real dct_real(input longint x [8], int u);
    real s;
    s = 0.0;
    for (int i = 0; i < 8; i++)
      s += real'(x[i]) * $cos(real'(u * (2 * i + 1)) * PI / 16.0);
    if (u == 0) s = s / $sqrt(2.0);
    return s / 2.0;
  endfunction

  // Output scale exponent of X(u): one or two multiplication stages.
  function automatic int out_shift(int u);
    return (u == 0 || u == 4) ? FRAC : 2 * FRAC;
  endfunction

  // Nonnegative residue of a signed integer.
  function automatic longint res(longint v, longint m);
    longint r;
    r = v % m;
    if (r < 0) r += m;
    return r;
  endfunction

endpackage
