// tx_ref_pkg: reference models for the H.264 transform testbenches.
//
// Two kinds of reference are provided per transform:
//  * exact_*: the transform as a plain matrix product with integer
//    coefficients (fractional coefficients scaled up), no shifts at all;
//  * bitx_*:  bit-exact models of the shift-and-add decompositions, written
//    directly from their algebraic form (the 8-point inverse from its
//    published four-stage equations, the 8-point forward from the usual
//    H.264 reference-encoder butterflies, the 4x4 inverse from its direct
//    2D decomposition), independent of the routing tables of the RTL.
// All arithmetic is done in 32-bit int, so the models do not wrap.
package tx_ref_pkg;

  typedef int vec8_t  [8];
  typedef int vec16_t [16];

  // 8 x the 8-point inverse matrix Ei (rows = outputs).
  localparam int EI8 [8][8] = '{
    '{8, 12,  8, 10,  8,  6,  4,  3},
    '{8, 10,  4, -3, -8,-12, -8, -6},
    '{8,  6, -4,-12, -8,  3,  8, 10},
    '{8,  3, -8, -6,  8, 10, -4,-12},
    '{8, -3, -8,  6,  8,-10, -4, 12},
    '{8, -6, -4, 12, -8, -3,  8,-10},
    '{8,-10,  4,  3, -8, 12, -8,  6},
    '{8,-12,  8,-10,  8, -6,  4, -3}};

  // 2 x the 4x4 inverse matrix Ci, the 4x4 forward matrix Cf and the
  // 4x4 Hadamard matrix H.
  localparam int CI4x2 [4][4] = '{'{2,2,2,1},'{2,1,-2,-2},'{2,-1,-2,2},'{2,-2,2,-1}};
  localparam int CF4   [4][4] = '{'{1,1,1,1},'{2,1,-1,-2},'{1,-1,-1,1},'{1,-2,2,-1}};
  localparam int H4    [4][4] = '{'{1,1,1,1},'{1,1,-1,-1},'{1,-1,-1,1},'{1,-1,1,-1}};

  // 8 * (Ei x)
  function automatic vec8_t exact_inv8(vec8_t x);
    vec8_t y;
    for (int k = 0; k < 8; k++) begin
      y[k] = 0;
      for (int n = 0; n < 8; n++) y[k] += EI8[k][n] * x[n];
    end
    return y;
  endfunction

  // 8 * (Ei^T x), the forward 8-point transform
  function automatic vec8_t exact_fwd8(vec8_t x);
    vec8_t y;
    for (int k = 0; k < 8; k++) begin
      y[k] = 0;
      for (int n = 0; n < 8; n++) y[k] += EI8[n][k] * x[n];
    end
    return y;
  endfunction

  // Y = M X M^T for a 4x4 integer matrix M, X[4i+j]
  function automatic vec16_t mxmt(int m [4][4], vec16_t x);
    vec16_t y;
    for (int i = 0; i < 4; i++)
      for (int j = 0; j < 4; j++) begin
        y[4*i+j] = 0;
        for (int k = 0; k < 4; k++)
          for (int l = 0; l < 4; l++)
            y[4*i+j] += m[i][k] * x[4*k+l] * m[j][l];
      end
    return y;
  endfunction

  function automatic vec16_t exact_fwd4(vec16_t x); return mxmt(CF4, x);   endfunction
  function automatic vec16_t exact_had4(vec16_t x); return mxmt(H4, x);    endfunction
  // 4 * (Ci X Ci^T)
  function automatic vec16_t exact_inv4x4(vec16_t x); return mxmt(CI4x2, x); endfunction

  // 2x2 Hadamard, x = c00 c01 c10 c11, y in the same order
  function automatic vec8_t exact_had2(vec8_t x);
    vec8_t y = '{default: 0};
    y[0] = x[0] + x[1] + x[2] + x[3];
    y[1] = x[0] - x[1] + x[2] - x[3];
    y[2] = x[0] + x[1] - x[2] - x[3];
    y[3] = x[0] - x[1] - x[2] + x[3];
    return y;
  endfunction

  // Published stage equations of the 8-point inverse transform.
  function automatic vec8_t bitx_inv8(vec8_t x);
    int a[12], b[12], c[8];
    vec8_t y;
    a[0]  = x[1] + (x[1] >>> 1);   a[1]  = x[7] + (x[7] >>> 1);
    a[2]  = x[1] + (x[1] >>> 2);   a[3]  = x[1] - (x[1] >>> 2);
    a[4]  = (x[7] >>> 2) - x[7];   a[5]  = (x[7] >>> 2) + x[7];
    a[6]  = (x[3] >>> 2) + x[3];   a[7]  = (x[3] >>> 2) - x[3];
    a[8]  = x[5] - (x[5] >>> 2);   a[9]  = x[5] + (x[5] >>> 2);
    a[10] = x[3] + (x[3] >>> 1);   a[11] = x[5] + (x[5] >>> 1);
    b[0]  = x[0] + x[4];           b[1]  = x[2] + (x[6] >>> 1);
    b[2]  = x[0] - x[4];           b[3]  = x[6] - (x[2] >>> 1);
    b[4]  = a[0] + (a[1] >>> 2);   b[5]  = (a[0] >>> 2) - a[1];
    b[6]  = a[2] + a[4];           b[7]  = a[3] + a[5];
    b[8]  = a[6] + a[8];           b[9]  = a[7] + a[9];
    b[10] = a[11] + (a[10] >>> 2); b[11] = a[10] - (a[11] >>> 2);
    c[0] = b[0] + b[1];  c[1] = b[0] - b[1];
    c[2] = b[2] - b[3];  c[3] = b[2] + b[3];
    c[4] = b[4] + b[8];  c[5] = b[5] + b[9];
    c[6] = b[6] - b[10]; c[7] = b[7] - b[11];
    y[0] = c[0] + c[4];  y[1] = c[2] + c[6];
    y[2] = c[3] + c[7];  y[3] = c[1] + c[5];
    y[4] = c[1] - c[5];  y[5] = c[3] - c[7];
    y[6] = c[2] - c[6];  y[7] = c[0] - c[4];
    return y;
  endfunction

  // 8-point forward transform butterflies of the H.264 reference encoder.
  function automatic vec8_t bitx_fwd8(vec8_t x);
    int a[8], b[8];
    vec8_t y;
    for (int k = 0; k < 4; k++) begin
      a[k]     = x[k] + x[7-k];
      a[k + 4] = x[k] - x[7-k];
    end
    b[0] = a[0] + a[3];  b[1] = a[1] + a[2];
    b[2] = a[0] - a[3];  b[3] = a[1] - a[2];
    b[4] = a[5] + a[6] + ((a[4] >>> 1) + a[4]);
    b[5] = a[4] - a[7] - ((a[6] >>> 1) + a[6]);
    b[6] = a[4] + a[7] - ((a[5] >>> 1) + a[5]);
    b[7] = a[5] - a[6] + ((a[7] >>> 1) + a[7]);
    y[0] = b[0] + b[1];          y[4] = b[0] - b[1];
    y[2] = b[2] + (b[3] >>> 1);  y[6] = (b[2] >>> 1) - b[3];
    y[1] = b[4] + (b[7] >>> 2);  y[7] = (b[4] >>> 2) - b[7];
    y[3] = b[5] + (b[6] >>> 2);  y[5] = b[6] - (b[5] >>> 2);
    return y;
  endfunction

  // One 4-point inverse row transform with the 0.5 factors applied to the
  // terms of that row.
  function automatic vec16_t row_inv4(vec16_t v);
    vec16_t u = '{default: 0};
    u[0] = (v[0] + v[1]) + (v[2] + (v[3] >>> 1));
    u[1] = (v[0] + (v[1] >>> 1)) - (v[2] + v[3]);
    u[2] = (v[0] - (v[1] >>> 1)) - (v[2] - v[3]);
    u[3] = (v[0] - v[1]) + (v[2] - (v[3] >>> 1));
    return u;
  endfunction

  // Direct 2D 4x4 inverse: rows of X combined first (with the 0.5 factors
  // on the odd rows), then each combined row transformed, then the even and
  // odd parts added and subtracted.
  function automatic vec16_t bitx_inv4(vec16_t x);
    vec16_t y, e, o, te, to;
    e = '{default: 0};
    o = '{default: 0};
    for (int half = 0; half < 2; half++) begin
      // half 0: rows 0 and 3 ; half 1: rows 1 and 2
      for (int l = 0; l < 4; l++) begin
        if (half == 0) begin
          e[l] = x[l] + x[8+l];
          o[l] = x[4+l] + (x[12+l] >>> 1);
        end else begin
          e[l] = x[l] - x[8+l];
          o[l] = (x[4+l] >>> 1) - x[12+l];
        end
      end
      te = row_inv4(e);
      to = row_inv4(o);
      for (int j = 0; j < 4; j++) begin
        if (half == 0) begin
          y[j]      = te[j] + to[j];
          y[12 + j] = te[j] - to[j];
        end else begin
          y[4 + j]  = te[j] + to[j];
          y[8 + j]  = te[j] - to[j];
        end
      end
    end
    return y;
  endfunction

endpackage
