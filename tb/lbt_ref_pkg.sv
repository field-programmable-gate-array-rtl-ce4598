// Reference model of the forward LBT, used by the testbenches only.
//
// Written with plain 32-bit integers; every assignment of a sample is cut to
// 16-bit two's complement (w16), as the hardware's 16-bit adders do. Besides
// the forward filters and transforms it holds their inverses (each lifting
// step undone in reverse order), so that a testbench can also check that
// the hardware's result inverts back to its input exactly.
package lbt_ref_pkg;

  typedef int blk_t [16];

  function automatic int w16(input int x);
    return int'(shortint'(x));
  endfunction

  // (k*y + r) >>> s, exact, then cut to 16 bits.
  function automatic int lf(input int y, input int k, input int r, input int s);
    return w16((k * y + r) >>> s);
  endfunction

  // ---------------- two-sample steps ----------------
  function automatic void rot(ref int a, ref int b);
    b = w16(b - lf(a, 1, 1, 1));
    a = w16(a + lf(b, 1, 1, 1));
  endfunction
  function automatic void inv_rot(ref int a, ref int b);
    a = w16(a - lf(b, 1, 1, 1));
    b = w16(b + lf(a, 1, 1, 1));
  endfunction

  function automatic void scl(ref int a, ref int b);
    b = w16(b - lf(a, 1, 2, 2));
    a = w16(a - lf(b, 1, 1, 1));
    a = w16(a - lf(b, 1, 0, 5));
    a = w16(a - lf(b, 1, 0, 9));
    a = w16(a - lf(b, 1, 0, 13));
    b = w16(b - lf(a, 1, 2, 2));
  endfunction
  function automatic void inv_scl(ref int a, ref int b);
    b = w16(b + lf(a, 1, 2, 2));
    a = w16(a + lf(b, 1, 0, 13));
    a = w16(a + lf(b, 1, 0, 9));
    a = w16(a + lf(b, 1, 0, 5));
    a = w16(a + lf(b, 1, 1, 1));
    b = w16(b + lf(a, 1, 2, 2));
  endfunction

  // ---------------- four-sample steps ----------------
  // 2x2 Hadamard; applying it twice with the same r gives back the input.
  function automatic void had(ref int a, ref int b, ref int c, ref int d, input int r);
    int t, c0;
    c0 = c;
    a = w16(a + d);
    b = w16(b - c);
    t = lf(w16(a - b), 1, r, 1);
    c = w16(t - d);
    d = w16(t - c0);
    a = w16(a - d);
    b = w16(b + c);
  endfunction

  function automatic void odd(ref int a, ref int b, ref int c, ref int d);
    b = w16(b - c);
    a = w16(a + d);
    c = w16(c + lf(b, 1, 1, 1));
    d = w16(lf(a, 1, 1, 1) - d);
    b = w16(b - lf(a, 3, 4, 3));
    a = w16(a + lf(b, 3, 4, 3));
    d = w16(d - lf(c, 3, 4, 3));
    c = w16(c + lf(d, 3, 4, 3));
    d = w16(d + lf(b, 1, 0, 1));
    c = w16(c - lf(a, 1, 1, 1));
    b = w16(b - d);
    a = w16(a + c);
  endfunction
  function automatic void inv_odd(ref int a, ref int b, ref int c, ref int d);
    a = w16(a - c);
    b = w16(b + d);
    c = w16(c + lf(a, 1, 1, 1));
    d = w16(d - lf(b, 1, 0, 1));
    c = w16(c - lf(d, 3, 4, 3));
    d = w16(d + lf(c, 3, 4, 3));
    a = w16(a - lf(b, 3, 4, 3));
    b = w16(b + lf(a, 3, 4, 3));
    d = w16(lf(a, 1, 1, 1) - d);
    c = w16(c - lf(b, 1, 1, 1));
    a = w16(a - d);
    b = w16(b + c);
  endfunction

  function automatic void oddodd(ref int a, ref int b, ref int c, ref int d);
    int t1, t2;
    d = w16(d + a);
    c = w16(c - b);
    t1 = lf(d, 1, 0, 1);
    t2 = lf(c, 1, 0, 1);
    a = w16(a - t1);
    b = w16(b + t2);
    a = w16(a + lf(b, 3, 4, 3));
    b = w16(b - lf(a, 3, 3, 2));
    a = w16(a + lf(b, 3, 3, 3));
    b = w16(b - t2);
    a = w16(a + t1);
    c = w16(c + b);
    d = w16(d - a);
    b = w16(-b);
    c = w16(-c);
  endfunction
  function automatic void inv_oddodd(ref int a, ref int b, ref int c, ref int d);
    int t1, t2;
    b = w16(-b);
    c = w16(-c);
    d = w16(d + a);
    c = w16(c - b);
    t1 = lf(d, 1, 0, 1);
    t2 = lf(c, 1, 0, 1);
    a = w16(a - t1);
    b = w16(b + t2);
    a = w16(a - lf(b, 3, 3, 3));
    b = w16(b + lf(a, 3, 3, 2));
    a = w16(a - lf(b, 3, 4, 3));
    b = w16(b - t2);
    a = w16(a + t1);
    c = w16(c + b);
    d = w16(d - a);
  endfunction

  // ---------------- OPF_4pt ----------------
  function automatic void opf4(ref int a, ref int b, ref int c, ref int d);
    a = w16(a + d);
    b = w16(b + c);
    d = w16(d - lf(a, 1, 1, 1));
    c = w16(c - lf(b, 1, 1, 1));
    rot(c, d);
    c = w16(-c);
    d = w16(-d);
    a = w16(a - d);
    b = w16(b - c);
    d = w16(d + lf(a, 1, 0, 1));
    c = w16(c + lf(b, 1, 0, 1));
    a = w16(a - lf(d, 3, 4, 3));
    b = w16(b - lf(c, 3, 4, 3));
    scl(a, d);
    scl(b, c);
    d = w16(d + lf(a, 1, 1, 1));
    c = w16(c + lf(b, 1, 1, 1));
    a = w16(a - d);
    b = w16(b - c);
  endfunction
  function automatic void inv_opf4(ref int a, ref int b, ref int c, ref int d);
    a = w16(a + d);
    b = w16(b + c);
    d = w16(d - lf(a, 1, 1, 1));
    c = w16(c - lf(b, 1, 1, 1));
    inv_scl(a, d);
    inv_scl(b, c);
    a = w16(a + lf(d, 3, 4, 3));
    b = w16(b + lf(c, 3, 4, 3));
    d = w16(d - lf(a, 1, 0, 1));
    c = w16(c - lf(b, 1, 0, 1));
    a = w16(a + d);
    b = w16(b + c);
    c = w16(-c);
    d = w16(-d);
    inv_rot(c, d);
    d = w16(d + lf(a, 1, 1, 1));
    c = w16(c + lf(b, 1, 1, 1));
    a = w16(a - d);
    b = w16(b - c);
  endfunction

  // ---------------- OPF_4x4 ----------------
  function automatic void had_q(ref blk_t x, input int i0, input int i1,
                                input int i2, input int i3, input int r);
    int a, b, c, d;
    a = x[i0]; b = x[i1]; c = x[i2]; d = x[i3];
    had(a, b, c, d, r);
    x[i0] = a; x[i1] = b; x[i2] = c; x[i3] = d;
  endfunction

  function automatic void had_all(ref blk_t x);
    had_q(x, 0, 3, 12, 15, 0);
    had_q(x, 1, 2, 13, 14, 0);
    had_q(x, 4, 7, 8, 11, 0);
    had_q(x, 5, 6, 9, 10, 0);
  endfunction

  function automatic void opf44(ref blk_t x);
    had_all(x);
    scl(x[0], x[15]); scl(x[1], x[14]); scl(x[4], x[11]); scl(x[5], x[10]);
    rot(x[13], x[12]); rot(x[9], x[8]); rot(x[7], x[3]); rot(x[6], x[2]);
    had_all(x);
  endfunction
  function automatic void inv_opf44(ref blk_t x);
    had_all(x);
    inv_scl(x[0], x[15]); inv_scl(x[1], x[14]); inv_scl(x[4], x[11]); inv_scl(x[5], x[10]);
    inv_rot(x[13], x[12]); inv_rot(x[9], x[8]); inv_rot(x[7], x[3]); inv_rot(x[6], x[2]);
    had_all(x);
  endfunction

  // ---------------- FCT_4x4 ----------------
  localparam int PERM [16] = '{0, 8, 4, 6, 2, 10, 14, 12, 1, 11, 15, 13, 9, 3, 7, 5};

  function automatic void fct(ref blk_t x);
    blk_t t;
    had_q(x, 0, 3, 12, 15, 0);
    had_q(x, 5, 6, 9, 10, 0);
    had_q(x, 1, 2, 13, 14, 0);
    had_q(x, 4, 7, 8, 11, 0);
    had_q(x, 0, 1, 4, 5, 1);
    odd(x[2], x[3], x[6], x[7]);
    odd(x[8], x[12], x[9], x[13]);
    oddodd(x[10], x[11], x[14], x[15]);
    for (int k = 0; k < 16; k++) t[k] = x[PERM[k]];
    x = t;
  endfunction
  function automatic void inv_fct(ref blk_t x);
    blk_t t;
    for (int k = 0; k < 16; k++) t[PERM[k]] = x[k];
    x = t;
    had_q(x, 0, 1, 4, 5, 1);
    inv_odd(x[2], x[3], x[6], x[7]);
    inv_odd(x[8], x[12], x[9], x[13]);
    inv_oddodd(x[10], x[11], x[14], x[15]);
    had_q(x, 0, 3, 12, 15, 0);
    had_q(x, 5, 6, 9, 10, 0);
    had_q(x, 1, 2, 13, 14, 0);
    had_q(x, 4, 7, 8, 11, 0);
  endfunction

  // ---------------- whole tile ----------------
  // img holds tile*tile samples in raster order and is transformed in place.
  // One LBT stage on the plane img[(r*st)*tile + c*st], r, c < tile/st.
  function automatic void lbt_stage(ref int img [], input int tile, input int st,
                                    input bit opf_en);
    int p, nb, line, r0, c0;
    int a, b, c, d;
    blk_t x;
    p  = tile / st;
    nb = p / 4;
    if (opf_en) begin
      // 4-point filter across each block boundary on the four plane edges
      for (int i = 1; i < nb; i++) begin
        for (int e = 0; e < 4; e++) begin
          line = (e < 2) ? e : p - 4 + e;
          // along a row
          a = img[(line*st)*tile + (4*i-2)*st]; b = img[(line*st)*tile + (4*i-1)*st];
          c = img[(line*st)*tile + (4*i)*st];   d = img[(line*st)*tile + (4*i+1)*st];
          opf4(a, b, c, d);
          img[(line*st)*tile + (4*i-2)*st] = a; img[(line*st)*tile + (4*i-1)*st] = b;
          img[(line*st)*tile + (4*i)*st]   = c; img[(line*st)*tile + (4*i+1)*st] = d;
          // along a column
          a = img[((4*i-2)*st)*tile + line*st]; b = img[((4*i-1)*st)*tile + line*st];
          c = img[((4*i)*st)*tile + line*st];   d = img[((4*i+1)*st)*tile + line*st];
          opf4(a, b, c, d);
          img[((4*i-2)*st)*tile + line*st] = a; img[((4*i-1)*st)*tile + line*st] = b;
          img[((4*i)*st)*tile + line*st]   = c; img[((4*i+1)*st)*tile + line*st] = d;
        end
      end
      // 4x4 filter on every block corner inside the plane
      for (int i = 1; i < nb; i++)
        for (int j = 1; j < nb; j++) begin
          r0 = 4*i - 2; c0 = 4*j - 2;
          for (int k = 0; k < 16; k++) x[k] = img[((r0 + k/4)*st)*tile + (c0 + k%4)*st];
          opf44(x);
          for (int k = 0; k < 16; k++) img[((r0 + k/4)*st)*tile + (c0 + k%4)*st] = x[k];
        end
    end
    for (int i = 0; i < nb; i++)
      for (int j = 0; j < nb; j++) begin
        for (int k = 0; k < 16; k++) x[k] = img[((4*i + k/4)*st)*tile + (4*j + k%4)*st];
        fct(x);
        for (int k = 0; k < 16; k++) img[((4*i + k/4)*st)*tile + (4*j + k%4)*st] = x[k];
      end
  endfunction

  function automatic void lbt_tile(ref int img [], input int tile, input bit opf_en);
    lbt_stage(img, tile, 1, opf_en);
    lbt_stage(img, tile, 4, opf_en);
  endfunction


  // Exact inverse of lbt_stage.
  function automatic void inv_lbt_stage(ref int img [], input int tile, input int st,
                                        input bit opf_en);
    int p, nb, line, r0, c0;
    int a, b, c, d;
    blk_t x;
    p  = tile / st;
    nb = p / 4;
    for (int i = 0; i < nb; i++)
      for (int j = 0; j < nb; j++) begin
        for (int k = 0; k < 16; k++) x[k] = img[((4*i + k/4)*st)*tile + (4*j + k%4)*st];
        inv_fct(x);
        for (int k = 0; k < 16; k++) img[((4*i + k/4)*st)*tile + (4*j + k%4)*st] = x[k];
      end
    if (opf_en) begin
      for (int i = 1; i < nb; i++)
        for (int j = 1; j < nb; j++) begin
          r0 = 4*i - 2; c0 = 4*j - 2;
          for (int k = 0; k < 16; k++) x[k] = img[((r0 + k/4)*st)*tile + (c0 + k%4)*st];
          inv_opf44(x);
          for (int k = 0; k < 16; k++) img[((r0 + k/4)*st)*tile + (c0 + k%4)*st] = x[k];
        end
      for (int i = 1; i < nb; i++) begin
        for (int e = 0; e < 4; e++) begin
          line = (e < 2) ? e : p - 4 + e;
          a = img[(line*st)*tile + (4*i-2)*st]; b = img[(line*st)*tile + (4*i-1)*st];
          c = img[(line*st)*tile + (4*i)*st];   d = img[(line*st)*tile + (4*i+1)*st];
          inv_opf4(a, b, c, d);
          img[(line*st)*tile + (4*i-2)*st] = a; img[(line*st)*tile + (4*i-1)*st] = b;
          img[(line*st)*tile + (4*i)*st]   = c; img[(line*st)*tile + (4*i+1)*st] = d;
          a = img[((4*i-2)*st)*tile + line*st]; b = img[((4*i-1)*st)*tile + line*st];
          c = img[((4*i)*st)*tile + line*st];   d = img[((4*i+1)*st)*tile + line*st];
          inv_opf4(a, b, c, d);
          img[((4*i-2)*st)*tile + line*st] = a; img[((4*i-1)*st)*tile + line*st] = b;
          img[((4*i)*st)*tile + line*st]   = c; img[((4*i+1)*st)*tile + line*st] = d;
        end
      end
    end
  endfunction

  function automatic void inv_lbt_tile(ref int img [], input int tile, input bit opf_en);
    inv_lbt_stage(img, tile, 4, opf_en);
    inv_lbt_stage(img, tile, 1, opf_en);
  endfunction

  // Number of jobs of each kind in one stage on a plane of side p.
  function automatic int n_opf4(input int p);  return 4 * 2 * (p/4 - 1); endfunction
  function automatic int n_opf44(input int p); return (p/4 - 1) * (p/4 - 1); endfunction
  function automatic int n_fct(input int p);   return (p/4) * (p/4); endfunction

  // Random sample in [-lim, lim].
  function automatic int rnd(input int lim);
    return int'($urandom_range(2*lim)) - lim;
  endfunction

endpackage
