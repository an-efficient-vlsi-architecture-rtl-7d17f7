// dwt_ref_pkg: behavioural reference of the 5/3 lifting wavelet for the
// testbenches. It works on plain integers with no width limit, indexes
// samples through a mirror function (whole-sample symmetric extension), and
// applies the transform to a volume axis by axis, level by level. It shares no
// code with the RTL.
package dwt_ref_pkg;

  localparam int QF = 14;

  function automatic int fdiv(input int a, input int b);  // floor(a / b), b > 0
    int q;
    q = a / b;
    if ((a % b != 0) && (a < 0)) q = q - 1;
    return q;
  endfunction

  function automatic int rscale(input int v, input int kq);  // round(v * kq / 2^QF)
    longint p;
    p = longint'(v) * longint'(kq) + (longint'(1) << (QF - 1));
    return int'(p >>> QF);
  endfunction

  function automatic int mirror(input int i, input int len);
    if (i < 0) return -i;
    if (i >= len) return 2 * (len - 1) - i;
    return i;
  endfunction

  // forward: x[0..len-1] -> low half then high half
  function automatic void fwd_line(ref int x[], input int len, input int kq, input int kinvq);
    int d[], s[], h;
    h = len / 2;
    d = new[h];
    s = new[h];
    for (int n = 0; n < h; n++)
      d[n] = x[2*n+1] - fdiv(x[2*n] + x[mirror(2*n+2, len)], 2);
    for (int n = 0; n < h; n++)
      s[n] = x[2*n] + fdiv(d[(n == 0) ? 0 : n-1] + d[n] + 2, 4);
    for (int n = 0; n < h; n++) begin
      x[n]     = rscale(s[n], kinvq);
      x[h + n] = rscale(d[n], kq);
    end
  endfunction

  // inverse: low half then high half -> x[0..len-1]
  function automatic void inv_line(ref int x[], input int len, input int kq, input int kinvq);
    int d[], s[], e[], h;
    h = len / 2;
    d = new[h];
    s = new[h];
    e = new[h];
    for (int n = 0; n < h; n++) begin
      s[n] = rscale(x[n], kq);
      d[n] = rscale(x[h + n], kinvq);
    end
    for (int n = 0; n < h; n++)
      e[n] = s[n] - fdiv(d[(n == 0) ? 0 : n-1] + d[n] + 2, 4);
    for (int n = 0; n < h; n++) begin
      x[2*n]   = e[n];
      x[2*n+1] = d[n] + fdiv(e[n] + e[(n + 1 < h) ? n+1 : n], 2);
    end
  endfunction

  function automatic int imin(input int a, input int b);
    return (a < b) ? a : b;
  endfunction

  function automatic int ilog2(input int v);
    int r = 0;
    while ((1 << (r + 1)) <= v) r++;
    return r;
  endfunction

  // Transform a volume v[(f*n + r)*n + c] of n x n x nf samples in place.
  function automatic void xform(ref int v[], input int n, input int nf, input int dims,
                                input int levels, input bit inverse,
                                input int kq, input int kinvq);
    int sz[3], ext[3], lv, line[], maxl;
    sz[0] = n; sz[1] = n; sz[2] = nf;
    if (dims == 0) return;
    maxl = (dims == 3) ? ilog2(imin(n, nf)) : ilog2(n);
    if (levels > maxl) levels = maxl;
    for (int step = 0; step < levels * dims; step++) begin
      int lvl, ax;
      if (!inverse) begin lvl = step / dims; ax = step % dims; end
      else begin lvl = levels - 1 - step / dims; ax = dims - 1 - step % dims; end
      for (int a = 0; a < 3; a++) ext[a] = (a < dims) ? (sz[a] >> lvl) : sz[a];
      line = new[ext[ax]];
      for (int i0 = 0; i0 < ext[(ax + 1) % 3]; i0++)
        for (int i1 = 0; i1 < ext[(ax + 2) % 3]; i1++) begin
          int c[3];
          c[(ax + 1) % 3] = i0;
          c[(ax + 2) % 3] = i1;
          for (int k = 0; k < ext[ax]; k++) begin
            c[ax] = k;
            line[k] = v[(c[2] * n + c[1]) * n + c[0]];
          end
          if (!inverse) fwd_line(line, ext[ax], kq, kinvq);
          else          inv_line(line, ext[ax], kq, kinvq);
          for (int k = 0; k < ext[ax]; k++) begin
            c[ax] = k;
            v[(c[2] * n + c[1]) * n + c[0]] = line[k];
          end
        end
    end
  endfunction

  // cycles the engine spends on the transform passes: 2*len+3 per line
  function automatic int xform_cycles(input int n, input int nf, input int dims, input int levels);
    int sz[3], ext[3], maxl, cyc;
    sz[0] = n; sz[1] = n; sz[2] = nf;
    cyc = 0;
    if (dims == 0) return 0;
    maxl = (dims == 3) ? ilog2(imin(n, nf)) : ilog2(n);
    if (levels > maxl) levels = maxl;
    for (int lvl = 0; lvl < levels; lvl++)
      for (int ax = 0; ax < dims; ax++) begin
        for (int a = 0; a < 3; a++) ext[a] = (a < dims) ? (sz[a] >> lvl) : sz[a];
        cyc += ext[(ax + 1) % 3] * ext[(ax + 2) % 3] * (2 * ext[ax] + 3);
      end
    return cyc;
  endfunction

endpackage
