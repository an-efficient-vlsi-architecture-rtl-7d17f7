// conv_ref_pkg: reference model of the convolution DWT engine for the
// testbenches. Daubechies D4 filters from their closed form, rounded to single
// precision; each output is the four-tap sum rounded after every multiply and
// add in tap order, with periodic extension; tiles are transformed rows first,
// then columns, level by level (2D), or row by row over all levels (1D).
package conv_ref_pkg;
  import fp_ref_pkg::*;

  function automatic real coef(input bit hi, input int k);
    real s3, d, h[4];
    s3 = $sqrt(3.0);
    d  = 4.0 * $sqrt(2.0);
    h[0] = to_s((1.0 + s3) / d); h[1] = to_s((3.0 + s3) / d);
    h[2] = to_s((3.0 - s3) / d); h[3] = to_s((1.0 - s3) / d);
    if (!hi) return h[k];
    case (k)
      0: return h[3];
      1: return -h[2];
      2: return h[1];
      default: return -h[0];
    endcase
  endfunction

  function automatic void level(ref real v[], input int l);
    real o[], acc, p;
    int n;
    bit hi;
    o = new[l];
    for (int j = 0; j < l; j++) begin
      hi = (j >= l / 2);
      n  = hi ? j - l / 2 : j;
      for (int k = 0; k < 4; k++) begin
        p = to_s(v[(2 * n + k) % l] * coef(hi, k));
        acc = (k == 0) ? p : to_s(acc + p);
      end
      o[j] = acc;
    end
    for (int j = 0; j < l; j++) v[j] = o[j];
  endfunction

  // tile t[r*n + c], n x n
  function automatic void tile(ref real t[], input int n, input int dims, input int levels);
    real line[];
    int maxl, len;
    maxl = $clog2(n);
    if (levels < 1) levels = 1;
    if (levels > maxl) levels = maxl;
    line = new[n];
    if (dims == 1) begin
      for (int r = 0; r < n; r++) begin
        for (int c = 0; c < n; c++) line[c] = t[r * n + c];
        for (int lv = 0; lv < levels; lv++) level(line, n >> lv);
        for (int c = 0; c < n; c++) t[r * n + c] = line[c];
      end
      return;
    end
    for (int lv = 0; lv < levels; lv++) begin
      len = n >> lv;
      for (int r = 0; r < len; r++) begin
        for (int c = 0; c < len; c++) line[c] = t[r * n + c];
        level(line, len);
        for (int c = 0; c < len; c++) t[r * n + c] = line[c];
      end
      for (int c = 0; c < len; c++) begin
        for (int r = 0; r < len; r++) line[r] = t[r * n + c];
        level(line, len);
        for (int r = 0; r < len; r++) t[r * n + c] = line[r];
      end
    end
  endfunction

  // cycles from the last load handshake to the first output word
  function automatic int cycles(input int n, input int dims, input int levels);
    int maxl, cyc, len, u;
    maxl = $clog2(n);
    if (levels < 1) levels = 1;
    if (levels > maxl) levels = maxl;
    cyc = 0;
    if (dims == 1) begin
      u = 1;
      for (int lv = 0; lv < levels; lv++) u += 4 * (n >> lv) + 3;
      cyc = n * (2 * n + 4 + u);
    end else begin
      for (int lv = 0; lv < levels; lv++) begin
        len = n >> lv;
        cyc += 2 * len * (2 * len + 4 + 1 + 4 * len + 3);
      end
    end
    return cyc + 1;  // the first unload read
  endfunction
endpackage
