// fp_ref_pkg: single-precision helpers for the testbenches. Values are held as
// real (double). r2b rounds a real to the nearest IEEE 754 single-precision
// value (ties to even) and returns its bit pattern; b2r gives the value of a
// bit pattern; to_s rounds a real to single precision, so a model can round
// after each operation exactly as single-precision hardware does. Values below
// the normal range become zero, matching the hardware's flush to zero.
package fp_ref_pkg;
  function automatic logic [31:0] r2b(input real v);
    real    m, fr;
    int     e;
    longint mi;
    logic   s;
    if (v == 0.0) return 32'd0;
    s = (v < 0.0);
    m = s ? -v : v;
    e = 0;
    while (m >= 2.0) begin m = m / 2.0; e++; end
    while (m < 1.0)  begin m = m * 2.0; e--; end
    m  = m * 8388608.0;          // 2^23: integer part is the 24-bit significand
    mi = longint'($floor(m));
    fr = m - real'(mi);
    if (fr > 0.5 || (fr == 0.5 && mi[0])) mi++;
    if (mi == 64'd16777216) begin mi = 64'd8388608; e++; end
    if (e + 127 <= 0)   return {s, 31'd0};
    if (e + 127 >= 255) return {s, 8'hff, 23'd0};
    return {s, 8'(e + 127), mi[22:0]};
  endfunction

  function automatic real b2r(input logic [31:0] v);
    real r;
    int  e;
    if (v[30:23] == 8'd0) return 0.0;
    r = real'({1'b1, v[22:0]});
    e = int'(v[30:23]) - 150;
    while (e > 0) begin r = r * 2.0; e--; end
    while (e < 0) begin r = r / 2.0; e++; end
    return v[31] ? -r : r;
  endfunction

  function automatic real to_s(input real v);
    return b2r(r2b(v));
  endfunction
endpackage
