// fp_mul: IEEE 754 single-precision multiplier, combinational, used by the
// floating-point MAC of the convolution DWT engine.
//
// The 24-bit significands are multiplied, the 48-bit product is normalised by
// at most one place and rounded to nearest, ties to even. Simplifications, all
// this implementation's choices: zero and subnormal inputs count as zero, a
// result below the normal range is flushed to zero, one above it becomes
// infinity, and NaN and infinity inputs are not treated specially. The DWT
// engine's samples and filter coefficients never reach those cases.
module fp_mul (
  input  logic [31:0] a,
  input  logic [31:0] b,
  output logic [31:0] y
);

  logic        s;
  logic [47:0] p;
  logic [22:0] m;
  logic        g, st, up;
  logic signed [10:0] e;
  logic [23:0] mr;

  always_comb begin
    s  = a[31] ^ b[31];
    p  = {1'b1, a[22:0]} * {1'b1, b[22:0]};
    e  = 11'(a[30:23]) + 11'(b[30:23]) - 11'sd127;
    if (p[47]) begin
      m  = p[46:24];
      g  = p[23];
      st = |p[22:0];
      e  = e + 11'sd1;
    end else begin
      m  = p[45:23];
      g  = p[22];
      st = |p[21:0];
    end
    up = g && (st || m[0]);
    mr = {1'b0, m} + 24'(up);
    if (mr[23]) e = e + 11'sd1;  // rounding carried out: significand is 1.0
    if (a[30:23] == 8'd0 || b[30:23] == 8'd0 || e <= 11'sd0)
      y = {s, 31'd0};
    else if (e >= 11'sd255)
      y = {s, 8'hff, 23'd0};
    else
      y = {s, e[7:0], mr[22:0]};
  end

endmodule
