// fp_add: IEEE 754 single-precision adder, combinational, used by the
// floating-point MAC of the convolution DWT engine.
//
// The operand of larger magnitude is kept, the other is shifted right to its
// exponent with guard, round and sticky bits, the significands are added or
// subtracted, the sum is normalised (one place right, or left by its leading
// zero count) and rounded to nearest, ties to even. Simplifications, all this
// implementation's choices: zero and subnormal inputs count as zero, a result
// below the normal range is flushed to zero, one above it becomes infinity,
// NaN and infinity are not treated specially, and an exact cancellation gives +0.
module fp_add (
  input  logic [31:0] a,
  input  logic [31:0] b,
  output logic [31:0] y
);

  logic [31:0] big, sml;
  logic [7:0]  d;
  logic [26:0] mb, ms;       // 1.f followed by guard, round, sticky
  logic [27:0] sum;
  logic [4:0]  lz;
  logic signed [9:0] e;
  logic [23:0] mant;
  logic        up;
  logic [24:0] mr;

  always_comb begin
    if (a[30:0] >= b[30:0]) begin big = a; sml = b; end
    else                    begin big = b; sml = a; end
    d  = big[30:23] - sml[30:23];
    mb = {1'b1, big[22:0], 3'b000};
    ms = {1'b1, sml[22:0], 3'b000};
    if (d >= 8'd27) begin
      ms = 27'd1;  // only the sticky bit survives
    end else begin
      ms = (ms >> d) | 27'(((ms & ~({27{1'b1}} << d)) != 27'd0));
    end
    if (big[31] ^ sml[31]) sum = {1'b0, mb} - {1'b0, ms};
    else                   sum = {1'b0, mb} + {1'b0, ms};
    e = 10'(big[30:23]);
    lz = '0;
    if (sum[27]) begin
      sum = {1'b0, sum[27:2], sum[1] | sum[0]};
      e   = e + 10'sd1;
    end else begin
      // leading zeros above bit 26: the highest set bit wins
      for (int i = 0; i <= 26; i++) begin
        if (sum[i]) lz = 5'(26 - i);
      end
      sum = sum << lz;
      e   = e - 10'(lz);
    end
    mant = sum[26:3];
    up   = sum[2] && (sum[1] || sum[0] || mant[0]);
    mr   = {1'b0, mant} + 25'(up);
    if (mr[24]) begin
      mr = mr >> 1;
      e  = e + 10'sd1;
    end
    if (a[30:23] == 8'd0)
      y = b;
    else if (b[30:23] == 8'd0)
      y = a;
    else if (sum[26:0] == 27'd0 || e <= 10'sd0)
      y = 32'd0;
    else if (e >= 10'sd255)
      y = {big[31], 8'hff, 23'd0};
    else
      y = {big[31], e[7:0], mr[22:0]};
  end

endmodule
