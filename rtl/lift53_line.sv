// lift53_line: the lifting block. One level of the 5/3 wavelet on one line of
// samples, computed in parallel in a single combinational pass.
//
// Forward (inverse = 0), for a line x[0..len-1] with half = len/2:
//   split    e[i] = x[2i], o[i] = x[2i+1]
//   predict  d[i] = o[i] - floor((e[i] + e[i+1]) / 2)
//   update   s[i] = e[i] + floor((d[i-1] + d[i] + 2) / 4)
//   scale    y[i] = round(s[i] / k),  y[half+i] = round(d[i] * k)
// so the low-pass half comes first and the high-pass half after it. Missing
// neighbours at the line ends are mirrored (e[half] := e[half-1] and
// d[-1] := d[0]), the symmetric extension usual for the 5/3 wavelet.
// Inverse (inverse = 1) undoes the scaling, then runs the update and the predict
// steps in reverse order with their signs flipped and merges the halves back
// into even and odd positions. Samples at positions len..N-1 pass through
// unchanged, so shorter lines of later levels use the same block.
//
// The split/predict/update/scale structure, the 5/3 wavelet and the inverse by
// reversed steps follow the design description. The rounding offsets, the
// symmetric extension and the fixed-point form of k and 1/k (unsigned, QF
// fraction bits, both 1.0 by default, which gives the reversible integer
// transform) are this implementation's choices.
//
// Interface: x and y are arrays of N signed W-bit words; len (2..N, even) is the
// active line length. Purely combinational: y follows x in the same cycle.
module lift53_line #(
  parameter int unsigned N  = dwt_pkg::DWT_N,
  parameter int unsigned W  = dwt_pkg::DWT_W,
  parameter int unsigned QF = dwt_pkg::DWT_QF,
  parameter int unsigned KW = dwt_pkg::DWT_KW,
  parameter logic [KW-1:0] K_Q    = dwt_pkg::DWT_K_ONE,  // k   in fixed point
  parameter logic [KW-1:0] KINV_Q = dwt_pkg::DWT_K_ONE   // 1/k in fixed point
) (
  input  logic                    inverse,
  input  logic [$clog2(N):0]      len,
  input  logic signed [W-1:0]     x [N],
  output logic signed [W-1:0]     y [N]
);

  localparam int unsigned IW = W + 3;  // headroom for the lifting sums
  localparam int unsigned H  = N / 2;

  // round(v * kq / 2^QF), truncated to W bits
  function automatic logic signed [W-1:0] scale(input logic signed [IW-1:0] v,
                                                input logic [KW-1:0] kq);
    logic signed [IW+KW:0] p;
    p = v * $signed({1'b0, kq});
    p = p + (IW+KW+1)'(1 << (QF - 1));
    return W'(p >>> QF);
  endfunction

  logic [$clog2(N):0]     half;
  logic signed [IW-1:0]   e [H];
  logic signed [IW-1:0]   d [H];
  logic signed [IW-1:0]   s [H];
  logic signed [IW-1:0]   e_next, d_prev;

  always_comb begin
    half = len >> 1;
    for (int j = 0; j < N; j++) y[j] = x[j];
    for (int i = 0; i < H; i++) begin
      e[i] = '0;
      d[i] = '0;
      s[i] = '0;
    end
    e_next = '0;
    d_prev = '0;

    if (!inverse) begin
      // predict: high-pass from the odd samples
      for (int i = 0; i < H; i++) begin
        if (i < int'(half)) begin
          e[i]   = IW'(x[2*i]);
          e_next = (i + 1 < int'(half)) ? IW'(x[2*i+2]) : IW'(x[2*i]);
          d[i]   = IW'(x[2*i+1]) - ((e[i] + e_next) >>> 1);
        end
      end
      // update: low-pass from the even samples and the new high-pass values
      for (int i = 0; i < H; i++) begin
        if (i < int'(half)) begin
          d_prev = (i > 0) ? d[i-1] : d[0];
          s[i]   = e[i] + ((d_prev + d[i] + IW'(2)) >>> 2);
        end
      end
      // scale and place: low half first, high half after it
      for (int i = 0; i < H; i++) begin
        if (i < int'(half)) begin
          y[i]             = scale(s[i], KINV_Q);
          y[int'(half) + i] = scale(d[i], K_Q);
        end
      end
    end else begin
      // undo the scaling
      for (int i = 0; i < H; i++) begin
        if (i < int'(half)) begin
          s[i] = IW'(scale(IW'(x[i]), K_Q));
          d[i] = IW'(scale(IW'(x[int'(half) + i]), KINV_Q));
        end
      end
      // undo the update: recover the even samples
      for (int i = 0; i < H; i++) begin
        if (i < int'(half)) begin
          d_prev = (i > 0) ? d[i-1] : d[0];
          e[i]   = s[i] - ((d_prev + d[i] + IW'(2)) >>> 2);
        end
      end
      // undo the predict: recover the odd samples, merge
      for (int i = 0; i < H; i++) begin
        if (i < int'(half)) begin
          e_next   = (i + 1 < int'(half)) ? e[i+1] : e[i];
          y[2*i]   = W'(e[i]);
          y[2*i+1] = W'(d[i] + ((e[i] + e_next) >>> 1));
        end
      end
    end
  end

endmodule
