// conv_dwt1d: convolution-based floating-point 1D DWT unit. It filters a line
// of up to N single-precision samples with the four-tap low-pass H and
// high-pass G filters, keeping every second output, for one or more levels.
//
// A single MAC does all the arithmetic. An address register Addr starts at the
// table section for the line length and counts up by one every clock; the
// select-line table (conv_sel_lut) gives, for each address, the multiplexer
// selects s0 (sample) and s1 (coefficient) and the MAC's init input. Finished
// sums are stored in an output register bank; at the end of a level the outputs
// replace the working line, low-pass half first. With levels > 1 the run goes
// on into the next section, which transforms the low-pass half again, so from
// address 0 the unit performs the complete N -> N/2 -> ... -> 1 decomposition.
//
// Interface: start (one cycle, while idle) takes x, len (N, N/2, ..., 2) and
// levels (clamped to 1..log2(len)); y holds the working line and is valid when
// done pulses. Timing: a level of length L takes 4L+3 cycles; done is high in
// the cycle after the last one.
//
// The single pipelined MAC, the multiplexer selects from a table read at an
// incrementing address and the H/G filter structure follow the design
// description; the D4 coefficients, the periodic extension at the line ends and
// the output register bank are this implementation's choices.
module conv_dwt1d
  import conv_pkg::*;
#(
  parameter int unsigned N = CONV_N,
  localparam int unsigned LW    = $clog2(N),
  localparam int unsigned DEPTH = 8 * N + 3 * LW - 8,
  localparam int unsigned AW    = $clog2(DEPTH)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic [LW:0]       len,
  input  logic [2:0]        levels,
  input  logic signed [31:0] x [N],   // raw single-precision bit patterns
  output logic              busy,
  output logic              done,
  output logic signed [31:0] y [N]
);

  logic [AW-1:0]  addr;
  logic [2:0]     left;
  logic signed [31:0] r [N];   // working line
  logic signed [31:0] t [N];   // outputs of the level in progress
  logic [31:0]    acc;
  conv_sel_t      sel;

  conv_sel_lut #(.N(N)) u_lut (.addr(addr), .sel(sel));

  fp_mac u_mac (
    .clk, .rst_n,
    .en(busy && sel.mac_en), .init(sel.init),
    .a(32'(r[sel.s0])), .b(CONV_COEF[sel.s1]),
    .acc(acc)
  );

  // table address of the section for a line of length l
  function automatic logic [AW-1:0] base(input logic [LW:0] l);
    int unsigned b;
    b = 0;
    for (int unsigned s = N; s >= 2; s = s / 2)
      if (s > l) b += 4 * s + 3;
    return AW'(b);
  endfunction

  // levels a line of length l allows
  function automatic logic [2:0] max_lv(input logic [LW:0] l);
    logic [2:0] m;
    m = '0;
    for (int i = 1; i <= LW; i++) if (l >= (LW+1)'(1 << i)) m = 3'(i);
    return m;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      addr <= '0;
      left <= '0;
      busy <= 1'b0;
      done <= 1'b0;
      for (int i = 0; i < N; i++) begin
        r[i] <= '0;
        t[i] <= '0;
      end
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          r    <= x;
          t    <= x;
          addr <= base(len);
          left <= (levels == 3'd0) ? 3'd1 : (levels > max_lv(len)) ? max_lv(len) : levels;
          busy <= 1'b1;
        end
      end else begin
        if (sel.wr) t[sel.widx] <= acc;
        if (sel.commit) begin
          for (int i = 0; i < N; i++) if (i < int'(sel.clen)) r[i] <= t[i];
        end
        addr <= addr + 1'b1;
        if (sel.last) begin
          left <= left - 1'b1;
          if (left == 3'd1) begin
            busy <= 1'b0;
            done <= 1'b1;
          end
        end
      end
    end
  end

  assign y = r;

endmodule
