// conv_sel_lut: the select-line lookup table of the convolution DWT engine.
//
// A read-only table with one control word per clock of the 1D transform: which
// sample (s0) and which coefficient (s1) the multiplexers feed to the MAC,
// whether the tap starts a new sum (init), when a finished sum is stored and
// when a level ends. The table holds one section per level length
// L = N, N/2, ..., 2, back to back, so a run that starts at address 0 and keeps
// counting performs the complete multi-level 1D transform of N samples; a run
// can also start at the section of a shorter line.
//
// A section of length L lasts 4L+3 cycles. Output j (low-pass for j < L/2 with
// n = j, high-pass otherwise with n = j-L/2) takes the four taps
// k = 0..3 at cycles 4j+k, sample (2n+k) mod L (periodic extension) and
// coefficient k of H or G. The MAC has one pipeline stage, so output j-1 is
// stored at cycle 4j+1, the last one at cycle 4L+1, and the outputs replace the
// working line at cycle 4L+2.
//
// The table of select lines read at an address that counts up from 0 each
// clock follows the design description; its layout and contents are derived
// here from the filter equations. Interface: addr in, sel out, combinational.
module conv_sel_lut
  import conv_pkg::*;
#(
  parameter int unsigned N = CONV_N,
  localparam int unsigned LW    = $clog2(N),
  localparam int unsigned DEPTH = 8 * N + 3 * LW - 8,  // sum of 4L+3 over L = N..2
  localparam int unsigned AW    = $clog2(DEPTH)
) (
  input  logic [AW-1:0] addr,
  output conv_sel_t     sel
);

  localparam int unsigned SW = $bits(conv_sel_t);

  // the table, word a at bits [a*SW +: SW]
  function automatic logic [DEPTH*SW-1:0] build();
    logic [DEPTH*SW-1:0] rom;
    conv_sel_t w;
    int a, j, k, n;
    bit hi;
    rom = '0;
    a = 0;
    for (int l = N; l >= 2; l = l / 2) begin
      for (int t = 0; t < 4 * l + 3; t++) begin
        w = '0;
        if (t < 4 * l) begin
          j  = t / 4;
          k  = t % 4;
          hi = (j >= l / 2);
          n  = hi ? j - l / 2 : j;
          w.mac_en = 1'b1;
          w.init   = (k == 0);
          w.s0     = 3'((2 * n + k) % l);
          w.s1     = 3'((hi ? 4 : 0) + k);
          w.wr     = (k == 1) && (j > 0);
          w.widx   = 3'(j - 1);
        end else if (t == 4 * l + 1) begin
          w.wr   = 1'b1;
          w.widx = 3'(l - 1);
        end else if (t == 4 * l + 2) begin
          w.commit = 1'b1;
          w.clen   = 4'(l);
          w.last   = 1'b1;
        end
        rom[a*SW +: SW] = w;
        a++;
      end
    end
    return rom;
  endfunction

  localparam logic [DEPTH*SW-1:0] ROM = build();

  assign sel = ROM[addr*SW +: SW];

endmodule
