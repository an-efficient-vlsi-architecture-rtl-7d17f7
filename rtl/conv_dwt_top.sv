// conv_dwt_top: convolution-based floating-point DWT engine. It computes the
// 1D (rows only) or 2D (rows, then columns) multi-level wavelet decomposition
// of an N x N tile of IEEE 754 single-precision samples with four-tap
// Daubechies filters, using one pipelined floating-point MAC.
//
// Parts: a tile buffer that holds the row results and is read back column-wise
// (transposed) for the column process, a PIPO line register, the 1D unit
// (select-line table, address counter, sample and coefficient multiplexers,
// MAC) and the controller. Each line goes from the buffer into the PIPO, through
// the 1D unit, back into the PIPO and back to the same place in the buffer, so
// the transform is done in place: after L levels each line holds its low-pass
// half before its high-pass half, and the coarsest low-pass band is the corner
// at index 0.
//
// Run protocol (same as the lifting engine): pulse start_i with cfg_i (dims 1 or
// 2, levels, inverse ignored); N*N samples enter on in_valid_i/in_data_i while
// in_ready_o is high, in raster order; the coefficients leave on
// out_valid_o/out_data_o/out_ready_i in raster order with out_last_o on the last;
// done_o pulses at the end.
//
// Timing: a line of length len run for v levels costs 2*len+4 cycles plus
// 1 + sum(4L+3) cycles in the 1D unit over its levels L = len, len/2, ...
//
// The convolution architecture with a single floating-point MAC, the select
// lines from a table, the row-then-column processing through a transposed
// buffer and the 8 x 8 tile are from the design description. The filter
// coefficients, the periodic extension, the in-place buffer holding the whole
// tile and the streams are this implementation's choices.
module conv_dwt_top
  import dwt_pkg::*;
#(
  parameter int unsigned N = conv_pkg::CONV_N
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start_i,
  input  dwt_cfg_t     cfg_i,
  output logic         busy_o,
  output logic         done_o,
  input  logic         in_valid_i,
  output logic         in_ready_o,
  input  logic [31:0]  in_data_i,
  output logic         out_valid_o,
  input  logic         out_ready_i,
  output logic [31:0]  out_data_o,
  output logic         out_last_o
);

  localparam int unsigned LW    = $clog2(N);
  localparam int unsigned TOTAL = N * N;
  localparam int unsigned AW    = $clog2(TOTAL);

  logic              mem_en, mem_we, mem_wsel_line;
  logic [AW-1:0]     mem_addr;
  logic signed [31:0] mem_wdata, mem_rdata;
  logic [LW-1:0]     line_idx, pipo_idx;
  logic              pipo_wr, pipo_load;
  logic              u_start, u_done, u_busy;
  logic [LW:0]       u_len;
  logic [2:0]        u_levels;
  // float bit patterns; typed signed only to match the shared PIPO register
  logic signed [31:0] line_q [N];
  logic signed [31:0] line_y [N];

  conv_ctrl #(.N(N)) u_ctrl (
    .clk, .rst_n,
    .start_i, .cfg_i, .busy_o, .done_o,
    .in_valid_i, .in_ready_o,
    .out_valid_o, .out_ready_i, .out_last_o,
    .mem_en_o(mem_en), .mem_we_o(mem_we), .mem_addr_o(mem_addr),
    .mem_wsel_line_o(mem_wsel_line), .line_idx_o(line_idx),
    .pipo_wr_o(pipo_wr), .pipo_idx_o(pipo_idx), .pipo_load_o(pipo_load),
    .u_start_o(u_start), .u_len_o(u_len), .u_levels_o(u_levels), .u_done_i(u_done)
  );

  assign mem_wdata = mem_wsel_line ? line_q[line_idx] : in_data_i;

  dwt_line_buffer #(.DEPTH(TOTAL), .W(32)) u_buf (
    .clk, .en(mem_en), .we(mem_we), .addr(mem_addr),
    .wdata(mem_wdata), .rdata(mem_rdata)
  );

  pipo_reg #(.N(N), .W(32)) u_pipo (
    .clk, .rst_n,
    .wr_en(pipo_wr), .wr_idx(pipo_idx), .wr_data(mem_rdata),
    .par_load(pipo_load), .par_in(line_y), .q(line_q)
  );

  conv_dwt1d #(.N(N)) u_1d (
    .clk, .rst_n,
    .start(u_start), .len(u_len), .levels(u_levels), .x(line_q),
    .busy(u_busy), .done(u_done), .y(line_y)
  );

  assign out_data_o = 32'(mem_rdata);

  // The controller starts the 1D unit only when it is idle.
  a_unit_idle: assert property (@(posedge clk) disable iff (!rst_n) u_start |-> !u_busy);

endmodule
