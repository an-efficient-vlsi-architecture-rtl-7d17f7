// dwt_lift_top: lifting-based discrete wavelet transform engine for image
// compression. It computes the 5/3 wavelet transform of an N x N tile (1D over
// rows or 2D over rows and columns) or of a volume of F such tiles (3D, adding
// the frame axis), over several resolution levels, forward or inverse.
//
// Three parts do the work, as in the design description: a line buffer that
// holds the lines of the tile or volume, a PIPO line register, and a lifting
// block that transforms a whole line in one clock. The controller moves one
// line at a time from the line buffer into the PIPO, lets the lifting block
// overwrite the PIPO with the transformed line, and writes it back in place.
// Because all three axes go through the same line path, the engine is
// separable; every pass of every level uses the same hardware.
//
// Run protocol: pulse start_i with cfg_i; then N*N*F samples are taken on
// in_valid_i/in_data_i while in_ready_o is high, in raster order (column fastest,
// then row, then frame). After the transform the result leaves on
// out_valid_o/out_data_o/out_ready_i in the same raster order, out_last_o marking
// the final word; done_o pulses once afterwards. In the result each transformed
// line holds its low-pass half first and its high-pass half after it, so after
// L levels the coarsest low-pass band sits in the corner at index 0.
//
// Timing: a line of length len costs 2*len+3 cycles; a load costs one cycle per
// accepted sample and an unload two cycles per sample. The stream interfaces,
// the parameters N = 8 (the 8 x 8 example tile of the design description),
// F = 8 and W = 16, and the
// scaling k = 1 are this implementation's choices where the description gives
// no figure.
module dwt_lift_top
  import dwt_pkg::*;
#(
  parameter int unsigned N  = DWT_N,
  parameter int unsigned F  = DWT_F,
  parameter int unsigned W  = DWT_W,
  parameter logic [DWT_KW-1:0] K_Q    = DWT_K_ONE,
  parameter logic [DWT_KW-1:0] KINV_Q = DWT_K_ONE
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start_i,
  input  dwt_cfg_t             cfg_i,
  output logic                 busy_o,
  output logic                 done_o,
  input  logic                 in_valid_i,
  output logic                 in_ready_o,
  input  logic signed [W-1:0]  in_data_i,
  output logic                 out_valid_o,
  input  logic                 out_ready_i,
  output logic signed [W-1:0]  out_data_o,
  output logic                 out_last_o
);

  localparam int unsigned LMAX  = (N > F) ? N : F;
  localparam int unsigned LW    = $clog2(LMAX);
  localparam int unsigned TOTAL = N * N * F;
  localparam int unsigned AW    = $clog2(TOTAL);

  logic              mem_en, mem_we, mem_wsel_line;
  logic [AW-1:0]     mem_addr;
  logic signed [W-1:0] mem_wdata, mem_rdata;
  logic [LW-1:0]     line_idx, pipo_idx;
  logic              pipo_wr, pipo_load;
  logic [LW:0]       lift_len;
  logic              lift_inv;
  logic signed [W-1:0] line_q    [LMAX];
  logic signed [W-1:0] line_lift [LMAX];

  dwt_ctrl #(.N(N), .F(F)) u_ctrl (
    .clk, .rst_n,
    .start_i, .cfg_i, .busy_o, .done_o,
    .in_valid_i, .in_ready_o,
    .out_valid_o, .out_ready_i, .out_last_o,
    .mem_en_o(mem_en), .mem_we_o(mem_we), .mem_addr_o(mem_addr),
    .mem_wsel_line_o(mem_wsel_line), .line_idx_o(line_idx),
    .pipo_wr_o(pipo_wr), .pipo_idx_o(pipo_idx), .pipo_load_o(pipo_load),
    .lift_len_o(lift_len), .lift_inv_o(lift_inv)
  );

  assign mem_wdata = mem_wsel_line ? line_q[line_idx] : in_data_i;

  dwt_line_buffer #(.DEPTH(TOTAL), .W(W)) u_buf (
    .clk, .en(mem_en), .we(mem_we), .addr(mem_addr),
    .wdata(mem_wdata), .rdata(mem_rdata)
  );

  pipo_reg #(.N(LMAX), .W(W)) u_pipo (
    .clk, .rst_n,
    .wr_en(pipo_wr), .wr_idx(pipo_idx), .wr_data(mem_rdata),
    .par_load(pipo_load), .par_in(line_lift), .q(line_q)
  );

  lift53_line #(.N(LMAX), .W(W), .K_Q(K_Q), .KINV_Q(KINV_Q)) u_lift (
    .inverse(lift_inv), .len(lift_len), .x(line_q), .y(line_lift)
  );

  assign out_data_o = mem_rdata;

endmodule
