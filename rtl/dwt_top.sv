// dwt_top: the two discrete wavelet transform engines for image compression,
// side by side, each with its own ports.
//
//  lift_*  the lifting engine (dwt_lift_top): the 5/3 wavelet by lifting, 1D,
//          2D or 3D, several resolution levels, forward and inverse, on an
//          8 x 8 tile or an 8 x 8 x 8 volume of 16-bit integer samples.
//  conv_*  the convolution engine (conv_dwt_top): four-tap Daubechies filters
//          computed with one pipelined single-precision floating-point MAC
//          under the control of a select-line table, 1D or 2D, several levels,
//          on an 8 x 8 tile of single-precision samples.
//
// The lifting engine is the main design; the convolution engine is the
// floating-point alternative it is measured against. They share the clock and
// reset and nothing else; each runs the same start / load stream / unload
// stream protocol described in its own file.
module dwt_top
  import dwt_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,
  // lifting engine
  input  logic                 lift_start_i,
  input  dwt_cfg_t             lift_cfg_i,
  output logic                 lift_busy_o,
  output logic                 lift_done_o,
  input  logic                 lift_in_valid_i,
  output logic                 lift_in_ready_o,
  input  logic signed [DWT_W-1:0] lift_in_data_i,
  output logic                 lift_out_valid_o,
  input  logic                 lift_out_ready_i,
  output logic signed [DWT_W-1:0] lift_out_data_o,
  output logic                 lift_out_last_o,
  // convolution engine
  input  logic                 conv_start_i,
  input  dwt_cfg_t             conv_cfg_i,
  output logic                 conv_busy_o,
  output logic                 conv_done_o,
  input  logic                 conv_in_valid_i,
  output logic                 conv_in_ready_o,
  input  logic [31:0]          conv_in_data_i,
  output logic                 conv_out_valid_o,
  input  logic                 conv_out_ready_i,
  output logic [31:0]          conv_out_data_o,
  output logic                 conv_out_last_o
);

  dwt_lift_top u_lift (
    .clk, .rst_n,
    .start_i(lift_start_i), .cfg_i(lift_cfg_i),
    .busy_o(lift_busy_o), .done_o(lift_done_o),
    .in_valid_i(lift_in_valid_i), .in_ready_o(lift_in_ready_o), .in_data_i(lift_in_data_i),
    .out_valid_o(lift_out_valid_o), .out_ready_i(lift_out_ready_i),
    .out_data_o(lift_out_data_o), .out_last_o(lift_out_last_o)
  );

  conv_dwt_top u_conv (
    .clk, .rst_n,
    .start_i(conv_start_i), .cfg_i(conv_cfg_i),
    .busy_o(conv_busy_o), .done_o(conv_done_o),
    .in_valid_i(conv_in_valid_i), .in_ready_o(conv_in_ready_o), .in_data_i(conv_in_data_i),
    .out_valid_o(conv_out_valid_o), .out_ready_i(conv_out_ready_i),
    .out_data_o(conv_out_data_o), .out_last_o(conv_out_last_o)
  );

endmodule
