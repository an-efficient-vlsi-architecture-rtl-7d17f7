// pipo_reg: parallel-in parallel-out line register between the line buffer and
// the lifting block.
//
// A line is gathered into it one word at a time from the line buffer (wr_en,
// wr_idx, wr_data), presented to the lifting block as a whole (q), and replaced
// in one clock by the lifting block's result (par_load, par_in): the transform
// of a line is done in place. The register is then read word by word (q) while
// the line is written back. A parallel load wins over a word write in the same
// cycle. The design names a PIPO as one of its three parts; its width, the word
// write port and the reset to zero are this implementation's choices.
//
// Timing: both writes take effect at the rising clock edge; q is registered.
module pipo_reg #(
  parameter int unsigned N = dwt_pkg::DWT_N,
  parameter int unsigned W = dwt_pkg::DWT_W
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   wr_en,
  input  logic [$clog2(N)-1:0]   wr_idx,
  input  logic signed [W-1:0]    wr_data,
  input  logic                   par_load,
  input  logic signed [W-1:0]    par_in [N],
  output logic signed [W-1:0]    q      [N]
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int j = 0; j < N; j++) q[j] <= '0;
    end else if (par_load) begin
      q <= par_in;
    end else if (wr_en) begin
      q[wr_idx] <= wr_data;
    end
  end

endmodule
