// dwt_line_buffer: the line buffer that holds every line of the tile or volume
// being transformed, between the load, the transform passes and the unload.
//
// A single-port synchronous RAM of DEPTH signed W-bit words. Rows are read and
// written back in order for the row pass; the column and frame passes read the
// same storage with a stride, which is the transposition of the buffered row
// results that a separable transform needs. With en high and we high, wdata is
// written to addr at the clock edge; with en high and we low, the word at addr
// appears on rdata after the edge and stays there until the next read.
//
// The design names line buffers as one of its three parts and describes row
// results stored in a buffer and read back transposed for the column process.
// Holding the whole volume, and the single-port synchronous form, are this
// implementation's choices. The RAM is not reset; every word is written by the
// load before it is read.
module dwt_line_buffer #(
  parameter int unsigned DEPTH = dwt_pkg::DWT_N * dwt_pkg::DWT_N * dwt_pkg::DWT_F,
  parameter int unsigned W     = dwt_pkg::DWT_W
) (
  input  logic                       clk,
  input  logic                       en,
  input  logic                       we,
  input  logic [$clog2(DEPTH)-1:0]   addr,
  input  logic signed [W-1:0]        wdata,
  output logic signed [W-1:0]        rdata
);

  logic signed [W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (en) begin
      if (we) mem[addr] <= wdata;
      else    rdata     <= mem[addr];
    end
  end

endmodule
