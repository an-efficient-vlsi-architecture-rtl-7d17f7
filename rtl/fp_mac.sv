// fp_mac: one-stage pipelined single-precision floating-point multiply-
// accumulate unit of the convolution DWT engine.
//
// Stage 1 multiplies the sample by the filter coefficient and registers the
// product; stage 2 either starts a new sum with it (init = 1, multiplication
// only) or adds it to the accumulator (init = 0, multiply-accumulate). Each
// operation rounds once after the multiplication and once after the addition.
// The one-stage pipeline and the "multiply only / accumulate" control input
// follow the design description; IEEE single precision and the reset to zero
// are this implementation's choices (see fp_mul and fp_add for the handling of
// special values).
//
// Timing: operands presented with en = 1 in cycle c reach acc at the end of
// cycle c+1, so acc holds a four-tap sum two cycles after its last tap was
// issued.
module fp_mac (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        en,
  input  logic        init,
  input  logic [31:0] a,
  input  logic [31:0] b,
  output logic [31:0] acc
);

  logic [31:0] prod, prod_q, sum;
  logic        en_q, init_q;

  fp_mul u_mul (.a(a), .b(b), .y(prod));
  fp_add u_add (.a(acc), .b(prod_q), .y(sum));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      prod_q <= '0;
      en_q   <= 1'b0;
      init_q <= 1'b0;
      acc    <= '0;
    end else begin
      prod_q <= prod;
      en_q   <= en;
      init_q <= init;
      if (en_q) acc <= init_q ? prod_q : sum;
    end
  end

endmodule
