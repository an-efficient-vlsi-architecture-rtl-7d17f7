// tb_conv_dwt_top: end-to-end test of the convolution DWT engine at its
// default size (8 x 8 tile). Random 8-bit tiles, converted to single precision,
// go through 1D and 2D transforms at one to three levels (and with level
// counts that are clamped); the output must match the reference model bit for
// bit and arrive after the expected number of cycles. The input stream has gaps
// and the output stream is throttled; each of these mechanisms is counted and
// must occur.
module tb_conv_dwt_top;
  import dwt_pkg::*;
  import fp_ref_pkg::*;
  import conv_ref_pkg::*;

  localparam int N = conv_pkg::CONV_N;
  localparam int TOTAL = N * N;

  logic clk = 0, rst_n = 0;
  logic start_i = 0;
  dwt_cfg_t cfg_i;
  logic busy_o, done_o;
  logic in_valid_i = 0, in_ready_o;
  logic [31:0] in_data_i = '0;
  logic out_valid_o, out_ready_i = 0, out_last_o;
  logic [31:0] out_data_o;

  conv_dwt_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_1d, n_2d, n_multi, n_clamp, n_gap, n_stall;

  task automatic check(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real img[];
    cfg_i = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int dims = 1; dims <= 2; dims++)
      for (int levels = 0; levels <= 4; levels++) begin
        int sent, got, cyc;
        img = new[TOTAL];
        for (int i = 0; i < TOTAL; i++) img[i] = real'($urandom_range(255, 0));
        cfg_i.dims = dwt_dims_e'(dims);
        cfg_i.levels = 3'(levels);
        cfg_i.inverse = 1'b0;
        @(negedge clk);
        start_i = 1;
        @(negedge clk);
        start_i = 0;
        sent = 0;
        while (sent < TOTAL) begin
          in_valid_i = $urandom_range(4, 0) != 0;
          if (!in_valid_i && in_ready_o) n_gap++;
          in_data_i = r2b(img[sent]);
          @(posedge clk);
          if (in_valid_i && in_ready_o) sent++;
          @(negedge clk);
        end
        in_valid_i = 0;
        tile(img, N, dims, levels);
        cyc = 0;
        while (!out_valid_o) begin
          @(negedge clk);
          cyc++;
        end
        check($sformatf("cycles dims=%0d levels=%0d", dims, levels), cyc, cycles(N, dims, levels));
        got = 0;
        while (got < TOTAL) begin
          out_ready_i = $urandom_range(3, 0) != 0;
          if (!out_ready_i && out_valid_o) n_stall++;
          @(posedge clk);
          if (out_valid_o && out_ready_i) begin
            check($sformatf("dims=%0d lv=%0d i=%0d", dims, levels, got), int'(out_data_o), int'(r2b(img[got])));
            check("out_last", int'(out_last_o), int'(got == TOTAL - 1));
            got++;
          end
          @(negedge clk);
        end
        out_ready_i = 0;
        while (busy_o) @(negedge clk);
        if (dims == 1) n_1d++; else n_2d++;
        if (levels > 1) n_multi++;
        if (levels == 0 || levels > $clog2(N)) n_clamp++;
      end
    check("1D used", int'(n_1d > 0), 1);
    check("2D used", int'(n_2d > 0), 1);
    check("multi-level used", int'(n_multi > 0), 1);
    check("clamping used", int'(n_clamp > 0), 1);
    check("input gaps used", int'(n_gap > 0), 1);
    check("output stalls used", int'(n_stall > 0), 1);
    $display("runs 1D %0d 2D %0d, multilevel %0d, clamped %0d, gaps %0d, stalls %0d",
             n_1d, n_2d, n_multi, n_clamp, n_gap, n_stall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
