// tb_dwt_lift_top: end-to-end test of the lifting DWT engine at its default
// size (8 x 8 tiles, 8 frames, 16-bit words). Random 8-bit images and volumes
// go through forward 1D, 2D and 3D transforms at every level count; each result
// is compared word by word with the reference model, and fed back through the
// inverse transform, which must give the original samples exactly. The input
// stream has gaps and the output stream is throttled. The transform time must
// be 2*len+3 cycles per line. Each mechanism is counted and must occur: every
// mode, multi-level runs, inverse runs, level clamping, pass-through, input
// gaps and output back-pressure.
module tb_dwt_lift_top;
  import dwt_pkg::*;
  import dwt_ref_pkg::*;

  localparam int N = DWT_N;
  localparam int F = DWT_F;
  localparam int W = DWT_W;
  localparam int TOTAL = N * N * F;

  logic clk = 0, rst_n = 0;
  logic start_i = 0;
  dwt_cfg_t cfg_i;
  logic busy_o, done_o;
  logic in_valid_i = 0, in_ready_o;
  logic signed [W-1:0] in_data_i = '0;
  logic out_valid_o, out_ready_i = 0, out_last_o;
  logic signed [W-1:0] out_data_o;

  dwt_lift_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_mode[4], n_multilevel, n_inverse, n_clamped, n_in_gap, n_out_stall;

  task automatic check(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // one run of the engine: load din, transform, collect dout
  task automatic run(input int dims, input int levels, input bit inverse,
                     input int din[], ref int dout[]);
    int sent, got, cyc, exp_cyc;
    dout = new[TOTAL];
    cfg_i.dims = dwt_dims_e'(dims);
    cfg_i.levels = 3'(levels);
    cfg_i.inverse = inverse;
    @(negedge clk);
    start_i = 1;
    @(negedge clk);
    start_i = 0;
    sent = 0;
    while (sent < TOTAL) begin
      in_valid_i = $urandom_range(4, 0) != 0;
      if (!in_valid_i && in_ready_o) n_in_gap++;
      in_data_i = W'(din[sent]);
      @(posedge clk);
      if (in_valid_i && in_ready_o) sent++;
      @(negedge clk);
    end
    in_valid_i = 0;
    cyc = 0;
    while (!out_valid_o) begin
      @(negedge clk);
      cyc++;
    end
    exp_cyc = xform_cycles(N, F, dims, levels) + 1;
    check($sformatf("cycles dims=%0d levels=%0d", dims, levels), cyc, exp_cyc);
    got = 0;
    while (got < TOTAL) begin
      out_ready_i = $urandom_range(3, 0) != 0;
      if (!out_ready_i && out_valid_o) n_out_stall++;
      @(posedge clk);
      if (out_valid_o && out_ready_i) begin
        dout[got] = int'(out_data_o);
        check("out_last", int'(out_last_o), int'(got == TOTAL - 1));
        got++;
      end
      @(negedge clk);
    end
    out_ready_i = 0;
    while (busy_o) @(negedge clk);
    n_mode[dims]++;
    if (levels > 1) n_multilevel++;
    if (inverse) n_inverse++;
    if (levels > ((dims == 3) ? ilog2(imin(N, F)) : ilog2(N))) n_clamped++;
  endtask

  initial begin
    int img[], ref_v[], coef[], back[];
    cfg_i = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int dims = 0; dims <= 3; dims++)
      for (int levels = 1; levels <= 4; levels++) begin
        if (dims == 0 && levels > 1) continue;
        img = new[TOTAL];
        for (int i = 0; i < TOTAL; i++) img[i] = int'($urandom_range(255, 0));
        if (levels == 4) for (int i = 0; i < TOTAL; i++) img[i] = (i % N) * 30 + 7;  // smooth ramp
        // forward
        ref_v = new[TOTAL](img);
        xform(ref_v, N, F, dims, levels, 1'b0, 16384, 16384);
        run(dims, levels, 1'b0, img, coef);
        for (int i = 0; i < TOTAL; i++)
          check($sformatf("fwd dims=%0d lv=%0d i=%0d", dims, levels, i), coef[i], ref_v[i]);
        // inverse must return the image
        run(dims, levels, 1'b1, coef, back);
        for (int i = 0; i < TOTAL; i++)
          check($sformatf("inv dims=%0d lv=%0d i=%0d", dims, levels, i), back[i], img[i]);
      end
    // a ramp along the rows has zero high-pass inside after one 1D level
    img = new[TOTAL];
    for (int i = 0; i < TOTAL; i++) img[i] = (i % N) * 10;
    run(1, 1, 1'b0, img, coef);
    check("ramp low", coef[0], 0);
    check("ramp high", coef[N/2], 0);
    // every mechanism must have happened
    for (int m = 0; m <= 3; m++) check($sformatf("mode %0d used", m), int'(n_mode[m] > 0), 1);
    check("multi-level used", int'(n_multilevel > 0), 1);
    check("inverse used", int'(n_inverse > 0), 1);
    check("clamping used", int'(n_clamped > 0), 1);
    check("input gaps used", int'(n_in_gap > 0), 1);
    check("output stalls used", int'(n_out_stall > 0), 1);
    $display("runs per mode %0d %0d %0d %0d, multilevel %0d, inverse %0d, clamped %0d, gaps %0d, stalls %0d",
             n_mode[0], n_mode[1], n_mode[2], n_mode[3], n_multilevel, n_inverse, n_clamped,
             n_in_gap, n_out_stall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
