// tb_dwt_top: end-to-end test of the whole design at its default sizes, both
// engines running at the same time. The lifting engine transforms random 8-bit
// volumes in 1D (3 levels), 2D (2 levels) and 3D (3 levels) and transforms
// each result back with the inverse, checking every coefficient against the
// reference model and the round trip against the original. The convolution
// engine transforms random 8-bit tiles in 2D with 2 levels and in 1D with 3
// levels, checked bit for bit against its reference model. Transform times are
// checked against the cycle formulas of both engines. Counted, and required to
// occur: each lifting mode, inverse runs, each convolution mode, multi-level
// runs, input gaps, output stalls and both engines busy at once.
module tb_dwt_top;
  import dwt_pkg::*;
  import dwt_ref_pkg::*;
  import fp_ref_pkg::*;
  import conv_ref_pkg::*;

  localparam int N = DWT_N;
  localparam int F = DWT_F;
  localparam int LT = N * N * F;
  localparam int CN = conv_pkg::CONV_N;
  localparam int CT = CN * CN;

  logic clk = 0, rst_n = 0;
  logic lift_start_i = 0, conv_start_i = 0;
  dwt_cfg_t lift_cfg_i, conv_cfg_i;
  logic lift_busy_o, lift_done_o, conv_busy_o, conv_done_o;
  logic lift_in_valid_i = 0, lift_in_ready_o, conv_in_valid_i = 0, conv_in_ready_o;
  logic signed [DWT_W-1:0] lift_in_data_i = '0, lift_out_data_o;
  logic [31:0] conv_in_data_i = '0, conv_out_data_o;
  logic lift_out_valid_o, lift_out_ready_i = 0, lift_out_last_o;
  logic conv_out_valid_o, conv_out_ready_i = 0, conv_out_last_o;

  dwt_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_lmode[4], n_linv, n_cmode[3], n_multi, n_gap, n_stall, n_both;

  always @(posedge clk) if (lift_busy_o && conv_busy_o) n_both++;

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

  task automatic lift_run(input int dims, input int levels, input bit inverse,
                          input int din[], ref int dout[]);
    int sent, got, cyc;
    dout = new[LT];
    lift_cfg_i.dims = dwt_dims_e'(dims);
    lift_cfg_i.levels = 3'(levels);
    lift_cfg_i.inverse = inverse;
    @(negedge clk);
    lift_start_i = 1;
    @(negedge clk);
    lift_start_i = 0;
    sent = 0;
    while (sent < LT) begin
      lift_in_valid_i = $urandom_range(4, 0) != 0;
      if (!lift_in_valid_i && lift_in_ready_o) n_gap++;
      lift_in_data_i = DWT_W'(din[sent]);
      @(posedge clk);
      if (lift_in_valid_i && lift_in_ready_o) sent++;
      @(negedge clk);
    end
    lift_in_valid_i = 0;
    cyc = 0;
    while (!lift_out_valid_o) begin
      @(negedge clk);
      cyc++;
    end
    check("lift cycles", cyc, xform_cycles(N, F, dims, levels) + 1);
    got = 0;
    while (got < LT) begin
      lift_out_ready_i = $urandom_range(3, 0) != 0;
      if (!lift_out_ready_i && lift_out_valid_o) n_stall++;
      @(posedge clk);
      if (lift_out_valid_o && lift_out_ready_i) begin
        dout[got] = int'(lift_out_data_o);
        got++;
      end
      @(negedge clk);
    end
    lift_out_ready_i = 0;
    while (lift_busy_o) @(negedge clk);
    n_lmode[dims]++;
    if (inverse) n_linv++;
    if (levels > 1) n_multi++;
  endtask

  task automatic conv_run(input int dims, input int levels);
    real img[];
    int sent, got, cyc;
    img = new[CT];
    for (int i = 0; i < CT; i++) img[i] = real'($urandom_range(255, 0));
    conv_cfg_i.dims = dwt_dims_e'(dims);
    conv_cfg_i.levels = 3'(levels);
    conv_cfg_i.inverse = 1'b0;
    @(negedge clk);
    conv_start_i = 1;
    @(negedge clk);
    conv_start_i = 0;
    sent = 0;
    while (sent < CT) begin
      conv_in_valid_i = $urandom_range(4, 0) != 0;
      if (!conv_in_valid_i && conv_in_ready_o) n_gap++;
      conv_in_data_i = r2b(img[sent]);
      @(posedge clk);
      if (conv_in_valid_i && conv_in_ready_o) sent++;
      @(negedge clk);
    end
    conv_in_valid_i = 0;
    tile(img, CN, dims, levels);
    cyc = 0;
    while (!conv_out_valid_o) begin
      @(negedge clk);
      cyc++;
    end
    check("conv cycles", cyc, cycles(CN, dims, levels));
    got = 0;
    while (got < CT) begin
      conv_out_ready_i = $urandom_range(3, 0) != 0;
      if (!conv_out_ready_i && conv_out_valid_o) n_stall++;
      @(posedge clk);
      if (conv_out_valid_o && conv_out_ready_i) begin
        check($sformatf("conv dims=%0d i=%0d", dims, got), int'(conv_out_data_o), int'(r2b(img[got])));
        check("conv out_last", int'(conv_out_last_o), int'(got == CT - 1));
        got++;
      end
      @(negedge clk);
    end
    conv_out_ready_i = 0;
    while (conv_busy_o) @(negedge clk);
    n_cmode[dims]++;
    if (levels > 1) n_multi++;
  endtask

  initial begin
    lift_cfg_i = '0;
    conv_cfg_i = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    fork
      begin : lifting
        int img[], refv[], coef[], back[];
        static int cfgs[3][2] = '{'{3, 3}, '{2, 2}, '{1, 3}};
        for (int c = 0; c < 3; c++) begin
          img = new[LT];
          for (int i = 0; i < LT; i++) img[i] = int'($urandom_range(255, 0));
          refv = new[LT](img);
          xform(refv, N, F, cfgs[c][0], cfgs[c][1], 1'b0, 16384, 16384);
          lift_run(cfgs[c][0], cfgs[c][1], 1'b0, img, coef);
          for (int i = 0; i < LT; i++) check($sformatf("lift fwd c=%0d i=%0d", c, i), coef[i], refv[i]);
          lift_run(cfgs[c][0], cfgs[c][1], 1'b1, coef, back);
          for (int i = 0; i < LT; i++) check($sformatf("lift inv c=%0d i=%0d", c, i), back[i], img[i]);
        end
      end
      begin : convolution
        conv_run(2, 2);
        conv_run(1, 3);
        conv_run(2, 3);
      end
    join
    for (int m = 1; m <= 3; m++) check($sformatf("lifting mode %0d used", m), int'(n_lmode[m] > 0), 1);
    check("lifting inverse used", int'(n_linv > 0), 1);
    check("conv 1D used", int'(n_cmode[1] > 0), 1);
    check("conv 2D used", int'(n_cmode[2] > 0), 1);
    check("multi-level used", int'(n_multi > 0), 1);
    check("input gaps used", int'(n_gap > 0), 1);
    check("output stalls used", int'(n_stall > 0), 1);
    check("engines concurrent", int'(n_both > 0), 1);
    $display("lifting runs 1D %0d 2D %0d 3D %0d inverse %0d; conv runs 1D %0d 2D %0d; multi %0d gaps %0d stalls %0d both-busy cycles %0d",
             n_lmode[1], n_lmode[2], n_lmode[3], n_linv, n_cmode[1], n_cmode[2], n_multi, n_gap, n_stall, n_both);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
