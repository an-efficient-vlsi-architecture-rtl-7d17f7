// tb_conv_dwt1d: checks the convolution 1D DWT unit. The reference filters
// with Daubechies D4 coefficients computed here from their closed form and
// rounded to single precision, and rounds after every multiply and add in the
// order the MAC uses them (tap 0 first), so the unit's outputs must match bit
// for bit. Lines of length 8, 4 and 2 are run for one to three levels (and with
// out-of-range level counts, which are clamped), with 8-bit pixel values and
// with random reals; the run time must be one cycle for the start plus 4L+3 cycles
// per level.
module tb_conv_dwt1d;
  import fp_ref_pkg::*;

  localparam int N = 8;

  logic clk = 0, rst_n = 0;
  logic start = 0;
  logic [3:0] len = '0;
  logic [2:0] levels = '0;
  logic signed [31:0] x [N];
  logic busy, done;
  logic signed [31:0] y [N];
  int checks = 0, failures = 0;
  real h[4], g[4];

  conv_dwt1d #(.N(N)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  // one level of the D4 analysis on v[0..l-1], rounded as the MAC rounds
  function automatic void ref_level(ref real v[], input int l);
    real o[];
    o = new[l];
    for (int j = 0; j < l; j++) begin
      int n;
      real acc;
      bit hi;
      hi = (j >= l / 2);
      n  = hi ? j - l / 2 : j;
      for (int k = 0; k < 4; k++) begin
        real p;
        p = to_s(v[(2 * n + k) % l] * (hi ? g[k] : h[k]));
        acc = (k == 0) ? p : to_s(acc + p);
      end
      o[j] = acc;
    end
    for (int j = 0; j < l; j++) v[j] = o[j];
  endfunction

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real v[];
    automatic int lens[3] = '{8, 4, 2};
    automatic real s3 = $sqrt(3.0);
    automatic real d = 4.0 * $sqrt(2.0);
    h[0] = to_s((1.0 + s3) / d); h[1] = to_s((3.0 + s3) / d);
    h[2] = to_s((3.0 - s3) / d); h[3] = to_s((1.0 - s3) / d);
    g[0] = h[3]; g[1] = -h[2]; g[2] = h[1]; g[3] = -h[0];
    for (int i = 0; i < N; i++) x[i] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 300; t++) begin
      int l, lv, eff, cyc, exp_cyc;
      l  = lens[t % 3];
      lv = (t / 3) % 5;                 // 0..4: 0 and too many are clamped
      eff = (lv == 0) ? 1 : lv;
      if (eff > $clog2(l)) eff = $clog2(l);
      v = new[N];
      for (int i = 0; i < N; i++) begin
        v[i] = (t % 2 == 0) ? real'($urandom_range(255, 0))
                            : to_s(real'($signed($urandom)) / 1048576.0);
        x[i] = r2b(v[i]);
      end
      exp_cyc = 0;
      for (int e = 0, ll = l; e < eff; e++, ll = ll / 2) begin
        ref_level(v, ll);
        exp_cyc += 4 * ll + 3;
      end
      @(negedge clk);
      start = 1; len = 4'(l); levels = 3'(lv);
      @(negedge clk);
      start = 0;
      for (int i = 0; i < N; i++) x[i] = 32'(i);  // inputs must have been taken at start
      cyc = 1;
      while (!done) begin
        @(negedge clk);
        cyc++;
      end
      check($sformatf("cycles l=%0d lv=%0d", l, lv), cyc, exp_cyc + 1);  // + the start cycle
      for (int i = 0; i < N; i++) check($sformatf("t=%0d y[%0d]", t, i), int'(y[i]), int'(r2b(v[i])));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
