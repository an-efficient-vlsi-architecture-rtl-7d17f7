// tb_lift53_line: checks the lifting block against the reference model.
// Random lines of every active length (8, 4, 2) go through the forward and the
// inverse transform, with k = 1 and with k = sqrt(2); samples beyond the active
// length must pass through, and forward followed by inverse must give the line
// back when k = 1. The block is combinational, so results are sampled after a
// settling delay; a watchdog ends a run that hangs.
module tb_lift53_line;
  import dwt_ref_pkg::*;

  localparam int N = 8;
  localparam int W = 16;
  localparam logic [15:0] KS  = 16'd23170;  // sqrt(2) in Q2.14
  localparam logic [15:0] KSI = 16'd11585;  // 1/sqrt(2)

  logic               inverse;
  logic [3:0]         len;
  logic signed [W-1:0] x [N];
  logic signed [W-1:0] y1 [N];
  logic signed [W-1:0] y2 [N];
  logic signed [W-1:0] yr [N];
  logic signed [W-1:0] yrt [N];

  int checks = 0, failures = 0;

  lift53_line #(.N(N), .W(W)) dut1 (.inverse, .len, .x, .y(y1));
  lift53_line #(.N(N), .W(W), .K_Q(KS), .KINV_Q(KSI)) dut2 (.inverse, .len, .x, .y(y2));
  // round trip: a forward block feeding an inverse block
  lift53_line #(.N(N), .W(W)) dut_f (.inverse(1'b0), .len, .x, .y(yr));
  lift53_line #(.N(N), .W(W)) dut_i (.inverse(1'b1), .len, .x(yr), .y(yrt));

  task automatic check(input string what, input int got, input int exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ref1[], ref2[];
    static int lens[3] = '{8, 4, 2};
    ref1 = new[N];
    ref2 = new[N];
    for (int t = 0; t < 400; t++) begin
      int l, range;
      l = lens[t % 3];
      inverse = t[2];
      len = 4'(l);
      range = (t % 5 == 0) ? 8000 : 512;  // some lines of large amplitude, no overflow
      for (int j = 0; j < N; j++) begin
        x[j] = W'($signed($urandom_range(2 * range, 0)) - range);
        if (t % 7 == 0) x[j] = W'(j * 10);  // a ramp: high-pass must be zero inside
      end
      #1;
      for (int j = 0; j < N; j++) begin
        ref1[j] = int'(x[j]);
        ref2[j] = int'(x[j]);
      end
      begin
        if (!inverse) begin
          fwd_line(ref1, l, 16384, 16384);
          fwd_line(ref2, l, int'(KS), int'(KSI));
        end else begin
          inv_line(ref1, l, 16384, 16384);
          inv_line(ref2, l, int'(KS), int'(KSI));
        end
        for (int j = 0; j < N; j++) begin
          check($sformatf("k=1 t=%0d j=%0d", t, j), int'(y1[j]), ref1[j]);
          check($sformatf("k=sqrt2 t=%0d j=%0d", t, j), int'(y2[j]), ref2[j]);
        end
      end
      // reversible integer transform: exact round trip
      for (int j = 0; j < N; j++) check($sformatf("roundtrip t=%0d j=%0d", t, j), int'(yrt[j]), int'(x[j]));
    end
    // a ramp of step 10 over 8 samples: interior high-pass outputs are zero,
    // the mirrored end gives -10
    inverse = 1'b0;
    len = 4'd8;
    for (int j = 0; j < N; j++) x[j] = W'(j * 10);
    #1;
    check("ramp d0", int'(y1[4]), 0);
    check("ramp d2", int'(y1[6]), 0);
    check("ramp d3", int'(y1[7]), 10);
    check("ramp s0", int'(y1[0]), 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
