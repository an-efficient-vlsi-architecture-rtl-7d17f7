// tb_conv_sel_lut: checks the select-line table by replaying it. A behavioural
// model of the MAC datapath (exact real arithmetic, one-cycle product register,
// accumulator, output bank and commit) is stepped through the table from each
// section start, and the line it produces must equal the D4 transform of the
// input computed directly from the filter sums. This checks the sample and
// coefficient selects, the init flags, the store timing against the pipeline,
// the commits and the section boundaries together. Section lengths must be
// 4L+3 and every address must be covered.
module tb_conv_sel_lut;
  import conv_pkg::*;

  localparam int N = 8;
  localparam int DEPTH = 8 * N + 3 * $clog2(N) - 8;

  logic [6:0] addr;
  conv_sel_t sel;
  int checks = 0, failures = 0;
  int pos;  // table address reached

  conv_sel_lut #(.N(N)) dut (.addr, .sel);

  task automatic check(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  function automatic real cf(input int i);  // h0..h3, g0..g3
    real s3, d, h[4];
    s3 = $sqrt(3.0);
    d  = 4.0 * $sqrt(2.0);
    h[0] = (1.0 + s3) / d; h[1] = (3.0 + s3) / d; h[2] = (3.0 - s3) / d; h[3] = (1.0 - s3) / d;
    case (i)
      0, 1, 2, 3: return h[i];
      4: return h[3];
      5: return -h[2];
      6: return h[1];
      default: return -h[0];
    endcase
  endfunction

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real r[N], t[N], expv[N], preg, acc;
    bit pv, pinit;
    int steps, n, hi;
    pos = 0;
    for (int l = N; l >= 2; l = l / 2) begin
      for (int i = 0; i < N; i++) begin
        r[i] = real'($urandom_range(1000, 0)) - 500.0;
        t[i] = r[i];
      end
      // direct D4 level with periodic extension
      for (int j = 0; j < l; j++) begin
        hi = (j >= l / 2) ? 1 : 0;
        n = (hi != 0) ? j - l / 2 : j;
        expv[j] = 0.0;
        for (int k = 0; k < 4; k++) expv[j] += r[(2 * n + k) % l] * cf(hi * 4 + k);
      end
      pv = 0; pinit = 0; preg = 0.0; acc = 0.0;
      steps = 0;
      do begin
        addr = 7'(pos);
        #1;
        // datapath model: stored value and commit use the registers as they are
        if (sel.wr) t[sel.widx] = acc;
        if (sel.commit) for (int i = 0; i < int'(sel.clen); i++) r[i] = t[i];
        if (pv) acc = pinit ? preg : acc + preg;
        pv = sel.mac_en;
        pinit = sel.init;
        if (sel.mac_en) preg = r[sel.s0] * cf(int'(sel.s1));
        pos++;
        steps++;
      end while (!sel.last && steps < 200);
      $display("section L=%0d: %0d words, next address %0d", l, steps, pos);
      check($sformatf("section %0d length", l), steps, 4 * l + 3);
      for (int j = 0; j < l; j++) begin
        checks++;
        if ((r[j] - expv[j]) > 1e-9 || (expv[j] - r[j]) > 1e-9) begin
          failures++;
          if (failures < 20) $display("FAIL L=%0d j=%0d got %f expected %f", l, j, r[j], expv[j]);
        end
      end
    end
    check("table depth", pos, DEPTH);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
