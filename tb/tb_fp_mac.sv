// tb_fp_mac: checks the floating-point MAC against real arithmetic. Random
// four-tap dot products of small integers and of random reals are fed in with
// init on the first tap; the accumulator, read two cycles after the last tap,
// must match a model that rounds to single precision after every multiply and
// every add exactly as IEEE 754 does (computed here in double precision and
// rounded to single after each operation). Zero operands and cancellation are included.
module tb_fp_mac;
  import fp_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  logic en = 0, init = 0;
  logic [31:0] a = '0, b = '0, acc;
  int checks = 0, failures = 0;

  fp_mac dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real x[4], c[4], model, p;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      for (int k = 0; k < 4; k++) begin
        if (t % 3 == 0) begin
          x[k] = real'($urandom_range(255, 0));
          c[k] = real'($signed($urandom_range(2000, 0)) - 1000) / 1024.0;
        end else begin
          x[k] = to_s(real'($signed($urandom)) / 65536.0);
          c[k] = to_s(real'($signed($urandom)) / 2147483648.0);
        end
        if (t % 11 == 0 && k == 2) x[k] = 0.0;
      end
      if (t % 13 == 0) begin  // exact cancellation
        x[1] = x[0]; c[1] = -c[0]; x[3] = x[2]; c[3] = -c[2];
      end
      model = to_s(x[0] * c[0]);
      for (int k = 1; k < 4; k++) begin
        p = to_s(x[k] * c[k]);
        model = to_s(model + p);
      end
      for (int k = 0; k < 4; k++) begin
        @(negedge clk);
        en = 1; init = (k == 0);
        a = r2b(x[k]);
        b = r2b(c[k]);
      end
      @(negedge clk);
      en = 0;
      @(negedge clk);
      checks++;
      if (acc != r2b(model) && !(model == 0.0 && acc[30:0] == 0)) begin
        failures++;
        if (failures < 10) $display("FAIL t=%0d got %h (%f) expected %h (%f)", t, acc,
                                    b2r(acc), r2b(model), model);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
