// tb_pipo_reg: checks the PIPO line register. Words written one at a time must
// land at their index and leave the others alone; a parallel load must replace
// the whole line and win over a word write in the same cycle; reset clears it.
// A model array tracks the expected contents every cycle.
module tb_pipo_reg;
  localparam int N = 8;
  localparam int W = 16;

  logic clk = 0, rst_n = 0;
  logic wr_en = 0, par_load = 0;
  logic [2:0] wr_idx = '0;
  logic signed [W-1:0] wr_data = '0;
  logic signed [W-1:0] par_in [N];
  logic signed [W-1:0] q [N];
  int model [N];
  int checks = 0, failures = 0;

  pipo_reg #(.N(N), .W(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int j = 0; j < N; j++) par_in[j] = '0;
    repeat (2) @(posedge clk);
    #1;
    for (int j = 0; j < N; j++) begin
      checks++;
      if (q[j] !== '0) failures++;
      model[j] = 0;
    end
    rst_n = 1;
    for (int t = 0; t < 1000; t++) begin
      @(negedge clk);
      wr_en    = $urandom_range(1, 0) == 1;
      par_load = $urandom_range(7, 0) == 0;
      wr_idx   = 3'($urandom_range(N - 1, 0));
      wr_data  = W'($urandom);
      for (int j = 0; j < N; j++) par_in[j] = W'($urandom);
      if (par_load)   for (int j = 0; j < N; j++) model[j] = int'(par_in[j]);
      else if (wr_en) model[wr_idx] = int'(wr_data);
      @(posedge clk);
      #1;
      for (int j = 0; j < N; j++) begin
        checks++;
        if (int'(q[j]) != model[j]) begin
          failures++;
          if (failures < 10) $display("FAIL t=%0d j=%0d got %0d expected %0d", t, j, q[j], model[j]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
