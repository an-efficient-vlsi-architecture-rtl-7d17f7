// tb_dwt_line_buffer: checks the line buffer RAM. The whole depth is written
// with random words, then read back in a random order interleaved with fresh
// writes; read data must appear one cycle after the read and hold while the
// RAM is idle.
module tb_dwt_line_buffer;
  localparam int DEPTH = 512;
  localparam int W = 16;

  logic clk = 0;
  logic en = 0, we = 0;
  logic [8:0] addr = '0;
  logic signed [W-1:0] wdata = '0, rdata;
  int model [DEPTH];
  int checks = 0, failures = 0;

  dwt_line_buffer #(.DEPTH(DEPTH), .W(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk);
      en = 1; we = 1; addr = 9'(a); wdata = W'($urandom);
      model[a] = int'(wdata);
    end
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      en = 1;
      we = $urandom_range(3, 0) == 0;
      addr = 9'($urandom_range(DEPTH - 1, 0));
      wdata = W'($urandom);
      if (we) begin
        model[addr] = int'(wdata);
      end else begin
        int exp_v;
        exp_v = model[addr];
        @(negedge clk);
        en = 0;
        checks++;
        if (int'(rdata) != exp_v) begin
          failures++;
          if (failures < 10) $display("FAIL read: got %0d expected %0d", rdata, exp_v);
        end
        @(negedge clk);  // idle: data must hold
        checks++;
        if (int'(rdata) != exp_v) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
