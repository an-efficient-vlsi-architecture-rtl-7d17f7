// tb_conv_ctrl: checks the convolution engine's controller on its own. A
// stand-in for the 1D unit answers each start with done after a random delay.
// For 1D and 2D runs at several level counts the test compares every tile
// buffer access of the transform with a schedule built here (per level, the
// rows and then the columns of the active corner; len reads then len writes
// per line, columns at a stride of N), checks the length and level count
// handed to the 1D unit per line, that the PIPO takes the unit's result only
// after done, the load and unload order, out_last and done.
module tb_conv_ctrl;
  import dwt_pkg::*;

  localparam int N = 8;
  localparam int TOTAL = N * N;

  logic clk = 0, rst_n = 0;
  logic start_i = 0;
  dwt_cfg_t cfg_i;
  logic busy_o, done_o, in_valid_i = 0, in_ready_o, out_valid_o, out_ready_i = 0, out_last_o;
  logic mem_en_o, mem_we_o, mem_wsel_line_o, pipo_wr_o, pipo_load_o, u_start_o, u_done_i = 0;
  logic [5:0] mem_addr_o;
  logic [2:0] line_idx_o, pipo_idx_o, u_levels_o;
  logic [3:0] u_len_o;

  conv_ctrl #(.N(N)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int exp_acc[$], exp_line[$];
  int load_n, unload_n, last_rd_addr, pending;
  bit unit_done_seen;

  task automatic check(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  task automatic build(input int dims, input int levels);
    int lv_max, len;
    exp_acc.delete();
    exp_line.delete();
    lv_max = $clog2(N);
    if (levels < 1) levels = 1;
    if (levels > lv_max) levels = lv_max;
    for (int lv = 0; lv < ((dims == 1) ? 1 : levels); lv++) begin
      len = (dims == 1) ? N : (N >> lv);
      for (int d = 0; d < ((dims == 1) ? 1 : 2); d++)
        for (int p = 0; p < len; p++) begin
          for (int rw = 0; rw < 2; rw++)
            for (int k = 0; k < len; k++)
              exp_acc.push_back((rw << 16) | ((d == 0) ? p * N + k : k * N + p));
          exp_line.push_back((len << 8) | ((dims == 1) ? levels : 1));
        end
    end
  endtask

  // stand-in for the 1D unit: done 3..20 cycles after start
  always @(posedge clk) begin
    u_done_i <= 1'b0;
    if (u_start_o) pending <= $urandom_range(20, 3);
    else if (pending > 0) begin
      pending <= pending - 1;
      if (pending == 1) u_done_i <= 1'b1;
    end
  end

  always @(posedge clk) begin
    if (rst_n) begin
      if (in_valid_i && in_ready_o) begin
        check("load addr", int'(mem_addr_o), load_n);
        check("load write", int'(mem_en_o && mem_we_o && !mem_wsel_line_o), 1);
        load_n++;
      end
      if (pipo_wr_o) begin
        if (exp_acc.size() == 0) check("extra read", 1, 0);
        else check("read", last_rd_addr, exp_acc.pop_front());
      end
      if (mem_en_o && mem_we_o && mem_wsel_line_o) begin
        if (exp_acc.size() == 0) check("extra write", 1, 0);
        else check("write", (1 << 16) | int'(mem_addr_o), exp_acc.pop_front());
      end
      if (mem_en_o && !mem_we_o) last_rd_addr = int'(mem_addr_o);
      if (u_start_o) begin
        unit_done_seen = 0;
        if (exp_line.size() == 0) check("extra line", 1, 0);
        else check("line len/levels", (int'(u_len_o) << 8) | int'(u_levels_o), exp_line.pop_front());
      end
      if (u_done_i) unit_done_seen = 1;
      if (pipo_load_o) check("result taken after done", int'(unit_done_seen), 1);
      if (out_valid_o && out_ready_i) begin
        check("unload addr", int'(mem_addr_o), unload_n);
        check("out_last", int'(out_last_o), int'(unload_n == TOTAL - 1));
        unload_n++;
      end
    end
  end

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input int dims, input int levels);
    build(dims, levels);
    cfg_i.dims = dwt_dims_e'(dims);
    cfg_i.levels = 3'(levels);
    cfg_i.inverse = 1'b0;
    load_n = 0; unload_n = 0;
    @(negedge clk);
    start_i = 1;
    @(negedge clk);
    start_i = 0;
    while (load_n < TOTAL) begin
      in_valid_i = $urandom_range(3, 0) != 0;
      @(negedge clk);
    end
    in_valid_i = 0;
    while (!done_o) begin
      out_ready_i = $urandom_range(2, 0) != 0;
      @(negedge clk);
    end
    out_ready_i = 0;
    check("unload count", unload_n, TOTAL);
    check("schedule used up", exp_acc.size(), 0);
    check("lines used up", exp_line.size(), 0);
    @(negedge clk);
    check("idle", int'(busy_o), 0);
  endtask

  initial begin
    cfg_i = '0;
    pending = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    run(2, 2);
    run(2, 3);
    run(1, 3);
    run(1, 1);
    run(2, 0);   // clamped up to 1
    run(2, 6);   // clamped down to 3
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
