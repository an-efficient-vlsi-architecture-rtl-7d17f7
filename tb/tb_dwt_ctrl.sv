// tb_dwt_ctrl: checks the controller's schedule on its own. For a set of
// configurations (1D/2D/3D, 0 to 4 levels, forward and inverse) it runs a load,
// the transform passes and an unload with random stream stalls, and compares
// every line-buffer access of the transform passes with a schedule built here
// independently: for each pass, each line, len reads then len writes of the
// same addresses, with one PIPO parallel load per line at the right length and
// direction. It also checks the load and unload order, out_last, done, and the
// 2*len+3 cycles per line.
module tb_dwt_ctrl;
  import dwt_pkg::*;
  import dwt_ref_pkg::*;

  localparam int N = 8;
  localparam int F = 8;
  localparam int TOTAL = N * N * F;

  logic clk = 0, rst_n = 0;
  logic start_i = 0;
  dwt_cfg_t cfg_i;
  logic busy_o, done_o, in_valid_i = 0, in_ready_o, out_valid_o, out_ready_i = 0, out_last_o;
  logic mem_en_o, mem_we_o, mem_wsel_line_o, pipo_wr_o, pipo_load_o, lift_inv_o;
  logic [8:0] mem_addr_o;
  logic [2:0] line_idx_o, pipo_idx_o;
  logic [3:0] lift_len_o;

  dwt_ctrl #(.N(N), .F(F)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int exp_acc[$];   // {we, addr} of transform-pass accesses
  int exp_len[$];   // line length per PIPO load
  int unload_n, load_n, xf_cycles, xf_active;

  task automatic check(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  // expected accesses of the transform passes
  task automatic build_schedule(input int dims, input int levels, input bit inverse);
    int sz[3], ext[3], maxl;
    sz[0] = N; sz[1] = N; sz[2] = F;
    exp_acc.delete();
    exp_len.delete();
    if (dims == 0) return;
    maxl = (dims == 3) ? ilog2(imin(N, F)) : ilog2(N);
    if (levels > maxl) levels = maxl;
    for (int step = 0; step < levels * dims; step++) begin
      int lvl, ax, pa, qa;
      lvl = inverse ? levels - 1 - step / dims : step / dims;
      ax  = inverse ? dims - 1 - step % dims   : step % dims;
      for (int a = 0; a < 3; a++) ext[a] = (a < dims) ? (sz[a] >> lvl) : sz[a];
      pa = (ax == 0) ? 1 : 0;
      qa = (ax == 2) ? 1 : 2;
      for (int iq = 0; iq < ext[qa]; iq++)
        for (int ip = 0; ip < ext[pa]; ip++) begin
          int c[3];
          c[pa] = ip; c[qa] = iq;
          for (int rw = 0; rw < 2; rw++)
            for (int k = 0; k < ext[ax]; k++) begin
              c[ax] = k;
              exp_acc.push_back((rw << 16) | (c[2] * N * N + c[1] * N + c[0]));
            end
          exp_len.push_back(ext[ax]);
        end
    end
  endtask

  // monitor
  bit in_xform;
  int last_rd_addr;
  always @(posedge clk) begin
    if (rst_n) begin
      if (in_valid_i && in_ready_o) begin
        check("load addr", int'(mem_addr_o), load_n);
        check("load we", int'(mem_en_o && mem_we_o && !mem_wsel_line_o), 1);
        load_n++;
      end
      if (busy_o && !in_ready_o && !out_valid_o && xf_active != 0) xf_cycles++;
      // a transform read is the one whose word goes into the PIPO a cycle later
      if (pipo_wr_o) begin
        if (exp_acc.size() == 0) check("extra read", 1, 0);
        else check("read", last_rd_addr, exp_acc.pop_front());
      end
      if (mem_en_o && mem_we_o && mem_wsel_line_o) begin
        if (exp_acc.size() == 0) check("extra write", 1, 0);
        else check("write", (1 << 16) | int'(mem_addr_o), exp_acc.pop_front());
      end
      if (mem_en_o && !mem_we_o) last_rd_addr = int'(mem_addr_o);
      if (pipo_load_o) begin
        if (exp_len.size() == 0) check("extra line", 1, 0);
        else check("line len", int'(lift_len_o), exp_len.pop_front());
        check("line dir", int'(lift_inv_o), int'(cfg_i.inverse));
      end
      if (out_valid_o && out_ready_i) begin
        check("unload addr", int'(mem_addr_o), unload_n);
        check("out_last", int'(out_last_o), int'(unload_n == TOTAL - 1));
        unload_n++;
      end
    end
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input int dims, input int levels, input bit inverse);
    int exp_cyc;
    build_schedule(dims, levels, inverse);
    exp_cyc = xform_cycles(N, F, dims, levels);
    if (inverse) exp_cyc = xform_cycles(N, F, dims, levels);
    cfg_i.dims = dwt_dims_e'(dims);
    cfg_i.levels = 3'(levels);
    cfg_i.inverse = inverse;
    load_n = 0; unload_n = 0; xf_cycles = 0; xf_active = 0; in_xform = 0;
    @(negedge clk);
    start_i = 1;
    @(negedge clk);
    start_i = 0;
    while (load_n < TOTAL) begin
      in_valid_i = $urandom_range(3, 0) != 0;
      @(negedge clk);
    end
    in_valid_i = 0;
    xf_active = 1;
    in_xform = 1;
    while (!out_valid_o) @(negedge clk);
    xf_active = 0;
    in_xform = 0;
    // transform cycles plus the first unload read
    check($sformatf("cycles dims=%0d lv=%0d", dims, levels), xf_cycles, exp_cyc + 1);
    while (!done_o) begin
      out_ready_i = $urandom_range(2, 0) != 0;
      @(negedge clk);
    end
    out_ready_i = 0;
    check("unload count", unload_n, TOTAL);
    check("schedule used up", exp_acc.size(), 0);
    check("lines used up", exp_len.size(), 0);
    @(negedge clk);
    check("idle", int'(busy_o), 0);
  endtask

  initial begin
    cfg_i = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    run(2, 2, 0);
    run(2, 2, 1);
    run(3, 3, 0);
    run(3, 3, 1);
    run(1, 3, 0);
    run(1, 1, 1);
    run(3, 4, 0);  // clamped to 3 levels
    run(0, 2, 0);  // no transform
    run(2, 0, 0);  // no levels
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
