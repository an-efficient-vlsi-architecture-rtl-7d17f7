// dwt_ctrl: the controller of the lifting DWT engine. It sequences one run:
// load a volume, transform it, unload it.
//
// LOAD   accepts N*N*F samples on a valid/ready stream and writes them to the
//        line buffer in raster order (column fastest, then row, then frame).
// lines  For every resolution level and every transformed axis it walks over
//        the lines of the active region. Each line takes 2*len+3 cycles:
//        len reads from the line buffer into the PIPO (RD), one cycle for the
//        last read word to land (RD_WAIT), one cycle in which the PIPO takes the
//        lifting block's result (CALC), len writes back (WR) and one cycle to
//        step to the next line (NEXT). len is the size of the active region
//        along the axis being transformed.
// UNLOAD reads the volume back in raster order and offers each word on a
//        valid/ready stream (two cycles per word), flagging the last one.
//
// The axes are rows (axis 0), columns (axis 1) and frames (axis 2); cfg.dims
// says how many of them are transformed. At level l the active region along a
// transformed axis is its size shifted right by l (the low-pass corner of the
// previous level), along an axis that is not transformed it is the full size.
// The forward run goes from level 0 upwards, rows before columns before frames;
// the inverse run goes through the same passes in the opposite order. cfg.levels
// is clamped to log2 of the smallest transformed size; dims = 0 or levels = 0
// passes the volume through unchanged.
//
// The 1D, 2D and 3D multi-level operation and the inverse by reversed steps
// follow the design description; the line-by-line schedule, the streams and
// the clamping are this implementation's choices.
module dwt_ctrl
  import dwt_pkg::*;
#(
  parameter int unsigned N = DWT_N,
  parameter int unsigned F = DWT_F,
  localparam int unsigned LMAX  = (N > F) ? N : F,
  localparam int unsigned LW    = $clog2(LMAX),
  localparam int unsigned TOTAL = N * N * F,
  localparam int unsigned AW    = $clog2(TOTAL)
) (
  input  logic              clk,
  input  logic              rst_n,
  // run control
  input  logic              start_i,
  input  dwt_cfg_t          cfg_i,
  output logic              busy_o,
  output logic              done_o,
  // sample streams (data paths are in the top level)
  input  logic              in_valid_i,
  output logic              in_ready_o,
  output logic              out_valid_o,
  input  logic              out_ready_i,
  output logic              out_last_o,
  // line buffer
  output logic              mem_en_o,
  output logic              mem_we_o,
  output logic [AW-1:0]     mem_addr_o,
  output logic              mem_wsel_line_o,  // write data: 1 PIPO word, 0 input stream
  output logic [LW-1:0]     line_idx_o,       // PIPO word written back
  // PIPO
  output logic              pipo_wr_o,
  output logic [LW-1:0]     pipo_idx_o,
  output logic              pipo_load_o,
  // lifting block
  output logic [LW:0]       lift_len_o,
  output logic              lift_inv_o
);

  typedef enum logic [3:0] {
    S_IDLE, S_LOAD, S_RD, S_RD_WAIT, S_CALC, S_WR, S_NEXT, S_U_RD, S_U_OUT, S_DONE
  } state_e;

  state_e           state;
  logic             inv_q;
  logic [1:0]       dims_q;
  logic [2:0]       levels_q;
  logic [2:0]       lvl;
  logic [1:0]       dim;
  logic [LW:0]      k, p, q;       // position along the line; line selectors
  logic [AW:0]      vol;           // raster position for load and unload
  logic             rd_v_q;
  logic [LW-1:0]    rd_idx_q;

  // size of an axis at the current level
  function automatic logic [LW:0] ext(input logic [1:0] axis);
    logic [LW:0] full;
    full = (axis == 2'd2) ? (LW+1)'(F) : (LW+1)'(N);
    return (axis < dims_q) ? (full >> lvl) : full;
  endfunction

  // the two axes that select a line along `dim`
  logic [1:0]  pa, qa;
  logic [LW:0] len, p_ext, q_ext;
  logic [LW:0] coord [3];
  logic [AW-1:0] line_addr;

  always_comb begin
    unique case (dim)
      2'd0:    begin pa = 2'd1; qa = 2'd2; end
      2'd1:    begin pa = 2'd0; qa = 2'd2; end
      default: begin pa = 2'd0; qa = 2'd1; end
    endcase
    len   = ext(dim);
    p_ext = ext(pa);
    q_ext = ext(qa);
    for (int a = 0; a < 3; a++) begin
      if (a == int'(dim))     coord[a] = k;
      else if (a == int'(pa)) coord[a] = p;
      else                    coord[a] = q;
    end
    line_addr = AW'(coord[2] * (N * N) + coord[1] * N + coord[0]);
  end

  // largest level count the sizes allow
  localparam int unsigned LOG_N   = $clog2(N);
  localparam int unsigned LOG_MIN = $clog2((F < N) ? F : N);
  function automatic logic [2:0] max_levels(input logic [1:0] dims);
    return (dims == 2'd3) ? 3'(LOG_MIN) : 3'(LOG_N);
  endfunction

  logic [2:0] eff_levels;
  always_comb begin
    eff_levels = (cfg_i.levels > max_levels(cfg_i.dims)) ? max_levels(cfg_i.dims)
                                                         : cfg_i.levels;
  end

  wire load_last = (vol == (AW+1)'(TOTAL - 1));
  wire line_last = (k == len - 1'b1);
  wire no_xform  = (dims_q == 2'd0) || (levels_q == 3'd0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      inv_q    <= 1'b0;
      dims_q   <= '0;
      levels_q <= '0;
      lvl      <= '0;
      dim      <= '0;
      k        <= '0;
      p        <= '0;
      q        <= '0;
      vol      <= '0;
      rd_v_q   <= 1'b0;
      rd_idx_q <= '0;
    end else begin
      rd_v_q   <= (state == S_RD);
      rd_idx_q <= LW'(k);
      unique case (state)
        S_IDLE: if (start_i) begin
          inv_q    <= cfg_i.inverse;
          dims_q   <= cfg_i.dims;
          levels_q <= eff_levels;
          vol      <= '0;
          state    <= S_LOAD;
        end
        S_LOAD: if (in_valid_i) begin
          if (load_last) begin
            vol <= '0;
            k   <= '0;
            p   <= '0;
            q   <= '0;
            if (no_xform) begin
              state <= S_U_RD;
            end else begin
              lvl   <= inv_q ? levels_q - 1'b1 : 3'd0;
              dim   <= inv_q ? dims_q - 1'b1   : 2'd0;
              state <= S_RD;
            end
          end else begin
            vol <= vol + 1'b1;
          end
        end
        S_RD: begin
          if (line_last) begin
            k     <= '0;
            state <= S_RD_WAIT;
          end else begin
            k <= k + 1'b1;
          end
        end
        S_RD_WAIT: state <= S_CALC;
        S_CALC:    state <= S_WR;
        S_WR: begin
          if (line_last) begin
            k     <= '0;
            state <= S_NEXT;
          end else begin
            k <= k + 1'b1;
          end
        end
        S_NEXT: begin
          state <= S_RD;
          if (p + 1'b1 < p_ext) begin
            p <= p + 1'b1;
          end else begin
            p <= '0;
            if (q + 1'b1 < q_ext) begin
              q <= q + 1'b1;
            end else begin
              q <= '0;
              // this pass is finished: step to the next axis / level
              if (!inv_q) begin
                if ({1'b0, dim} + 3'd1 < {1'b0, dims_q}) begin
                  dim <= dim + 1'b1;
                end else begin
                  dim <= '0;
                  if (lvl + 1'b1 < levels_q) lvl <= lvl + 1'b1;
                  else                       state <= S_U_RD;
                end
              end else begin
                if (dim != 2'd0) begin
                  dim <= dim - 1'b1;
                end else begin
                  dim <= dims_q - 1'b1;
                  if (lvl != 3'd0) lvl <= lvl - 1'b1;
                  else             state <= S_U_RD;
                end
              end
            end
          end
        end
        S_U_RD: state <= S_U_OUT;
        S_U_OUT: if (out_ready_i) begin
          if (load_last) begin
            state <= S_DONE;
          end else begin
            vol   <= vol + 1'b1;
            state <= S_U_RD;
          end
        end
        S_DONE:  state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  always_comb begin
    busy_o          = (state != S_IDLE);
    done_o          = (state == S_DONE);
    in_ready_o      = (state == S_LOAD);
    out_valid_o     = (state == S_U_OUT);
    out_last_o      = (state == S_U_OUT) && load_last;
    mem_en_o        = 1'b0;
    mem_we_o        = 1'b0;
    mem_addr_o      = AW'(vol);
    mem_wsel_line_o = 1'b0;
    line_idx_o      = LW'(k);
    unique case (state)
      S_LOAD: begin
        mem_en_o = in_valid_i;
        mem_we_o = 1'b1;
      end
      S_RD: begin
        mem_en_o   = 1'b1;
        mem_addr_o = line_addr;
      end
      S_WR: begin
        mem_en_o        = 1'b1;
        mem_we_o        = 1'b1;
        mem_addr_o      = line_addr;
        mem_wsel_line_o = 1'b1;
      end
      S_U_RD: mem_en_o = 1'b1;
      default: ;
    endcase
    pipo_wr_o   = rd_v_q;
    pipo_idx_o  = rd_idx_q;
    pipo_load_o = (state == S_CALC);
    lift_len_o  = len;
    lift_inv_o  = inv_q;
  end

  // Stream rules: an offered output word stays offered until it is taken.
  a_out_hold: assert property (@(posedge clk) disable iff (!rst_n)
                               out_valid_o && !out_ready_i |=> out_valid_o);
  // A line is never shorter than two samples.
  a_len: assert property (@(posedge clk) disable iff (!rst_n)
                          (state == S_RD) |-> (len >= 2));

endmodule
