// conv_ctrl: controller of the convolution-based floating-point DWT engine.
// It sequences one run: load an N x N tile, transform it, unload it.
//
// LOAD   accepts N*N samples on a valid/ready stream and writes them to the
//        tile buffer in raster order (column fastest).
// lines  Each line is read from the tile buffer into the PIPO (len cycles plus
//        one for the last word to land), handed to the 1D unit (one start
//        cycle, then the unit's run), taken back into the PIPO (one cycle),
//        written back in place (len cycles) and followed by one cycle to step
//        to the next line.
//        1D mode (cfg.dims = 1): every row once, with the 1D unit running all
//        levels itself from its select-line table.
//        2D mode (cfg.dims = 2): per level, the rows and then the columns of
//        the active low-pass corner (size N >> level), one level per line;
//        reading the columns with a stride of N is the transposition of the
//        row results.
// UNLOAD reads the tile back in raster order, two cycles per word, flagging
//        the last word.
// cfg.levels is clamped to 1..log2(N); cfg.dims = 0 or 3 is taken as 2D.
//
// Row-then-column processing with the transposed buffer and the multi-level 2D
// decomposition follow the design description; the schedule, the streams and
// the clamping are this implementation's choices.
module conv_ctrl
  import dwt_pkg::*;
#(
  parameter int unsigned N = conv_pkg::CONV_N,
  localparam int unsigned LW    = $clog2(N),
  localparam int unsigned TOTAL = N * N,
  localparam int unsigned AW    = $clog2(TOTAL)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start_i,
  input  dwt_cfg_t          cfg_i,
  output logic              busy_o,
  output logic              done_o,
  input  logic              in_valid_i,
  output logic              in_ready_o,
  output logic              out_valid_o,
  input  logic              out_ready_i,
  output logic              out_last_o,
  // tile buffer
  output logic              mem_en_o,
  output logic              mem_we_o,
  output logic [AW-1:0]     mem_addr_o,
  output logic              mem_wsel_line_o,
  output logic [LW-1:0]     line_idx_o,
  // PIPO
  output logic              pipo_wr_o,
  output logic [LW-1:0]     pipo_idx_o,
  output logic              pipo_load_o,
  // 1D unit
  output logic              u_start_o,
  output logic [LW:0]       u_len_o,
  output logic [2:0]        u_levels_o,
  input  logic              u_done_i
);

  typedef enum logic [3:0] {
    S_IDLE, S_LOAD, S_RD, S_RD_WAIT, S_GO, S_RUN, S_TAKE, S_WR, S_NEXT, S_U_RD, S_U_OUT, S_DONE
  } state_e;

  localparam logic [2:0] MAXL = 3'(LW);

  state_e        state;
  logic          is1d;
  logic [2:0]    levels_q, lvl;
  logic          dim;             // 0 rows, 1 columns
  logic [LW:0]   k, p;
  logic [AW:0]   vol;
  logic          rd_v_q;
  logic [LW-1:0] rd_idx_q;
  logic [LW:0]   len;
  logic [AW-1:0] line_addr;

  always_comb begin
    len       = is1d ? (LW+1)'(N) : ((LW+1)'(N) >> lvl);
    line_addr = dim ? AW'(k * N + p) : AW'(p * N + k);
  end

  wire vol_last  = (vol == (AW+1)'(TOTAL - 1));
  wire line_last = (k == len - 1'b1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      is1d     <= 1'b0;
      levels_q <= '0;
      lvl      <= '0;
      dim      <= 1'b0;
      k        <= '0;
      p        <= '0;
      vol      <= '0;
      rd_v_q   <= 1'b0;
      rd_idx_q <= '0;
    end else begin
      rd_v_q   <= (state == S_RD);
      rd_idx_q <= LW'(k);
      unique case (state)
        S_IDLE: if (start_i) begin
          is1d     <= (cfg_i.dims == DIMS_1D);
          levels_q <= (cfg_i.levels == 3'd0) ? 3'd1 :
                      (cfg_i.levels > MAXL)  ? MAXL : cfg_i.levels;
          vol      <= '0;
          state    <= S_LOAD;
        end
        S_LOAD: if (in_valid_i) begin
          if (vol_last) begin
            vol   <= '0;
            lvl   <= '0;
            dim   <= 1'b0;
            k     <= '0;
            p     <= '0;
            state <= S_RD;
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
        S_RD_WAIT: state <= S_GO;
        S_GO:      state <= S_RUN;
        S_RUN:     if (u_done_i) state <= S_TAKE;
        S_TAKE:    state <= S_WR;
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
          if (p + 1'b1 < len) begin
            p <= p + 1'b1;
          end else begin
            p <= '0;
            if (is1d) begin
              state <= S_U_RD;
            end else if (!dim) begin
              dim <= 1'b1;
            end else begin
              dim <= 1'b0;
              if (lvl + 1'b1 < levels_q) lvl <= lvl + 1'b1;
              else                       state <= S_U_RD;
            end
          end
        end
        S_U_RD: state <= S_U_OUT;
        S_U_OUT: if (out_ready_i) begin
          if (vol_last) begin
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
    out_last_o      = (state == S_U_OUT) && vol_last;
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
    pipo_load_o = (state == S_TAKE);
    u_start_o   = (state == S_GO);
    u_len_o     = len;
    u_levels_o  = is1d ? levels_q : 3'd1;
  end

  a_out_hold: assert property (@(posedge clk) disable iff (!rst_n)
                               out_valid_o && !out_ready_i |=> out_valid_o);

endmodule
