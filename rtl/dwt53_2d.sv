// dwt53_2d: 2-D integer 5/3 lifting DWT (JPEG2000 lossless filter), one to
// MAX_LEVELS levels.
//
// The object tile (width x height 8-bit pixels, at most MAX_W x MAX_H) is
// loaded into an internal buffer, then transformed in place: every row, then
// every column, gets the two lifting steps of the 5/3 filter
//   predict  d[2n+1] = x[2n+1] - floor((x[2n] + x[2n+2]) / 2)
//   update   s[2n]   = x[2n]   + floor((d[2n-1] + d[2n+1] + 2) / 4)
// with symmetric extension at the ends (x[-1] = x[1], x[len] = x[len-2]).
// After the row pass the even columns hold the low band and the odd columns
// the high band; the column pass then splits each into LL/LH and HL/HH.
// Level l+1 repeats this on the LL samples of level l, which sit in the
// buffer at stride 2^l, with sizes ceil(size/2) per level; a level is only
// run while both sizes are at least 2. One lifting step is done per cycle,
// so a transform takes the sum over levels of 2*w_l*h_l cycles (2*W*H for
// one level). Coefficients stay interleaved in the buffer; the read port
// takes a position in the usual multi-level sub-band layout (the coarsest
// LL top-left, each level's HL right of, LH below and HH diagonal to the
// next coarser region, low bands ceil(len/2) long) and returns that
// coefficient. levels 0 is taken as 1.
// The filter, lifting and level counts (1 to 3) are those named by the
// original design; the buffer, the one-step-per-cycle engine and the tile
// size are this design's (the original engine is a parallel pipelined one
// not given here). width and height must be at least 2.
module dwt53_2d #(
  parameter int unsigned MAX_W = 160,
  parameter int unsigned MAX_H = 100,
  parameter int unsigned CW    = 12,
  parameter int unsigned MAX_LEVELS = 3
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // load port: one pixel per cycle
  input  logic                 load_valid,
  input  logic [7:0]           load_row,
  input  logic [7:0]           load_col,
  input  logic [7:0]           load_data,
  // control
  input  logic                 start,
  input  logic [7:0]           width,
  input  logic [7:0]           height,
  input  logic [1:0]           levels,
  output logic                 busy,
  output logic                 done,
  // coefficient read, sub-band layout
  input  logic [7:0]           rd_row,
  input  logic [7:0]           rd_col,
  output logic signed [CW-1:0] rd_data
);
  localparam int unsigned DEPTH = MAX_W * MAX_H;
  localparam int unsigned AW    = $clog2(DEPTH);

  logic signed [CW-1:0] buf_q [DEPTH];

  typedef enum logic [2:0] {S_IDLE, S_ROW_P, S_ROW_U, S_COL_P, S_COL_U} state_e;
  state_e     state;
  logic [7:0] w_q, h_q;
  logic [7:0] line, pos;
  logic [1:0] lvl, lv_q, lv_done;   // current level (0-based), requested, completed
  logic [7:0] wl, hl;               // sizes at the current level

  logic       is_row, is_pred;
  logic [7:0] len, nlines;
  logic [7:0] pos_l, pos_r;

  function automatic logic [AW-1:0] idx(logic [7:0] r, logic [7:0] c);
    return AW'(r * MAX_W + c);
  endfunction

  always_comb begin
    wl = w_q;
    hl = h_q;
    for (int i = 0; i < 3; i++)
      if (i < int'(lvl)) begin
        wl = (wl + 8'd1) >> 1;
        hl = (hl + 8'd1) >> 1;
      end
  end

  always_comb begin
    is_row  = (state == S_ROW_P) || (state == S_ROW_U);
    is_pred = (state == S_ROW_P) || (state == S_COL_P);
    len     = is_row ? wl : hl;
    nlines  = is_row ? hl : wl;
    pos_l   = (pos == 8'd0) ? 8'd1 : pos - 8'd1;
    pos_r   = (pos + 8'd1 >= len) ? pos - 8'd1 : pos + 8'd1;
  end

  logic [AW-1:0]        a_c, a_l, a_r;
  logic signed [CW-1:0] x_c, x_l, x_r, x_new;
  logic signed [CW:0]   sum;
  always_comb begin
    a_c = is_row ? idx(line << lvl, pos << lvl)   : idx(pos << lvl, line << lvl);
    a_l = is_row ? idx(line << lvl, pos_l << lvl) : idx(pos_l << lvl, line << lvl);
    a_r = is_row ? idx(line << lvl, pos_r << lvl) : idx(pos_r << lvl, line << lvl);
    x_c = buf_q[a_c];
    x_l = buf_q[a_l];
    x_r = buf_q[a_r];
    if (is_pred) begin
      sum   = (CW+1)'(x_l) + (CW+1)'(x_r);
      x_new = x_c - CW'(sum >>> 1);
    end else begin
      sum   = (CW+1)'(x_l) + (CW+1)'(x_r) + (CW+1)'(2);
      x_new = x_c + CW'(sum >>> 2);
    end
  end

  // Next position within a line: predict visits odd, update even positions.
  logic last_in_line;
  assign last_in_line = (pos + 8'd2 >= len);

  always_ff @(posedge clk) begin
    if (state == S_IDLE && load_valid)
      buf_q[idx(load_row, load_col)] <= CW'({1'b0, load_data});
    else if (state != S_IDLE)
      buf_q[a_c] <= x_new;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      w_q   <= 8'd2;
      h_q   <= 8'd2;
      line  <= '0;
      pos   <= '0;
      done  <= 1'b0;
      lvl     <= '0;
      lv_q    <= 2'd1;
      lv_done <= 2'd1;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          w_q   <= width;
          h_q   <= height;
          lvl   <= '0;
          // the clip only acts when MAX_LEVELS is below 3, the most the
          // 2-bit field can ask for; at 3 the comparison is constant
          lv_q  <= (levels == 2'd0) ? 2'd1 :
                   (int'(levels) > MAX_LEVELS) ? 2'(MAX_LEVELS) : levels;
          line  <= '0;
          pos   <= 8'd1;
          state <= S_ROW_P;
        end
        S_ROW_P, S_COL_P: begin
          if (last_in_line) begin
            pos   <= 8'd0;
            state <= (state == S_ROW_P) ? S_ROW_U : S_COL_U;
          end else begin
            pos <= pos + 8'd2;
          end
        end
        S_ROW_U, S_COL_U: begin
          if (last_in_line) begin
            pos <= 8'd1;
            if (line + 8'd1 >= nlines) begin
              line <= '0;
              if (state == S_ROW_U) begin
                state <= S_COL_P;
              end else if (lvl + 2'd1 < lv_q && wl >= 8'd3 && hl >= 8'd3) begin
                lvl   <= lvl + 2'd1;     // next level on the LL band
                state <= S_ROW_P;
              end else begin
                lv_done <= lvl + 2'd1;
                state   <= S_IDLE;
                done    <= 1'b1;
              end
            end else begin
              line  <= line + 8'd1;
              state <= (state == S_ROW_U) ? S_ROW_P : S_COL_P;
            end
          end else begin
            pos <= pos + 8'd2;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy = (state != S_IDLE);

  // Sub-band position -> interleaved buffer position. For each coordinate
  // find the finest level whose high band holds it (or "low" past the last
  // level); the region's level is the finer of the two. At that level the
  // high coordinate sits at odd multiples of 2^(l-1), the low one at
  // multiples of 2^l.
  logic [7:0] br, bc;
  always_comb begin
    logic [7:0] sw [4];
    logic [7:0] sh [4];
    int lr, lc, l;
    sw[0] = w_q;
    sh[0] = h_q;
    for (int i = 1; i < 4; i++) begin
      sw[i] = (sw[i-1] + 8'd1) >> 1;
      sh[i] = (sh[i-1] + 8'd1) >> 1;
    end
    lc = int'(lv_done) + 1;
    lr = int'(lv_done) + 1;
    for (int i = 3; i >= 1; i--)
      if (i <= int'(lv_done)) begin
        if (rd_col >= sw[i]) lc = i;
        if (rd_row >= sh[i]) lr = i;
      end
    l = (lc < lr) ? lc : lr;
    if (l > int'(lv_done)) begin
      bc = rd_col << lv_done;
      br = rd_row << lv_done;
    end else begin
      bc = (lc == l) ? 8'((((rd_col - sw[l]) << 1) + 8'd1) << (l - 1)) : 8'(rd_col << l);
      br = (lr == l) ? 8'((((rd_row - sh[l]) << 1) + 8'd1) << (l - 1)) : 8'(rd_row << l);
    end
    rd_data = buf_q[idx(br, bc)];
  end

endmodule
