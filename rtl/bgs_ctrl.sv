// bgs_ctrl: per-pixel background update and Update-flag store.
//
// For each pixel (row, col, F) taken from the camera stream it
//   1. reads the RAM word at {row, col}; its upper byte is the background B,
//   2. runs bg_sub on (B, F) and writes back {B', F}, where B' is the updated
//      background Bn when Update is 1 and the old B otherwise,
//   3. collects the Update flag at bit col[3:0] of a 16-bit word and, after
//      the pixel with col[3:0] = 15, writes that word to {1111, row, col[9:4]}.
// So one RAM read and one RAM write serve each pixel, plus one write per
// sixteen pixels. With load_bg set the pixel is stored as both background
// and current image (B' = F) and its Update flag is 0; this is how a first
// background is captured, a choice of this design. The address maps, the
// conditional background write and the 16-flags-per-word packing follow the
// original memory organisation; the sequencing is this design's.
// A pixel costs 7 cycles of the RAM interface (11 on a word boundary): the
// next pixel is taken in the cycle that acknowledges the last write, so a
// steady stream is served at 7.25 cycles per pixel on average. COLS must be a multiple of 16.
module bgs_ctrl
  import wmsn_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        clear,      // zero upd_count
  input  logic        load_bg,
  input  logic [2:0]  asel,
  input  logic [7:0]  thr,
  // pixel stream
  input  logic        pix_valid,
  output logic        pix_ready,
  input  logic [7:0]  pix_data,
  input  logic [8:0]  pix_row,
  input  logic [9:0]  pix_col,
  // RAM ports
  output logic [18:0] rd_addr,
  output logic        rd_en,
  input  logic        rd_ack,
  input  logic [15:0] rd_data,
  output logic [18:0] wr_addr,
  output logic        wr_en,
  input  logic        wr_ack,
  output logic [15:0] wr_data,
  // status
  output logic        busy,
  output logic [18:0] upd_count    // Update flags set since the last clear
);
  typedef enum logic [1:0] {S_IDLE, S_RD, S_WR, S_WU} state_e;
  state_e     state;
  logic [7:0] f_q;
  logic [8:0] row_q;
  logic [9:0] col_q;
  logic [15:0] upd_word;
  logic [7:0] bn;
  logic       upd;
  logic       upd_eff;
  logic       take;
  logic [7:0] b_new;

  bg_sub u_bg_sub (
    .Bn_1   (rd_data[15:8]),
    .Fn     (f_q),
    .asel   (asel),
    .Thr    (thr),
    .Bn     (bn),
    .Update (upd)
  );

  always_comb begin
    upd_eff   = upd && !load_bg;
    b_new     = load_bg ? f_q : (upd ? bn : rd_data[15:8]);
    // a new pixel is taken when idle, or in the cycle that ends the previous
    // pixel's last write, so the RAM interface is never left waiting
    take      = (state == S_IDLE) ||
                (state == S_WR && wr_ack && col_q[3:0] != 4'hF) ||
                (state == S_WU && wr_ack);
    pix_ready = take;
    busy      = (state != S_IDLE);
    rd_en     = (state == S_RD);
    rd_addr   = pix_addr(row_q, col_q);
    wr_en     = (state == S_WR) || (state == S_WU);
    wr_addr   = (state == S_WU) ? upd_addr(row_q, col_q[9:4]) : pix_addr(row_q, col_q);
    wr_data   = (state == S_WU) ? upd_word : {b_new, f_q};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      f_q       <= '0;
      row_q     <= '0;
      col_q     <= '0;
      upd_word  <= '0;
      upd_count <= '0;
    end else begin
      unique case (state)
        S_IDLE: ;
        S_RD: if (rd_ack) state <= S_WR;
        S_WR: if (wr_ack) begin
          upd_word[col_q[3:0]] <= upd_eff;
          if (upd_eff) upd_count <= upd_count + 19'd1;
          state <= (col_q[3:0] == 4'hF) ? S_WU : S_IDLE;
        end
        S_WU: if (wr_ack) state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
      if (take) begin
        if (pix_valid) begin
          f_q   <= pix_data;
          row_q <= pix_row;
          col_q <= pix_col;
          state <= S_RD;
        end else begin
          state <= S_IDLE;
        end
      end
      if (clear) upd_count <= '0;
    end
  end
endmodule
