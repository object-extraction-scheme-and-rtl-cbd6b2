// obj_scan: object extraction by row and column scans of the Update flags.
//
// A row is a hit when it holds a run of at least diff_thr consecutive set
// Update flags; likewise a column, counting down the rows. The object box is
// rows top..bottom (first and last hit row) by columns left..right (first
// and last hit column). Short runs, which isolated noise flags produce, do
// not make a hit, so they do not widen the box. The scans read the flags
// from external RAM, sixteen to a word at {1111, row, col[9:4]}, bit
// col[3:0], and use no internal memory:
//   row scan    : rows 0..ROWS-1, in each the COLS/16 words left to right; one
//                 run counter carries across the 16 bits of a word in one
//                 cycle and is cleared at the start of a row;
//   column scan : word columns 0..COLS/16-1, in each rows 0..ROWS-1; sixteen
//                 vertical run counters, one per bit, cleared per word column.
// Two scans of ROWS*COLS/16 reads each; a read costs 3 cycles of the RAM
// interface, so a 640x480 image takes about 2*3*19200 = 115200 cycles.
// The scan order and counters are this design's; the run rule with the
// threshold counted inclusively (a run of exactly diff_thr is a hit) is taken
// from the worked 16x8 example of the original scheme.
// done pulses for one cycle; found and the box hold until the next start.
module obj_scan
  import wmsn_pkg::*;
#(
  parameter int unsigned COLS = 640,
  parameter int unsigned ROWS = 480,
  parameter int unsigned DTW  = 8
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start,
  input  logic [DTW-1:0] diff_thr,
  output logic [18:0]    rd_addr,
  output logic           rd_en,
  input  logic           rd_ack,
  input  logic [15:0]    rd_data,
  output logic           busy,
  output logic           done,
  output logic           found,
  output logic [8:0]     top,
  output logic [8:0]     bottom,
  output logic [9:0]     left,
  output logic [9:0]     right
);
  localparam int unsigned WORDS = COLS / 16;

  typedef enum logic [1:0] {S_IDLE, S_ROW, S_COL} state_e;
  state_e         state;
  logic [8:0]     r;
  logic [5:0]     w;
  logic [DTW-1:0] dt_q;
  logic [DTW-1:0] hrun;                 // horizontal run
  logic           row_hit;
  logic [DTW-1:0] vrun [16];            // vertical runs
  logic [15:0]    col_hit;
  logic           any_row, any_col;

  // Horizontal run across one word.
  logic [DTW-1:0] hrun_n;
  logic           hit_n;
  always_comb begin
    hrun_n = hrun;
    hit_n  = 1'b0;
    for (int b = 0; b < 16; b++) begin
      if (rd_data[b]) begin
        if (hrun_n != '1) hrun_n = hrun_n + 1'b1;
        if (hrun_n >= dt_q) hit_n = 1'b1;
      end else begin
        hrun_n = '0;
      end
    end
  end

  // Vertical runs for one word.
  logic [DTW-1:0] vrun_n [16];
  logic [15:0]    vhit_n;
  always_comb begin
    for (int b = 0; b < 16; b++) begin
      vrun_n[b] = '0;
      vhit_n[b] = 1'b0;
      if (rd_data[b]) begin
        vrun_n[b] = (vrun[b] == '1) ? vrun[b] : vrun[b] + 1'b1;
        vhit_n[b] = (vrun_n[b] >= dt_q);
      end
    end
  end

  // First and last set bit of the column hits of a finished word column.
  logic [15:0] col_hit_f;
  logic [3:0]  first_b, last_b;
  always_comb begin
    col_hit_f = col_hit | vhit_n;
    first_b   = '0;
    last_b    = '0;
    for (int b = 15; b >= 0; b--) if (col_hit_f[b]) first_b = 4'(b);
    for (int b = 0; b < 16; b++)  if (col_hit_f[b]) last_b  = 4'(b);
  end

  assign rd_addr = {4'b1111, r, w};
  assign rd_en   = (state == S_ROW) || (state == S_COL);
  assign busy    = (state != S_IDLE);
  assign found   = any_row && any_col;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= S_IDLE;
      r       <= '0;
      w       <= '0;
      dt_q    <= '0;
      hrun    <= '0;
      row_hit <= 1'b0;
      col_hit <= '0;
      for (int b = 0; b < 16; b++) vrun[b] <= '0;
      any_row <= 1'b0;
      any_col <= 1'b0;
      top     <= '0;
      bottom  <= '0;
      left    <= '0;
      right   <= '0;
      done    <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          dt_q    <= diff_thr;
          r       <= '0;
          w       <= '0;
          hrun    <= '0;
          row_hit <= 1'b0;
          any_row <= 1'b0;
          any_col <= 1'b0;
          state   <= S_ROW;
        end
        S_ROW: if (rd_ack) begin
          if (w == 6'(WORDS - 1)) begin
            // end of row
            if (row_hit || hit_n) begin
              if (!any_row) top <= r;
              bottom  <= r;
              any_row <= 1'b1;
            end
            hrun    <= '0;
            row_hit <= 1'b0;
            w       <= '0;
            if (r == 9'(ROWS - 1)) begin
              r       <= '0;
              col_hit <= '0;
              for (int b = 0; b < 16; b++) vrun[b] <= '0;
              state   <= S_COL;
            end else begin
              r <= r + 9'd1;
            end
          end else begin
            hrun    <= hrun_n;
            row_hit <= row_hit || hit_n;
            w       <= w + 6'd1;
          end
        end
        S_COL: if (rd_ack) begin
          if (r == 9'(ROWS - 1)) begin
            // end of a word column
            if (col_hit_f != '0) begin
              if (!any_col) left <= {w, first_b};
              right   <= {w, last_b};
              any_col <= 1'b1;
            end
            col_hit <= '0;
            for (int b = 0; b < 16; b++) vrun[b] <= '0;
            r <= '0;
            if (w == 6'(WORDS - 1)) begin
              state <= S_IDLE;
              done  <= 1'b1;
            end else begin
              w <= w + 6'd1;
            end
          end else begin
            col_hit <= col_hit_f;
            for (int b = 0; b < 16; b++) vrun[b] <= vrun_n[b];
            r <= r + 9'd1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
