// camera_if: camera interface of the image processing block.
//
// Captures one frame of 8-bit gray pixels from the camera when armed and
// hands each pixel, with its row and column, to the background-subtraction
// controller through a small FIFO. The camera is assumed already synchronous
// to this clock: cam_vsync marks a frame start, and cam_pix_valid strobes one
// pixel while cam_href (line valid) is high. Rows and columns are counted
// here, so the first pixel after cam_vsync is (0,0) and the COLS-th pixel of a
// line ends it. After arm, capture starts at the next cam_vsync and stops
// after ROWS*COLS pixels; the last pixel leaves the FIFO with pix_last set.
// A pixel that finds the FIFO full is lost and sets the sticky overflow flag
// until the next arm. The document only names this block; everything about
// its signals and the FIFO (depth FIFO_DEPTH) is this design's choice.
module camera_if #(
  parameter int unsigned COLS       = 640,
  parameter int unsigned ROWS       = 480,
  parameter int unsigned FIFO_DEPTH = 8
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       arm,            // capture the next frame
  input  logic       cam_vsync,
  input  logic       cam_href,
  input  logic       cam_pix_valid,
  input  logic [7:0] cam_data,
  output logic       pix_valid,
  input  logic       pix_ready,
  output logic [7:0] pix_data,
  output logic [8:0] pix_row,
  output logic [9:0] pix_col,
  output logic       pix_last,
  output logic       capturing,
  output logic       overflow
);
  localparam int unsigned PW = $clog2(FIFO_DEPTH);
  typedef struct packed {
    logic       last;
    logic [8:0] row;
    logic [9:0] col;
    logic [7:0] data;
  } pix_t;

  pix_t        fifo [FIFO_DEPTH];
  logic [PW:0] wp, rp;
  logic        armed;
  logic [8:0]  row;
  logic [9:0]  col;
  logic        full, empty, push, pop;

  assign full  = (wp[PW] != rp[PW]) && (wp[PW-1:0] == rp[PW-1:0]);
  assign empty = (wp == rp);
  assign push  = capturing && cam_href && cam_pix_valid && !full;
  assign pop   = pix_valid && pix_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      armed     <= 1'b0;
      capturing <= 1'b0;
      overflow  <= 1'b0;
      row       <= '0;
      col       <= '0;
      wp        <= '0;
      rp        <= '0;
    end else begin
      if (arm) begin
        armed    <= 1'b1;
        overflow <= 1'b0;
      end else if (armed && cam_vsync) begin
        armed     <= 1'b0;
        capturing <= 1'b1;
        row       <= '0;
        col       <= '0;
      end
      if (capturing && cam_href && cam_pix_valid) begin
        if (full) overflow <= 1'b1;
        if (col == 10'(COLS - 1)) begin
          col <= '0;
          row <= row + 9'd1;
          if (row == 9'(ROWS - 1)) capturing <= 1'b0;
        end else begin
          col <= col + 10'd1;
        end
      end
      if (push) wp <= wp + 1'b1;
      if (pop)  rp <= rp + 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (push)
      fifo[wp[PW-1:0]] <= '{last: (row == 9'(ROWS - 1)) && (col == 10'(COLS - 1)),
                            row: row, col: col, data: cam_data};
  end

  always_comb begin
    pix_valid = !empty;
    pix_data  = fifo[rp[PW-1:0]].data;
    pix_row   = fifo[rp[PW-1:0]].row;
    pix_col   = fifo[rp[PW-1:0]].col;
    pix_last  = fifo[rp[PW-1:0]].last;
  end

endmodule
