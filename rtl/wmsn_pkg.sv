// wmsn_pkg: types and constants shared by the camera-node image processing
// blocks and the protocol units.
//
// Image geometry: a 640x480 8-bit gray image. A pixel lives in external RAM at
// the 19-bit word address {row[8:0], col[9:0]}; the upper byte of the word is
// the background pixel and the lower byte the current-frame pixel. The
// per-pixel Update flags are packed sixteen to a word at
// {4'b1111, row[8:0], col[9:4]}, bit col[3:0]. These maps are the ones of the
// external RAM organisation; the command and status encodings below are this
// design's own.
package wmsn_pkg;

  localparam int unsigned ADDR_W = 19;
  localparam int unsigned DATA_W = 16;
  localparam int unsigned ROW_W  = 9;
  localparam int unsigned COL_W  = 10;

  typedef logic [ADDR_W-1:0] ram_addr_t;
  typedef logic [DATA_W-1:0] ram_data_t;

  // Word address of pixel (row, col).
  function automatic ram_addr_t pix_addr(logic [ROW_W-1:0] row, logic [COL_W-1:0] col);
    return {row, col};
  endfunction

  // Word address of the Update word that holds the flags of the pixels
  // (row, {cw, 4'bxxxx}); cw = col[9:4].
  function automatic ram_addr_t upd_addr(logic [ROW_W-1:0] row, logic [COL_W-5:0] cw);
    return {4'b1111, row, cw};
  endfunction

  // Commands from the network processor to the image processing block.
  typedef enum logic [3:0] {
    OP_NOP     = 4'd0,
    OP_LOAD_BG = 4'd1,  // capture a frame as the new background
    OP_EXTRACT = 4'd2,  // capture a frame, update background, find object
    OP_DWT     = 4'd3   // 5/3 DWT of the current-frame pixels in the last box
  } opcode_e;

  typedef struct packed {
    opcode_e    op;        // [31:28]
    logic       rsvd;      // [27]
    logic [2:0] asel;      // [26:24] alpha = 1/2^asel
    logic [7:0] thr;       // [23:16] background subtraction threshold
    logic [7:0] diff_thr;  // [15:8]  run-length (difference) threshold
    logic [1:0] levels;    // [7:6]  DWT levels, 1 to 3 (0 taken as 1)
    logic [5:0] rsvd2;     // [5:0]
  } cmd_t;

  typedef struct packed {
    opcode_e          op;      // command that finished
    logic             found;   // an object box was found
    logic [2:0]       rsvd;
    logic [ROW_W-1:0] top;
    logic [ROW_W-1:0] bottom;
    logic [COL_W-1:0] left;
    logic [COL_W-1:0] right;
  } sts_t;  // 4+1+3+9+9+10+10 = 46 bits

  // Application-layer message types (second header byte after 0xAA).
  typedef enum logic [7:0] {
    MSG_IMAGE_PACKET = 8'hAA,
    MSG_CAMERA_SETUP = 8'h00,
    MSG_IMAGE_QUERY  = 8'h01,
    MSG_IMAGE_SIZE   = 8'h02,
    MSG_ACK          = 8'h03,
    MSG_NACK         = 8'h04,
    MSG_START_TX     = 8'h05,
    MSG_END_TX       = 8'h06
  } msg_type_e;

  localparam logic [7:0] MSG_SYNC = 8'hAA;

endpackage
