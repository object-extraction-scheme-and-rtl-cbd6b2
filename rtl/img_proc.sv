// img_proc: image processing block of the camera node.
//
// Runs in the high-frequency clock domain, and only while the power control
// unit lets its clock through. It takes one command at a time from the
// network processor (cmd_t, see wmsn_pkg) and answers each with one status
// word (sts_t):
//   OP_LOAD_BG : capture the next camera frame as background and current
//                image (camera_if -> bgs_ctrl with load_bg).
//   OP_EXTRACT : capture the next frame, update the background with the
//                running average and store the Update flags (bgs_ctrl), then
//                find the object box by row/column scans (obj_scan). The
//                status carries found and the box.
//   OP_DWT     : read the current-frame pixels of the last box from RAM
//                (clipped to MAX_W x MAX_H from its top-left corner) into
//                dwt53_2d and run the 5/3 DWT with the commanded number of
//                levels (1 to 3); the coefficients
//                are then readable on the dwt_rd port.
// The single external-RAM read and write ports are given to whichever unit
// the running command uses; while no command runs they belong to the host
// port, through which the network processor reads the extracted object.
// The functions come from the original design; the command set, its
// encoding and this sequencing are this design's own.
module img_proc
  import wmsn_pkg::*;
#(
  parameter int unsigned COLS  = 640,
  parameter int unsigned ROWS  = 480,
  parameter int unsigned MAX_W = 160,
  parameter int unsigned MAX_H = 100
) (
  input  logic        clk,
  input  logic        rst_n,
  // commands and status
  input  logic        cmd_valid,
  output logic        cmd_ready,
  input  cmd_t        cmd,
  output logic        sts_valid,
  input  logic        sts_ready,
  output sts_t        sts,
  // camera
  input  logic        cam_vsync,
  input  logic        cam_href,
  input  logic        cam_pix_valid,
  input  logic [7:0]  cam_data,
  output logic        cam_overflow,
  // external RAM interface ports
  output logic [18:0] ram_rd_addr,
  output logic        ram_rd_en,
  input  logic        ram_rd_ack,
  input  logic [15:0] ram_rd_data,
  output logic [18:0] ram_wr_addr,
  output logic        ram_wr_en,
  input  logic        ram_wr_ack,
  output logic [15:0] ram_wr_data,
  // host (network processor) RAM access while idle
  input  logic [18:0] host_rd_addr,
  input  logic        host_rd_en,
  output logic        host_rd_ack,
  input  logic [18:0] host_wr_addr,
  input  logic        host_wr_en,
  output logic        host_wr_ack,
  input  logic [15:0] host_wr_data,
  // DWT coefficients
  input  logic [7:0]  dwt_rd_row,
  input  logic [7:0]  dwt_rd_col,
  output logic signed [11:0] dwt_rd_data,
  output logic [7:0]  dwt_width,
  output logic [7:0]  dwt_height,
  // status
  output logic        busy,
  output logic [18:0] upd_count
);
  typedef enum logic [2:0] {I_IDLE, I_CAP, I_SCAN, I_DLOAD, I_DWT, I_STS} istate_e;
  istate_e state;
  cmd_t    cmd_q;
  logic    cam_arm, cam_started;
  logic    scan_start, scan_done, scan_found;
  logic [8:0] s_top, s_bottom;
  logic [9:0] s_left, s_right;
  logic    box_valid;
  sts_t    sts_q;

  // ---------------- camera and background subtraction ----------------
  logic       pix_valid, pix_ready, pix_last, capturing;
  logic [7:0] pix_data;
  logic [8:0] pix_row;
  logic [9:0] pix_col;

  camera_if #(.COLS(COLS), .ROWS(ROWS)) u_cam (
    .clk, .rst_n, .arm(cam_arm),
    .cam_vsync, .cam_href, .cam_pix_valid, .cam_data,
    .pix_valid, .pix_ready, .pix_data, .pix_row, .pix_col, .pix_last,
    .capturing, .overflow(cam_overflow)
  );

  logic [18:0] b_rd_addr, b_wr_addr, s_rd_addr;
  logic        b_rd_en, b_wr_en, s_rd_en, bgs_busy, scan_busy;
  logic [15:0] b_wr_data;

  bgs_ctrl u_bgs (
    .clk, .rst_n,
    .clear   (cmd_valid && cmd_ready),
    .load_bg (cmd_q.op == OP_LOAD_BG),
    .asel    (cmd_q.asel),
    .thr     (cmd_q.thr),
    .pix_valid, .pix_ready, .pix_data, .pix_row, .pix_col,
    .rd_addr (b_rd_addr), .rd_en (b_rd_en), .rd_ack (ram_rd_ack), .rd_data (ram_rd_data),
    .wr_addr (b_wr_addr), .wr_en (b_wr_en), .wr_ack (ram_wr_ack), .wr_data (b_wr_data),
    .busy    (bgs_busy),
    .upd_count
  );

  // ---------------- object scan ----------------
  obj_scan #(.COLS(COLS), .ROWS(ROWS)) u_scan (
    .clk, .rst_n,
    .start    (scan_start),
    .diff_thr (cmd_q.diff_thr),
    .rd_addr  (s_rd_addr), .rd_en (s_rd_en), .rd_ack (ram_rd_ack), .rd_data (ram_rd_data),
    .busy     (scan_busy),
    .done     (scan_done),
    .found    (scan_found),
    .top      (s_top), .bottom (s_bottom), .left (s_left), .right (s_right)
  );

  // ---------------- DWT tile load and transform ----------------
  logic [8:0] lr;      // RAM row being loaded
  logic [9:0] lc;      // RAM column being loaded
  logic [7:0] tw, th;  // tile size
  logic       dwt_start, dwt_done, dwt_busy, ld_valid;

  always_comb begin
    tw = ((s_right - s_left + 10'd1) > 10'(MAX_W)) ? 8'(MAX_W) : 8'(s_right - s_left + 10'd1);
    th = ((s_bottom - s_top + 9'd1) > 9'(MAX_H))   ? 8'(MAX_H) : 8'(s_bottom - s_top + 9'd1);
  end

  assign ld_valid = (state == I_DLOAD) && ram_rd_ack;

  dwt53_2d #(.MAX_W(MAX_W), .MAX_H(MAX_H), .CW(12)) u_dwt (
    .clk, .rst_n,
    .load_valid (ld_valid),
    .load_row   (8'(lr - s_top)),
    .load_col   (8'(lc - s_left)),
    .load_data  (ram_rd_data[7:0]),
    .start      (dwt_start),
    .width      (tw),
    .height     (th),
    .levels     (cmd_q.levels),
    .busy       (dwt_busy),
    .done       (dwt_done),
    .rd_row     (dwt_rd_row),
    .rd_col     (dwt_rd_col),
    .rd_data    (dwt_rd_data)
  );
  assign dwt_width  = tw;
  assign dwt_height = th;

  // ---------------- RAM port ownership ----------------
  always_comb begin
    host_rd_ack = 1'b0;
    host_wr_ack = 1'b0;
    ram_wr_addr = b_wr_addr;
    ram_wr_data = b_wr_data;
    ram_wr_en   = 1'b0;
    ram_rd_addr = b_rd_addr;
    ram_rd_en   = 1'b0;
    unique case (state)
      I_CAP: begin
        ram_rd_en = b_rd_en;
        ram_wr_en = b_wr_en;
      end
      I_SCAN: begin
        ram_rd_addr = s_rd_addr;
        ram_rd_en   = s_rd_en;
      end
      I_DLOAD: begin
        ram_rd_addr = pix_addr(lr, lc);
        ram_rd_en   = 1'b1;
      end
      I_IDLE: begin
        ram_rd_addr = host_rd_addr;
        ram_rd_en   = host_rd_en;
        ram_wr_addr = host_wr_addr;
        ram_wr_data = host_wr_data;
        ram_wr_en   = host_wr_en;
        host_rd_ack = ram_rd_ack;
        host_wr_ack = ram_wr_ack;
      end
      default: ;
    endcase
  end

  // ---------------- command sequencing ----------------
  assign cmd_ready = (state == I_IDLE) && !host_rd_en && !host_wr_en;
  assign busy      = (state != I_IDLE);
  assign sts_valid = (state == I_STS);
  assign sts       = sts_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= I_IDLE;
      cmd_q       <= '0;
      cam_arm     <= 1'b0;
      cam_started <= 1'b0;
      scan_start  <= 1'b0;
      dwt_start   <= 1'b0;
      box_valid   <= 1'b0;
      sts_q       <= '0;
      lr          <= '0;
      lc          <= '0;
    end else begin
      cam_arm    <= 1'b0;
      scan_start <= 1'b0;
      dwt_start  <= 1'b0;
      unique case (state)
        I_IDLE: if (cmd_valid && cmd_ready) begin
          cmd_q       <= cmd;
          sts_q       <= '0;
          sts_q.op    <= cmd.op;
          cam_started <= 1'b0;
          unique case (cmd.op)
            OP_LOAD_BG, OP_EXTRACT: begin
              cam_arm <= 1'b1;
              state   <= I_CAP;
            end
            OP_DWT: begin
              lr <= s_top;
              lc <= s_left;
              if (box_valid && tw >= 8'd2 && th >= 8'd2) begin
                sts_q.found <= 1'b1;
                state       <= I_DLOAD;
              end else begin
                state <= I_STS;
              end
              sts_q.top    <= s_top;
              sts_q.bottom <= s_bottom;
              sts_q.left   <= s_left;
              sts_q.right  <= s_right;
            end
            default: state <= I_STS;
          endcase
        end
        I_CAP: begin
          if (capturing) cam_started <= 1'b1;
          if (cam_started && !capturing && !pix_valid && !bgs_busy) begin
            if (cmd_q.op == OP_EXTRACT) begin
              scan_start <= 1'b1;
              state      <= I_SCAN;
            end else begin
              box_valid <= 1'b0;
              state     <= I_STS;
            end
          end
        end
        I_SCAN: if (scan_done) begin
          box_valid    <= scan_found;
          sts_q.found  <= scan_found;
          sts_q.top    <= s_top;
          sts_q.bottom <= s_bottom;
          sts_q.left   <= s_left;
          sts_q.right  <= s_right;
          state        <= I_STS;
        end
        I_DLOAD: if (ram_rd_ack) begin
          if (lc - s_left == 10'(tw) - 10'd1) begin
            lc <= s_left;
            if (lr - s_top == 9'(th) - 9'd1) begin
              dwt_start <= 1'b1;
              state     <= I_DWT;
            end else begin
              lr <= lr + 9'd1;
            end
          end else begin
            lc <= lc + 10'd1;
          end
        end
        I_DWT: if (dwt_done) state <= I_STS;
        I_STS: if (sts_ready) state <= I_IDLE;
        default: state <= I_IDLE;
      endcase
    end
  end

  // The RAM interface holds its request until acknowledged, so a unit's
  // request must not be withdrawn while it is pending.
  assert property (@(posedge clk) disable iff (!rst_n)
                   (state == I_DLOAD) |-> ram_rd_en);

endmodule
