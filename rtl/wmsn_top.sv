// wmsn_top: processing system of a wireless multimedia sensor node.
//
// Two clock domains. The low-frequency domain (lclk) belongs to the network
// processor, which runs all the time and is outside this RTL: its command,
// status and protocol streams are ports here. The high-frequency domain
// (hclk) holds the image processing block, which is clocked only while it
// works:
//   power_ctrl  wakes the image block when a command is pending, lets the
//               command through once the gated clock runs, and stops the
//               clock again when the block reports done;
//   clk_gate    suppresses hclk for the image block while it sleeps;
//   cdc_msg     carries commands lclk -> hclk and status hclk -> lclk;
//   img_proc    camera capture, background subtraction, object scan, DWT;
//   ext_ram_if  two 256Kx16 SRAMs as one 512Kx16 RAM, shared by the image
//               block and (while it is idle) the host port;
//   pkt_tx      frames image bytes into IMAGE PACKET messages (camera node);
//   msg_rx      parses received messages and checks image-packet CRCs;
//   pkt_queue   keeps only CRC-good packets for forwarding (router node).
// The host RAM port, camera and DWT read port are in the hclk domain; the
// command/status and protocol ports in the lclk domain. rst_n is an
// asynchronous reset; each domain releases it through a synchroniser.
// The partition into these blocks follows the original node architecture;
// the port-level details are this design's.
module wmsn_top
  import wmsn_pkg::*;
#(
  parameter int unsigned COLS  = 640,
  parameter int unsigned ROWS  = 480,
  parameter int unsigned MAX_W = 160,
  parameter int unsigned MAX_H = 100
) (
  input  logic        lclk,
  input  logic        hclk,
  input  logic        rst_n,
  // network processor: commands and status (lclk)
  input  logic        np_cmd_valid,
  output logic        np_cmd_ready,
  input  cmd_t        np_cmd,
  output logic        np_sts_valid,
  output sts_t        np_sts,
  output logic        ip_active,
  output logic [15:0] wake_count,
  output logic [31:0] active_cycles,
  // host RAM port (hclk)
  input  logic [18:0] host_rd_addr,
  input  logic        host_rd_en,
  output logic        host_rd_ack,
  output logic [15:0] host_rd_data,
  input  logic [18:0] host_wr_addr,
  input  logic        host_wr_en,
  output logic        host_wr_ack,
  input  logic [15:0] host_wr_data,
  // camera (hclk)
  input  logic        cam_vsync,
  input  logic        cam_href,
  input  logic        cam_pix_valid,
  input  logic [7:0]  cam_data,
  output logic        cam_overflow,
  // DWT coefficients (hclk)
  input  logic [7:0]  dwt_rd_row,
  input  logic [7:0]  dwt_rd_col,
  output logic signed [11:0] dwt_rd_data,
  output logic [7:0]  dwt_width,
  output logic [7:0]  dwt_height,
  // SRAM pins
  output logic [17:0] A,
  output logic [15:0] IO1_o,
  input  logic [15:0] IO1_i,
  output logic        IO1_oe,
  output logic [15:0] IO2_o,
  input  logic [15:0] IO2_i,
  output logic        IO2_oe,
  output logic        CE1,
  output logic        UB1,
  output logic        LB1,
  output logic        CE2,
  output logic        UB2,
  output logic        LB2,
  output logic        WE,
  output logic        OE,
  // protocol: image packet framing (lclk)
  input  logic        ptx_start,
  input  logic [15:0] ptx_id,
  input  logic [8:0]  ptx_len,
  output logic        ptx_busy,
  output logic        ptx_done,
  input  logic        ptx_data_valid,
  output logic        ptx_data_ready,
  input  logic [7:0]  ptx_data,
  output logic        ptx_tx_valid,
  input  logic        ptx_tx_ready,
  output logic [7:0]  ptx_tx_byte,
  // protocol: receive, check and queue (lclk)
  input  logic        rx_valid,
  input  logic [7:0]  rx_byte,
  output logic        msg_valid,
  output msg_type_e   msg_type,
  output logic [15:0] msg_id,
  output logic [31:0] msg_payload,
  output logic        msg_crc_ok,
  output logic [8:0]  pkt_size,
  output logic        in_transmission,
  output logic        fwd_valid,
  input  logic        fwd_ready,
  output logic [7:0]  fwd_byte,
  output logic        fwd_last,
  output logic [1:0]  queue_level,
  output logic [15:0] queue_committed,
  output logic [15:0] queue_dropped
);
  // ---------------- resets ----------------
  logic l_rst_n, h_rst_n;
  sync2 u_lrst (.clk(lclk), .rst_n, .d(1'b1), .q(l_rst_n));
  sync2 u_hrst (.clk(hclk), .rst_n, .d(1'b1), .q(h_rst_n));

  // ---------------- power control and clock gate ----------------
  logic ip_clk_en, ip_ready, en_h, en_ack, gclk;
  logic l_sts_valid;

  power_ctrl u_pcu (
    .lclk, .rst_n (l_rst_n),
    .np_cmd_pending (np_cmd_valid),
    .task_done      (l_sts_valid),
    .en_ack,
    .ip_clk_en,
    .ip_ready,
    .wake_count,
    .active_cycles
  );
  assign ip_active = ip_ready;

  sync2 u_en_h   (.clk(hclk), .rst_n(h_rst_n), .d(ip_clk_en),  .q(en_h));
  sync2 u_en_ack (.clk(lclk), .rst_n(l_rst_n), .d(en_h),       .q(en_ack));
  clk_gate u_cg  (.clk(hclk), .en(en_h), .gclk);

  // ---------------- cross-domain messages ----------------
  logic h_cmd_valid, h_cmd_ready, img_cmd_ready, h_sts_valid, h_sts_ready;
  cmd_t h_cmd;
  sts_t h_sts;
  logic [$bits(sts_t)-1:0] l_sts_w;

  cdc_msg #(.CW($bits(cmd_t)), .SW($bits(sts_t))) u_cdc (
    .lclk, .l_rst_n, .hclk, .h_rst_n,
    .l_release   (ip_ready),
    .l_cmd_valid (np_cmd_valid),
    .l_cmd_ready (np_cmd_ready),
    .l_cmd       (np_cmd),
    .l_sts_valid,
    .l_sts       (l_sts_w),
    .h_cmd_valid,
    .h_cmd_ready,
    .h_cmd,
    .h_sts_valid,
    .h_sts_ready,
    .h_sts
  );
  assign np_sts_valid = l_sts_valid;
  assign np_sts       = sts_t'(l_sts_w);
  assign h_cmd_ready  = img_cmd_ready && en_h;

  // ---------------- image processing block ----------------
  logic [18:0] ram_rd_addr, ram_wr_addr;
  logic        ram_rd_en, ram_rd_ack, ram_wr_en, ram_wr_ack;
  logic [15:0] ram_rd_data, ram_wr_data;
  logic [18:0] upd_count;
  logic        img_busy;

  img_proc #(.COLS(COLS), .ROWS(ROWS), .MAX_W(MAX_W), .MAX_H(MAX_H)) u_img (
    .clk (gclk), .rst_n (h_rst_n),
    .cmd_valid (h_cmd_valid), .cmd_ready (img_cmd_ready), .cmd (h_cmd),
    .sts_valid (h_sts_valid), .sts_ready (h_sts_ready), .sts (h_sts),
    .cam_vsync, .cam_href, .cam_pix_valid, .cam_data, .cam_overflow,
    .ram_rd_addr, .ram_rd_en, .ram_rd_ack, .ram_rd_data,
    .ram_wr_addr, .ram_wr_en, .ram_wr_ack, .ram_wr_data,
    .host_rd_addr, .host_rd_en, .host_rd_ack,
    .host_wr_addr, .host_wr_en, .host_wr_ack, .host_wr_data,
    .dwt_rd_row, .dwt_rd_col, .dwt_rd_data, .dwt_width, .dwt_height,
    .busy (img_busy),
    .upd_count
  );
  assign host_rd_data = ram_rd_data;

  // ---------------- external RAM ----------------
  ext_ram_if u_ram (
    .hclock (hclk), .rst_n (h_rst_n),
    .Write_address (ram_wr_addr), .Write_enable (ram_wr_en), .Write_ack (ram_wr_ack), .Write_data (ram_wr_data),
    .Read_address  (ram_rd_addr), .Read_enable  (ram_rd_en), .Read_ack  (ram_rd_ack), .Read_data  (ram_rd_data),
    .A, .IO1_o, .IO1_i, .IO1_oe, .IO2_o, .IO2_i, .IO2_oe,
    .CE1, .UB1, .LB1, .CE2, .UB2, .LB2, .WE, .OE
  );

  // ---------------- protocol ----------------
  pkt_tx #(.NMAX(256)) u_ptx (
    .clk (lclk), .rst_n (l_rst_n),
    .start (ptx_start), .pkt_id (ptx_id), .pkt_len (ptx_len),
    .busy (ptx_busy), .done (ptx_done),
    .data_valid (ptx_data_valid), .data_ready (ptx_data_ready), .data (ptx_data),
    .tx_valid (ptx_tx_valid), .tx_ready (ptx_tx_ready), .tx_byte (ptx_tx_byte)
  );

  logic       q_valid, q_first, q_last, q_good;
  logic [7:0] q_byte;
  msg_rx u_mrx (
    .clk (lclk), .rst_n (l_rst_n),
    .rx_valid, .rx_byte,
    .msg_valid, .msg_type, .msg_id, .msg_payload,
    .crc_ok (msg_crc_ok), .pkt_size, .in_transmission,
    .pkt_valid (q_valid), .pkt_byte (q_byte), .pkt_first (q_first),
    .pkt_last (q_last), .pkt_good (q_good)
  );

  pkt_queue #(.NPKT(2), .NMAX(261)) u_q (
    .clk (lclk), .rst_n (l_rst_n),
    .in_valid (q_valid), .in_byte (q_byte), .in_first (q_first),
    .in_last (q_last), .in_good (q_good),
    .out_valid (fwd_valid), .out_ready (fwd_ready), .out_byte (fwd_byte), .out_last (fwd_last),
    .level (queue_level), .committed (queue_committed), .dropped (queue_dropped)
  );

  logic unused_ok;
  assign unused_ok = ^{img_busy, upd_count};
endmodule
