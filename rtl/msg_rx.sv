// msg_rx: receiver and parser for the application-layer messages.
//
// Every message starts with the byte 0xAA followed by a type byte:
//   0xAA IMAGE PACKET  packet ID (2) + N image bytes + CRC-8 (1)
//   0x00 CAMERA SETUP  camera parameters (4)
//   0x01 IMAGE QUERY   -
//   0x02 IMAGE SIZE    image size (2)
//   0x03 ACK           packet ID (2)
//   0x04 NACK          packet ID (2)
//   0x05 START OF TX   packet size (1)
//   0x06 END OF TX     -
// Multi-byte fields arrive most significant byte first. N is the packet size
// set by the last START OF TRANSMISSION; its byte holds N-1 so that sizes up
// to 256 fit (16 until the first one). When a message is complete msg_valid
// pulses with its type, the 16-bit ID (packet, ACK, NACK) and up to 4 payload
// bytes in msg_payload. For an image packet crc_ok tells whether the CRC-8
// over ID and data matched; this is the check that lets a router drop a
// corrupted packet instead of forwarding it. The bytes of an image packet are
// also copied to the pkt_* stream (pkt_first on the first 0xAA, pkt_last and
// pkt_good on the CRC byte) for the packet queue. in_transmission is set by
// START and cleared by END OF TRANSMISSION: while it is set, a node that is
// not on the active link must not transmit. An unknown type byte sends the
// parser back to looking for 0xAA. Message types and layouts follow the
// protocol; the N-1 size coding, byte order and CRC settings are this
// design's choice.
module msg_rx
  import wmsn_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        rx_valid,
  input  logic [7:0]  rx_byte,
  output logic        msg_valid,
  output msg_type_e   msg_type,
  output logic [15:0] msg_id,
  output logic [31:0] msg_payload,
  output logic        crc_ok,
  output logic [8:0]  pkt_size,
  output logic        in_transmission,
  // image packet byte stream
  output logic        pkt_valid,
  output logic [7:0]  pkt_byte,
  output logic        pkt_first,
  output logic        pkt_last,
  output logic        pkt_good
);
  typedef enum logic [2:0] {R_HUNT, R_TYPE, R_PAYLOAD, R_IDH, R_IDL, R_DATA, R_CRC} rstate_e;
  rstate_e     state;
  msg_type_e   type_q;
  logic [2:0]  need;       // payload bytes still expected
  logic [8:0]  cnt;
  logic [7:0]  crc;
  logic        crc_en, crc_clr;
  logic        type_known;
  logic [2:0]  type_len;

  crc8 u_crc (.clk, .rst_n, .clear(crc_clr), .en(crc_en), .din(rx_byte), .crc);

  always_comb begin
    type_known = 1'b1;
    type_len   = 3'd0;
    unique case (rx_byte)
      MSG_IMAGE_PACKET: type_len = 3'd0;
      MSG_CAMERA_SETUP: type_len = 3'd4;
      MSG_IMAGE_QUERY:  type_len = 3'd0;
      MSG_IMAGE_SIZE:   type_len = 3'd2;
      MSG_ACK:          type_len = 3'd2;
      MSG_NACK:         type_len = 3'd2;
      MSG_START_TX:     type_len = 3'd1;
      MSG_END_TX:       type_len = 3'd0;
      default:          type_known = 1'b0;
    endcase
    crc_clr   = rx_valid && (state == R_TYPE);
    crc_en    = rx_valid && (state == R_IDH || state == R_IDL || state == R_DATA);
    pkt_valid = rx_valid && (state == R_IDH || state == R_IDL || state == R_DATA || state == R_CRC ||
                             (state == R_TYPE && rx_byte == MSG_IMAGE_PACKET));
    pkt_first = rx_valid && (state == R_TYPE) && (rx_byte == MSG_IMAGE_PACKET);
    pkt_byte  = rx_byte;
    pkt_last  = rx_valid && (state == R_CRC);
    pkt_good  = (rx_byte == crc);
  end

  // The image-packet stream starts with the type byte; the queue rebuilds
  // the first sync byte (0xAA) on output, so pkt_first marks 0xAA there.

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state           <= R_HUNT;
      type_q          <= MSG_IMAGE_QUERY;
      need            <= '0;
      cnt             <= '0;
      msg_valid       <= 1'b0;
      msg_type        <= MSG_IMAGE_QUERY;
      msg_id          <= '0;
      msg_payload     <= '0;
      crc_ok          <= 1'b0;
      pkt_size        <= 9'd16;
      in_transmission <= 1'b0;
    end else begin
      msg_valid <= 1'b0;
      if (rx_valid) begin
        unique case (state)
          R_HUNT: if (rx_byte == MSG_SYNC) state <= R_TYPE;
          R_TYPE: begin
            if (!type_known) begin
              state <= (rx_byte == MSG_SYNC) ? R_TYPE : R_HUNT;
            end else begin
              type_q      <= msg_type_e'(rx_byte);
              msg_payload <= '0;
              msg_id      <= '0;
              need        <= type_len;
              if (rx_byte == MSG_IMAGE_PACKET) begin
                state <= R_IDH;
              end else if (type_len == 3'd0) begin
                msg_valid <= 1'b1;
                msg_type  <= msg_type_e'(rx_byte);
                if (rx_byte == MSG_END_TX) in_transmission <= 1'b0;
                state <= R_HUNT;
              end else begin
                state <= R_PAYLOAD;
              end
            end
          end
          R_PAYLOAD: begin
            msg_payload <= {msg_payload[23:0], rx_byte};
            msg_id      <= {msg_id[7:0], rx_byte};
            need        <= need - 3'd1;
            if (need == 3'd1) begin
              msg_valid <= 1'b1;
              msg_type  <= type_q;
              if (type_q == MSG_START_TX) begin
                in_transmission <= 1'b1;
                pkt_size        <= {1'b0, rx_byte} + 9'd1;
              end
              state <= R_HUNT;
            end
          end
          R_IDH: begin msg_id[15:8] <= rx_byte; state <= R_IDL; end
          R_IDL: begin
            msg_id[7:0] <= rx_byte;
            cnt         <= '0;
            state       <= R_DATA;
          end
          R_DATA: begin
            cnt <= cnt + 9'd1;
            if (cnt + 9'd1 == pkt_size) state <= R_CRC;
          end
          R_CRC: begin
            crc_ok    <= pkt_good;
            msg_valid <= 1'b1;
            msg_type  <= MSG_IMAGE_PACKET;
            state     <= R_HUNT;
          end
          default: state <= R_HUNT;
        endcase
      end
    end
  end
endmodule
