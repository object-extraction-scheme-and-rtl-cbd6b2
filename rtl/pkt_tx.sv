// pkt_tx: image packet framer of the application-layer protocol.
//
// On start it sends one IMAGE PACKET message as a byte stream:
//   0xAA 0xAA | packet ID (2 bytes, high first) | pkt_len image bytes | CRC-8
// so the overhead is 5 bytes whatever the packet size (16..256 bytes, set by
// the START OF TRANSMISSION message). Image bytes are pulled from the data
// stream as they are sent; the CRC (crc8) covers the packet ID and the data.
// Both streams use valid/ready; one byte moves per cycle when both sides are
// ready. done pulses after the CRC byte has been taken. Message layout and
// packet sizes follow the protocol; byte order and CRC coverage are this
// design's choice.
module pkt_tx #(
  parameter int unsigned NMAX = 256
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic [15:0] pkt_id,
  input  logic [8:0]  pkt_len,
  output logic        busy,
  output logic        done,
  // image data in
  input  logic        data_valid,
  output logic        data_ready,
  input  logic [7:0]  data,
  // framed bytes out
  output logic        tx_valid,
  input  logic        tx_ready,
  output logic [7:0]  tx_byte
);
  typedef enum logic [2:0] {T_IDLE, T_SYNC0, T_SYNC1, T_IDH, T_IDL, T_DATA, T_CRC} tstate_e;
  tstate_e     state;
  logic [15:0] id_q;
  logic [8:0]  len_q, cnt;
  logic [7:0]  crc;
  logic        fire, crc_en;

  crc8 u_crc (.clk, .rst_n, .clear(start && state == T_IDLE), .en(crc_en), .din(tx_byte), .crc);

  always_comb begin
    tx_valid   = 1'b0;
    tx_byte    = 8'h00;
    data_ready = 1'b0;
    unique case (state)
      T_SYNC0, T_SYNC1: begin tx_valid = 1'b1; tx_byte = 8'hAA; end
      T_IDH:  begin tx_valid = 1'b1; tx_byte = id_q[15:8]; end
      T_IDL:  begin tx_valid = 1'b1; tx_byte = id_q[7:0]; end
      T_DATA: begin tx_valid = data_valid; tx_byte = data; data_ready = tx_ready; end
      T_CRC:  begin tx_valid = 1'b1; tx_byte = crc; end
      default: ;
    endcase
    fire   = tx_valid && tx_ready;
    crc_en = fire && (state == T_IDH || state == T_IDL || state == T_DATA);
  end

  assign busy = (state != T_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= T_IDLE;
      id_q  <= '0;
      len_q <= '0;
      cnt   <= '0;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        T_IDLE: if (start) begin
          id_q  <= pkt_id;
          len_q <= (pkt_len > 9'(NMAX)) ? 9'(NMAX) : pkt_len;
          cnt   <= '0;
          state <= T_SYNC0;
        end
        T_SYNC0: if (fire) state <= T_SYNC1;
        T_SYNC1: if (fire) state <= T_IDH;
        T_IDH:   if (fire) state <= T_IDL;
        T_IDL:   if (fire) state <= (len_q == '0) ? T_CRC : T_DATA;
        T_DATA:  if (fire) begin
          cnt <= cnt + 9'd1;
          if (cnt + 9'd1 == len_q) state <= T_CRC;
        end
        T_CRC:   if (fire) begin
          state <= T_IDLE;
          done  <= 1'b1;
        end
        default: state <= T_IDLE;
      endcase
    end
  end
endmodule
