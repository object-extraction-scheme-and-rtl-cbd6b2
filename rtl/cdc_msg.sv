// cdc_msg: cross-clock-domain message path between the network processor
// (lclk, low frequency) and the image processing block (hclk, high
// frequency).
//
// Command path, lclk -> hclk: a command accepted on the lclk side
// (l_cmd_valid & l_cmd_ready, only while l_release is high) is copied into a
// holding register and a request toggle flips. The toggle is synchronised
// into hclk; its change raises h_cmd_valid with the held word, which stays
// stable until the hclk side takes it (h_cmd_ready). The acknowledge toggle
// then flips and, synchronised back, frees l_cmd_ready for the next command.
// Status path, hclk -> lclk: h_sts_valid (one hclk pulse, only while
// h_sts_ready) captures the status word and flips a toggle; its change in
// lclk gives a one-cycle l_sts_valid with the word. h_sts_ready comes back
// once the lclk side has seen it. Only toggles cross the boundary; data
// words are stable while read. The block is only named in the original
// design; this toggle handshake is this design's choice.
module cdc_msg #(
  parameter int unsigned CW = 32,
  parameter int unsigned SW = 46
) (
  input  logic          lclk,
  input  logic          l_rst_n,
  input  logic          hclk,
  input  logic          h_rst_n,
  // lclk side
  input  logic          l_release,
  input  logic          l_cmd_valid,
  output logic          l_cmd_ready,
  input  logic [CW-1:0] l_cmd,
  output logic          l_sts_valid,
  output logic [SW-1:0] l_sts,
  // hclk side
  output logic          h_cmd_valid,
  input  logic          h_cmd_ready,
  output logic [CW-1:0] h_cmd,
  input  logic          h_sts_valid,
  output logic          h_sts_ready,
  input  logic [SW-1:0] h_sts
);
  // ---------------- command path ----------------
  logic          l_req_t, h_ack_t, l_ack_s, h_req_s, h_req_seen;
  logic [CW-1:0] cmd_hold;

  assign l_cmd_ready = l_release && (l_req_t == l_ack_s);

  always_ff @(posedge lclk or negedge l_rst_n) begin
    if (!l_rst_n) begin
      l_req_t  <= 1'b0;
      cmd_hold <= '0;
    end else if (l_cmd_valid && l_cmd_ready) begin
      cmd_hold <= l_cmd;
      l_req_t  <= !l_req_t;
    end
  end

  sync2 u_req_s (.clk(hclk), .rst_n(h_rst_n), .d(l_req_t), .q(h_req_s));
  sync2 u_ack_s (.clk(lclk), .rst_n(l_rst_n), .d(h_ack_t), .q(l_ack_s));

  always_ff @(posedge hclk or negedge h_rst_n) begin
    if (!h_rst_n) begin
      h_ack_t    <= 1'b0;
      h_req_seen <= 1'b0;
    end else if (h_cmd_valid && h_cmd_ready) begin
      h_ack_t    <= !h_ack_t;
      h_req_seen <= h_req_s;
    end
  end
  assign h_cmd_valid = (h_req_s != h_req_seen);
  assign h_cmd       = cmd_hold;

  // ---------------- status path ----------------
  logic          h_sts_t, l_sts_s, l_sts_seen, h_sts_ack_s;
  logic [SW-1:0] sts_hold;

  assign h_sts_ready = (h_sts_t == h_sts_ack_s);

  always_ff @(posedge hclk or negedge h_rst_n) begin
    if (!h_rst_n) begin
      h_sts_t  <= 1'b0;
      sts_hold <= '0;
    end else if (h_sts_valid && h_sts_ready) begin
      sts_hold <= h_sts;
      h_sts_t  <= !h_sts_t;
    end
  end

  sync2 u_sts_s  (.clk(lclk), .rst_n(l_rst_n), .d(h_sts_t),    .q(l_sts_s));
  sync2 u_stsa_s (.clk(hclk), .rst_n(h_rst_n), .d(l_sts_seen), .q(h_sts_ack_s));

  always_ff @(posedge lclk or negedge l_rst_n) begin
    if (!l_rst_n) begin
      l_sts_seen  <= 1'b0;
      l_sts_valid <= 1'b0;
      l_sts       <= '0;
    end else begin
      l_sts_valid <= 1'b0;
      if (l_sts_s != l_sts_seen) begin
        l_sts_seen  <= l_sts_s;
        l_sts_valid <= 1'b1;
        l_sts       <= sts_hold;
      end
    end
  end
endmodule
