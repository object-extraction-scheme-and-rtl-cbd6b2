// tb_msg_rx: feeds every message type of the protocol, with junk bytes in
// between, and checks type, ID, payload, the START/END OF TRANSMISSION
// state, the packet size taken from START OF TRANSMISSION, and the CRC
// verdict of a good and a corrupted image packet. The image-packet byte
// stream must carry the type byte through the CRC byte.
module tb_msg_rx;
  import wmsn_pkg::*;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;  // a falling edge, so asynchronous resets take effect
  always #5 clk = !clk;
  int checks = 0, failures = 0;

  logic rv = 0, mv, ok, intx, pv, pf, pl, pg;
  logic [7:0] rb = 0, pb;
  msg_type_e mt;
  logic [15:0] mid;
  logic [31:0] mp;
  logic [8:0] psz;

  msg_rx dut (.clk, .rst_n, .rx_valid(rv), .rx_byte(rb), .msg_valid(mv), .msg_type(mt), .msg_id(mid),
    .msg_payload(mp), .crc_ok(ok), .pkt_size(psz), .in_transmission(intx),
    .pkt_valid(pv), .pkt_byte(pb), .pkt_first(pf), .pkt_last(pl), .pkt_good(pg));

  function automatic logic [7:0] crc_bit(input logic [7:0] c, input logic [7:0] d);
    for (int i = 7; i >= 0; i--) begin
      logic fb = c[7] ^ d[i];
      c = {c[6:0], 1'b0} ^ (fb ? 8'h07 : 8'h00);
    end
    return c;
  endfunction

  int nmsg = 0, npkt_bytes = 0;
  msg_type_e last_t;
  logic [15:0] last_id;
  logic [31:0] last_p;
  logic last_ok;
  always @(posedge clk) if (rst_n) begin
    if (mv) begin nmsg++; last_t = mt; last_id = mid; last_p = mp; last_ok = ok; end
    if (pv) npkt_bytes++;
  end

  task automatic sendb(input logic [7:0] b);
    rb = b; rv = 1; @(negedge clk); rv = 0;
    if ($urandom % 2) @(negedge clk);
  endtask

  task automatic expect_msg(input msg_type_e t, input logic [15:0] i, input logic [31:0] p, input string w);
    @(negedge clk);
    checks++;
    if (nmsg != 1 || last_t != t || last_id != i || last_p != p) begin
      failures++; $display("FAIL %s: n%0d type %h id %h payload %h", w, nmsg, last_t, last_id, last_p);
    end
    nmsg = 0;
  endtask

  task automatic image(input int n, input logic [15:0] pid, input bit corrupt);
    logic [7:0] c = 0;
    npkt_bytes = 0;
    sendb(8'hAA); sendb(8'hAA); sendb(pid[15:8]); sendb(pid[7:0]);
    c = crc_bit(c, pid[15:8]); c = crc_bit(c, pid[7:0]);
    for (int k = 0; k < n; k++) begin
      logic [7:0] b = 8'($urandom);
      c = crc_bit(c, b);
      sendb(corrupt && k == 3 ? b ^ 8'h10 : b);
    end
    sendb(c);
    expect_msg(MSG_IMAGE_PACKET, pid, 0, "image");
    checks++;
    if (last_ok !== !corrupt || npkt_bytes != n + 4) begin
      failures++; $display("FAIL crc_ok %0d (corrupt %0d), stream %0d bytes", last_ok, corrupt, npkt_bytes);
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    sendb(8'h13); sendb(8'h55);                        // junk
    sendb(8'hAA); sendb(8'h00); sendb(8'h11); sendb(8'h22); sendb(8'h33); sendb(8'h44);
    expect_msg(MSG_CAMERA_SETUP, 16'h3344, 32'h11223344, "camera setup");
    sendb(8'hAA); sendb(8'h01);
    expect_msg(MSG_IMAGE_QUERY, 0, 0, "query");
    sendb(8'hAA); sendb(8'h02); sendb(8'h96); sendb(8'h00);
    expect_msg(MSG_IMAGE_SIZE, 16'h9600, 32'h9600, "image size");
    checks++;
    if (intx) begin failures++; $display("FAIL in_transmission early"); end
    sendb(8'hAA); sendb(8'h05); sendb(8'd15);           // 16-byte packets
    expect_msg(MSG_START_TX, 16'h000F, 32'h0F, "start");
    checks++;
    if (!intx || psz != 9'd16) begin failures++; $display("FAIL start: intx %0d size %0d", intx, psz); end
    image(16, 16'h0000, 0);
    image(16, 16'h0001, 1);
    sendb(8'h77);                                       // junk, unknown type
    sendb(8'hAA); sendb(8'h99);
    sendb(8'hAA); sendb(8'h03); sendb(8'h00); sendb(8'h00);
    expect_msg(MSG_ACK, 16'h0000, 32'h0000, "ack");
    sendb(8'hAA); sendb(8'h04); sendb(8'h00); sendb(8'h01);
    expect_msg(MSG_NACK, 16'h0001, 32'h0001, "nack");
    sendb(8'hAA); sendb(8'h05); sendb(8'd255);          // 256-byte packets
    expect_msg(MSG_START_TX, 16'h00FF, 32'hFF, "start 256");
    checks++;
    if (psz != 9'd256) begin failures++; $display("FAIL size %0d", psz); end
    image(256, 16'h0102, 0);
    sendb(8'hAA); sendb(8'h06);
    expect_msg(MSG_END_TX, 0, 0, "end");
    checks++;
    if (intx) begin failures++; $display("FAIL in_transmission after end"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
