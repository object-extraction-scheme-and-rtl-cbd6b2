// tb_pkt_tx: frames image packets of 16, 64, 256 and 1 byte with random
// stalls on both streams, and checks the bytes on the wire: 0xAA 0xAA, the
// packet ID high byte first, the data in order, and a CRC-8 (x^8+x^2+x+1)
// over ID and data computed here bit by bit. The overhead must be 5 bytes.
module tb_pkt_tx;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;  // a falling edge, so asynchronous resets take effect
  always #5 clk = !clk;
  int checks = 0, failures = 0;

  logic start = 0, busy, done, dv = 0, dr, tv, tr = 0;
  logic [15:0] id = 0;
  logic [8:0] len = 0;
  logic [7:0] dat = 0, tb_ = 0;

  pkt_tx #(.NMAX(256)) dut (.clk, .rst_n, .start, .pkt_id(id), .pkt_len(len), .busy, .done,
    .data_valid(dv), .data_ready(dr), .data(dat), .tx_valid(tv), .tx_ready(tr), .tx_byte(tb_));

  function automatic logic [7:0] crc_bit(input logic [7:0] c, input logic [7:0] d);
    for (int i = 7; i >= 0; i--) begin
      logic fb = c[7] ^ d[i];
      c = {c[6:0], 1'b0} ^ (fb ? 8'h07 : 8'h00);
    end
    return c;
  endfunction

  logic [7:0] src [256];
  logic [7:0] wire_q [$];
  int src_i = 0;

  always @(negedge clk) begin
    tr = ($urandom % 4 != 0);
    dv = busy && ($urandom % 3 != 0) && src_i < int'(len);
    dat = src[src_i];
  end
  always @(posedge clk) begin
    if (tv && tr) wire_q.push_back(tb_);
    if (dv && dr) src_i++;
  end

  task automatic one(input int n, input logic [15:0] pid);
    logic [7:0] c = 0;
    for (int i = 0; i < n; i++) src[i] = 8'($urandom);
    wire_q.delete(); src_i = 0;
    id = pid; len = 9'(n);
    @(negedge clk) start = 1; @(negedge clk) start = 0;
    while (!done) @(negedge clk);
    checks++;
    if (wire_q.size() != n + 5) begin failures++; $display("FAIL len %0d: %0d bytes", n, wire_q.size()); return; end
    checks++;
    if (wire_q[0] != 8'hAA || wire_q[1] != 8'hAA || wire_q[2] != pid[15:8] || wire_q[3] != pid[7:0]) begin
      failures++; $display("FAIL header %h %h %h %h", wire_q[0], wire_q[1], wire_q[2], wire_q[3]);
    end
    c = crc_bit(c, pid[15:8]); c = crc_bit(c, pid[7:0]);
    for (int i = 0; i < n; i++) begin
      c = crc_bit(c, src[i]);
      checks++;
      if (wire_q[4 + i] != src[i]) begin failures++; $display("FAIL data %0d", i); end
    end
    checks++;
    if (wire_q[n + 4] != c) begin failures++; $display("FAIL crc %h want %h", wire_q[n + 4], c); end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    one(16, 16'h0000);
    one(64, 16'h0001);
    one(256, 16'hBEEF);
    one(1, 16'h1234);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
