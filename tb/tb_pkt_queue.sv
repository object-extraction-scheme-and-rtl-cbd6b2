// tb_pkt_queue: router queue control with room for two 21-byte packets.
// With the output stopped, a good packet, a corrupted one, a good one and a
// fourth good one arrive: the corrupted one and the one that finds the queue
// full must be dropped, the other two kept (level 2). They must then leave
// whole, with the sync byte 0xAA put back in front, in order. A last packet
// checks that the freed space is reused across the buffer's wrap-around.
module tb_pkt_queue;
  localparam int NMAX = 21;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;  // a falling edge, so asynchronous resets take effect
  always #5 clk = !clk;
  int checks = 0, failures = 0;

  logic iv = 0, ifst = 0, ilst = 0, igood = 0, ov, ordy = 0, olst;
  logic [7:0] ib = 0, ob;
  logic [1:0] level;
  logic [15:0] committed, dropped;

  pkt_queue #(.NPKT(2), .NMAX(NMAX)) dut (.clk, .rst_n, .in_valid(iv), .in_byte(ib), .in_first(ifst),
    .in_last(ilst), .in_good(igood), .out_valid(ov), .out_ready(ordy), .out_byte(ob), .out_last(olst),
    .level, .committed, .dropped);

  typedef logic [7:0] pkt_t [$];
  pkt_t sent [5];
  logic [7:0] got [$];
  int got_pkts = 0;
  always @(posedge clk) if (rst_n && ov && ordy) begin
    got.push_back(ob);
    if (olst) got_pkts++;
  end

  // stored part of a packet: type byte 0xAA, ID, 16 data bytes, CRC byte
  task automatic send(input int k, input bit good);
    sent[k] = {};
    sent[k].push_back(8'hAA);
    sent[k].push_back(8'h00); sent[k].push_back(8'(k));
    for (int i = 0; i < 16; i++) sent[k].push_back(8'($urandom));
    sent[k].push_back(8'($urandom));
    foreach (sent[k][i]) begin
      ib = sent[k][i]; iv = 1; ifst = (i == 0); ilst = (i == sent[k].size() - 1); igood = good && ilst;
      @(negedge clk);
      iv = 0; ifst = 0; ilst = 0;
      if ($urandom % 3 == 0) @(negedge clk);
    end
  endtask

  task automatic expect_pkts(input int ks [$]);
    int p = 0;
    pkt_t want = {};
    foreach (ks[j]) begin
      want.push_back(8'hAA);
      foreach (sent[ks[j]][i]) want.push_back(sent[ks[j]][i]);
    end
    checks++;
    if (got.size() != want.size()) begin
      failures++; $display("FAIL got %0d bytes, want %0d", got.size(), want.size());
    end else begin
      foreach (want[i]) if (got[i] != want[i]) p++;
      if (p != 0) begin failures++; $display("FAIL %0d bytes differ", p); end
    end
    got = {};
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    send(0, 1);
    send(1, 0);
    send(2, 1);
    send(3, 1);
    @(negedge clk);
    checks++;
    if (level != 2 || committed != 2 || dropped != 2) begin
      failures++; $display("FAIL level %0d committed %0d dropped %0d", level, committed, dropped);
    end
    ordy = 1;
    repeat (60) @(negedge clk);
    expect_pkts('{0, 2});
    checks++;
    if (level != 0 || got_pkts != 2) begin failures++; $display("FAIL drained level %0d pkts %0d", level, got_pkts); end
    send(4, 1);
    repeat (30) @(negedge clk);
    expect_pkts('{4});
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
