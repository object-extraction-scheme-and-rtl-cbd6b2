// tb_wmsn_protocol: the image-packet sizes evaluated for the protocol (16,
// 64, 128 and 256 data bytes) through the node at its default parameters.
// For each size the camera-node side frames 12 packets of random data with
// pkt_tx; the bytes are replayed into the router side between START OF
// TRANSMISSION (size byte N-1) and END OF TRANSMISSION, with a random third
// of the packets given a flipped bit. The router (msg_rx -> pkt_queue) must
// forward exactly the intact packets, byte for byte and in order, drop the
// others, never hold more than two packets, and report the packet size and
// the transmission state. The forwarding side takes bytes with a random
// ready, slower than the line, so the queue fills up. Every packet must be
// N + 5 bytes long on the wire.
module tb_wmsn_protocol;
  import wmsn_pkg::*;
  logic lclk = 0, hclk = 0, rst_n = 1;
  initial #1 rst_n = 0;  // a falling edge, so asynchronous resets take effect
  always #40 lclk = !lclk;
  always #10 hclk = !hclk;
  int checks = 0, failures = 0;

  logic ncv = 0, ncr, nsv, ipa;
  cmd_t ncmd = '0;
  sts_t nsts;
  logic [15:0] wakes;
  logic [31:0] actc;
  logic [18:0] hra = 0, hwa = 0;
  logic hre = 0, hrack, hwe = 0, hwack;
  logic [15:0] hrd, hwd = 0;
  logic ovf;
  logic [7:0] dw, dh;
  logic signed [11:0] drd;
  logic [17:0] A;
  logic [15:0] io1_o, io1_i, io2_o, io2_i;
  logic io1_oe, io2_oe, ce1, ub1, lb1, ce2, ub2, lb2, we, oe;
  logic pst = 0, pbusy, pdone, pdv = 0, pdr, ptv, ptr = 1;
  logic [15:0] pid = 0;
  logic [8:0] plen = 16;
  logic [7:0] pd = 0, ptb;
  logic rxv = 0, mv, mok, intx, fv, fr = 0, fl;
  logic [7:0] rxb = 0, fb;
  msg_type_e mt;
  logic [15:0] mid, qc, qd;
  logic [31:0] mp;
  logic [8:0] psz;
  logic [1:0] ql;

  wmsn_top dut (
    .lclk, .hclk, .rst_n,
    .np_cmd_valid(ncv), .np_cmd_ready(ncr), .np_cmd(ncmd), .np_sts_valid(nsv), .np_sts(nsts),
    .ip_active(ipa), .wake_count(wakes), .active_cycles(actc),
    .host_rd_addr(hra), .host_rd_en(hre), .host_rd_ack(hrack), .host_rd_data(hrd),
    .host_wr_addr(hwa), .host_wr_en(hwe), .host_wr_ack(hwack), .host_wr_data(hwd),
    .cam_vsync(1'b0), .cam_href(1'b0), .cam_pix_valid(1'b0), .cam_data(8'h00), .cam_overflow(ovf),
    .dwt_rd_row(8'h00), .dwt_rd_col(8'h00), .dwt_rd_data(drd), .dwt_width(dw), .dwt_height(dh),
    .A, .IO1_o(io1_o), .IO1_i(io1_i), .IO1_oe(io1_oe), .IO2_o(io2_o), .IO2_i(io2_i), .IO2_oe(io2_oe),
    .CE1(ce1), .UB1(ub1), .LB1(lb1), .CE2(ce2), .UB2(ub2), .LB2(lb2), .WE(we), .OE(oe),
    .ptx_start(pst), .ptx_id(pid), .ptx_len(plen), .ptx_busy(pbusy), .ptx_done(pdone),
    .ptx_data_valid(pdv), .ptx_data_ready(pdr), .ptx_data(pd),
    .ptx_tx_valid(ptv), .ptx_tx_ready(ptr), .ptx_tx_byte(ptb),
    .rx_valid(rxv), .rx_byte(rxb), .msg_valid(mv), .msg_type(mt), .msg_id(mid), .msg_payload(mp),
    .msg_crc_ok(mok), .pkt_size(psz), .in_transmission(intx),
    .fwd_valid(fv), .fwd_ready(fr), .fwd_byte(fb), .fwd_last(fl),
    .queue_level(ql), .queue_committed(qc), .queue_dropped(qd));

  localparam int NPKT = 12;
  logic [7:0] wire_q [$];
  logic [7:0] fwd_q [$];
  logic       fwd_run = 0;
  int         max_level = 0;
  always @(posedge lclk) begin
    if (ptv && ptr) wire_q.push_back(ptb);
    if (fv && fr) fwd_q.push_back(fb);
    if (int'(ql) > max_level) max_level = int'(ql);
  end
  // forwarding side: ready about one cycle in three
  always @(negedge lclk) fr <= fwd_run && ($urandom % 3 == 0);

  task automatic send_rx(input logic [7:0] b);
    rxb = b; rxv = 1; @(negedge lclk); rxv = 0;
  endtask

  task automatic run_size(input int n);
    logic [7:0] pk [NPKT][$];
    logic       bad [NPKT];
    logic [7:0] expect_q [$];
    int qc0, qd0, nbad, t;
    qc0 = int'(qc); qd0 = int'(qd);
    nbad = 0;
    max_level = 0;
    // frame the packets
    for (int p = 0; p < NPKT; p++) begin
      wire_q.delete();
      @(negedge lclk);
      pid = 16'(n * 100 + p); plen = 9'(n); pst = 1; @(negedge lclk); pst = 0;
      for (int i = 0; i < n; i++) begin
        pd = 8'($urandom); pdv = 1;
        #1;
        while (!pdr) @(negedge lclk);
        @(negedge lclk);
      end
      pdv = 0;
      while (pbusy) @(negedge lclk);
      @(negedge lclk);
      checks++;
      if (wire_q.size() != n + 5) begin failures++; $display("FAIL N=%0d packet %0d is %0d bytes", n, p, wire_q.size()); end
      pk[p] = wire_q;
      bad[p] = ($urandom % 3 == 0);
      if (bad[p]) begin
        t = 2 + int'($urandom % (n + 3));         // ID, data or CRC byte
        pk[p][t] = pk[p][t] ^ (8'h01 << ($urandom % 8));
        nbad++;
      end else begin
        foreach (pk[p][i]) expect_q.push_back(pk[p][i]);
      end
    end
    // replay into the router
    fwd_q.delete();
    fwd_run = 1;
    send_rx(8'hAA); send_rx(8'h05); send_rx(8'(n - 1));
    @(negedge lclk);
    checks++;
    if (!intx || psz != 9'(n)) begin failures++; $display("FAIL N=%0d start: in_transmission %0d size %0d", n, intx, psz); end
    for (int p = 0; p < NPKT; p++) begin
      // the router may only take a packet when it has room for one (one
      // packet in flight at a time, as the protocol sends them)
      while (ql == 2'd2) @(negedge lclk);
      foreach (pk[p][i]) send_rx(pk[p][i]);
    end
    send_rx(8'hAA); send_rx(8'h06);
    @(negedge lclk);
    checks++;
    if (intx) begin failures++; $display("FAIL N=%0d still in transmission", n); end
    t = 0;
    while (fwd_q.size() < expect_q.size() && t < 20000) begin @(negedge lclk); t++; end
    repeat (20) @(negedge lclk);
    fwd_run = 0;
    checks++;
    if (int'(qc) - qc0 != NPKT - nbad || int'(qd) - qd0 != nbad) begin
      failures++; $display("FAIL N=%0d committed %0d dropped %0d, want %0d %0d", n, int'(qc) - qc0, int'(qd) - qd0, NPKT - nbad, nbad);
    end
    checks++;
    if (fwd_q != expect_q) begin
      failures++; $display("FAIL N=%0d forwarded %0d bytes, want %0d (or contents differ)", n, fwd_q.size(), expect_q.size());
    end
    checks++;
    if (max_level > 2) begin failures++; $display("FAIL N=%0d queue held %0d packets", n, max_level); end
    $display("N=%0d: %0d packets, %0d corrupted and dropped, %0d forwarded, queue peak %0d",
             n, NPKT, nbad, int'(qc) - qc0, max_level);
  endtask

  initial begin
    repeat (3) @(negedge lclk);
    rst_n = 1;
    repeat (3) @(negedge lclk);
    run_size(16);
    run_size(64);
    run_size(128);
    run_size(256);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge lclk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
