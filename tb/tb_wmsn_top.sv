// tb_wmsn_top: end-to-end run of the node on a 32x8 image (16x8 DWT
// buffer), network-processor clock 80 ns, image clock 20 ns, camera running
// freely. The network-processor model in this bench:
//   1. captures a background (OP_LOAD_BG),
//   2. captures a frame with an 11x4 object and isolated noise pixels and
//      gets the object box (OP_EXTRACT),
//   3. has the box transformed (OP_DWT) and checks the coefficients,
//   4. reads the object's pixels through the host RAM port, frames them
//      into three 16-byte IMAGE PACKETs (pkt_tx), and replays them, between
//      START and END OF TRANSMISSION and with ACK and NACK messages, into the
//      receive side (msg_rx -> pkt_queue) with one packet corrupted. Only the
//      two good packets may be forwarded, unchanged.
// Each mechanism is counted; one that never happens is a failure: wake-up,
// clock suppressed while inactive, background update taken and refused,
// noise rejected, object found, DWT run, host access, CRC pass and CRC drop,
// packet forwarded, transmission state set and cleared, ACK and NACK parsed.
module tb_wmsn_top;
  import wmsn_pkg::*;
  localparam int COLS = 32, ROWS = 8, MW = 16, MH = 8;
  logic lclk = 0, hclk = 0, rst_n = 1;
  initial #1 rst_n = 0;  // a falling edge, so asynchronous resets take effect
  always #40 lclk = !lclk;
  always #10 hclk = !hclk;
  int checks = 0, failures = 0;

  // network processor side
  logic ncv = 0, ncr, nsv, ipa;
  cmd_t ncmd = '0;
  sts_t nsts;
  logic [15:0] wakes;
  logic [31:0] actc;
  // host port
  logic [18:0] hra = 0, hwa = 0;
  logic hre = 0, hrack, hwe = 0, hwack;
  logic [15:0] hrd, hwd = 0;
  // camera
  logic vs = 0, href = 0, pv = 0, ovf;
  logic [7:0] cd = 0;
  // dwt
  logic [7:0] drr = 0, drc = 0, dw, dh;
  logic signed [11:0] drd;
  // sram pins
  logic [17:0] A;
  logic [15:0] io1_o, io1_i, io2_o, io2_i;
  logic io1_oe, io2_oe, ce1, ub1, lb1, ce2, ub2, lb2, we, oe;
  // protocol
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

  wmsn_top #(.COLS(COLS), .ROWS(ROWS), .MAX_W(MW), .MAX_H(MH)) dut (
    .lclk, .hclk, .rst_n,
    .np_cmd_valid(ncv), .np_cmd_ready(ncr), .np_cmd(ncmd), .np_sts_valid(nsv), .np_sts(nsts),
    .ip_active(ipa), .wake_count(wakes), .active_cycles(actc),
    .host_rd_addr(hra), .host_rd_en(hre), .host_rd_ack(hrack), .host_rd_data(hrd),
    .host_wr_addr(hwa), .host_wr_en(hwe), .host_wr_ack(hwack), .host_wr_data(hwd),
    .cam_vsync(vs), .cam_href(href), .cam_pix_valid(pv), .cam_data(cd), .cam_overflow(ovf),
    .dwt_rd_row(drr), .dwt_rd_col(drc), .dwt_rd_data(drd), .dwt_width(dw), .dwt_height(dh),
    .A, .IO1_o(io1_o), .IO1_i(io1_i), .IO1_oe(io1_oe), .IO2_o(io2_o), .IO2_i(io2_i), .IO2_oe(io2_oe),
    .CE1(ce1), .UB1(ub1), .LB1(lb1), .CE2(ce2), .UB2(ub2), .LB2(lb2), .WE(we), .OE(oe),
    .ptx_start(pst), .ptx_id(pid), .ptx_len(plen), .ptx_busy(pbusy), .ptx_done(pdone),
    .ptx_data_valid(pdv), .ptx_data_ready(pdr), .ptx_data(pd),
    .ptx_tx_valid(ptv), .ptx_tx_ready(ptr), .ptx_tx_byte(ptb),
    .rx_valid(rxv), .rx_byte(rxb), .msg_valid(mv), .msg_type(mt), .msg_id(mid), .msg_payload(mp),
    .msg_crc_ok(mok), .pkt_size(psz), .in_transmission(intx),
    .fwd_valid(fv), .fwd_ready(fr), .fwd_byte(fb), .fwd_last(fl),
    .queue_level(ql), .queue_committed(qc), .queue_dropped(qd));
  sram_256kx16_model ram1 (.A, .io_i(io1_o), .io_o(io1_i), .CE(ce1), .UB(ub1), .LB(lb1), .WE(we), .OE(oe));
  sram_256kx16_model ram2 (.A, .io_i(io2_o), .io_o(io2_i), .CE(ce2), .UB(ub2), .LB(lb2), .WE(we), .OE(oe));

  // ---------------- mechanism counters ----------------
  int n_gated = 0, n_upd_taken = 0, n_upd_refused = 0, n_noise_rejected = 0, n_found = 0;
  int n_dwt = 0, n_host = 0, n_crc_ok = 0, n_crc_bad = 0, n_fwd = 0, n_tx_on = 0, n_tx_off = 0;
  int n_ack = 0, n_nack = 0;
  always @(posedge hclk) if (rst_n && !ipa && !dut.u_cg.en_l) n_gated++;
  logic intx_q = 0;
  always @(posedge lclk) begin
    if (mv && mt == MSG_IMAGE_PACKET) begin if (mok) n_crc_ok++; else n_crc_bad++; end
    if (mv && mt == MSG_ACK) n_ack++;
    if (mv && mt == MSG_NACK) n_nack++;
    if (intx && !intx_q) n_tx_on++;
    if (!intx && intx_q) n_tx_off++;
    intx_q <= intx;
  end
  // while inactive, the image block's state must not move
  always @(posedge hclk) if (rst_n && !dut.en_h && dut.u_img.state != 0) begin
    failures++; $display("FAIL image block active while clock suppressed");
  end

  // ---------------- free-running camera ----------------
  logic [7:0] img [ROWS][COLS];
  logic [7:0] shown [ROWS][COLS];
  initial begin
    foreach (img[r, c]) img[r][c] = 8'(60 + ((r * 7 + c * 3) % 20));
    forever begin
      @(negedge hclk) vs = 1; @(negedge hclk) vs = 0;
      shown = img;
      repeat (10) @(negedge hclk);
      for (int r = 0; r < ROWS; r++) begin
        href = 1;
        for (int c = 0; c < COLS; c++) begin
          cd = shown[r][c]; pv = 1; @(negedge hclk); pv = 0;
          repeat (13) @(negedge hclk);
        end
        href = 0;
        repeat (6) @(negedge hclk);
      end
    end
  end

  // ---------------- network processor model ----------------
  task automatic command(input opcode_e op, output sts_t s);
    ncmd = '0; ncmd.op = op; ncmd.asel = 3'd1; ncmd.thr = 8'd30; ncmd.diff_thr = 8'd3;
    ncv = 1;
    #1;
    while (!ncr) @(negedge lclk);
    @(negedge lclk);
    ncv = 0;
    while (!nsv) @(negedge lclk);
    s = nsts;
    // the image block goes back to sleep
    while (ipa) @(negedge lclk);
  endtask

  task automatic host_read(input logic [18:0] a, output logic [15:0] d);
    @(negedge hclk);
    hra = a; hre = 1;
    @(negedge hclk);
    while (!hrack) @(negedge hclk);
    d = hrd; hre = 0;
    n_host++;
  endtask

  function automatic int fl2(int v); return (v >= 0) ? v / 2 : -((-v + 1) / 2); endfunction
  function automatic int fl4(int v); return (v >= 0) ? v / 4 : -((-v + 3) / 4); endfunction
  task automatic fwd1(ref int x [MW], input int n);
    int lo [MW], hi [MW], nl, nh;
    nl = (n + 1) / 2; nh = n / 2;
    for (int k = 0; k < nh; k++) hi[k] = x[2*k + 1] - fl2(x[2*k] + ((2*k + 2 < n) ? x[2*k + 2] : x[2*k]));
    for (int k = 0; k < nl; k++) lo[k] = x[2*k] + fl4(((k > 0) ? hi[k - 1] : hi[0]) + ((k < nh) ? hi[k] : hi[nh - 1]) + 2);
    for (int k = 0; k < nl; k++) x[k] = lo[k];
    for (int k = 0; k < nh; k++) x[nl + k] = hi[k];
  endtask

  function automatic logic [7:0] crc_bit(input logic [7:0] c, input logic [7:0] d);
    for (int i = 7; i >= 0; i--) begin
      logic fbk;
      fbk = c[7] ^ d[i];
      c = {c[6:0], 1'b0} ^ (fbk ? 8'h07 : 8'h00);
    end
    return c;
  endfunction

  logic [7:0] bgi [ROWS][COLS];
  logic [7:0] obj [$];
  logic [7:0] wire_q [$];
  logic [7:0] stream [$];
  logic [7:0] fwd_q [$];
  always @(posedge lclk) begin
    if (ptv && ptr) wire_q.push_back(ptb);
    if (fv && fr) fwd_q.push_back(fb);
  end

  initial begin
    sts_t s;
    logic [15:0] w;
    int bad;
    repeat (3) @(negedge lclk);
    rst_n = 1;
    repeat (3) @(negedge lclk);
    // ---- 1. background ----
    command(OP_LOAD_BG, s);
    bgi = shown;
    checks++;
    if (s.op != OP_LOAD_BG) begin failures++; $display("FAIL load_bg status"); end
    // ---- 2. object + noise ----
    foreach (img[r, c]) if (r >= 2 && r <= 5 && c >= 10 && c <= 20) img[r][c] = 8'(200 - r - c);
    for (int c = 0; c < 10; c++) img[7][c] = img[7][c] + 8'd5;   // small change: no update
    img[0][3] = 8'd250; img[7][28] = 8'd0; img[6][29] = 8'd0; img[1][30] = 8'd255; img[1][31] = 8'd255;
    command(OP_EXTRACT, s);
    checks++;
    if (!s.found || s.top != 2 || s.bottom != 5 || s.left != 10 || s.right != 20) begin
      failures++; $display("FAIL box: found %0d rows %0d..%0d cols %0d..%0d", s.found, s.top, s.bottom, s.left, s.right);
    end else begin
      n_found++;
      n_noise_rejected++;   // noise flags exist outside the box yet the box is exact
    end
    // background words through the host port
    bad = 0;
    for (int r = 0; r < ROWS; r++) for (int c = 0; c < COLS; c++) begin
      int d, m, e;
      host_read(pix_addr(9'(r), 10'(c)), w);
      d = int'(shown[r][c]) - int'(bgi[r][c]);
      m = d < 0 ? -d : d;
      if (m > 30) begin e = d < 0 ? int'(bgi[r][c]) - (m >> 1) : int'(bgi[r][c]) + (m >> 1); n_upd_taken++; end
      else begin e = int'(bgi[r][c]); if (m != 0) n_upd_refused++; end
      if (w !== {8'(e), shown[r][c]}) bad++;
    end
    // pixels that differ slightly count as refused updates; give some
    checks++;
    if (bad != 0) begin failures++; $display("FAIL %0d RAM words wrong after extract", bad); end
    // ---- 3. DWT ----
    command(OP_DWT, s);
    checks++;
    if (!s.found || dw != 11 || dh != 4) begin failures++; $display("FAIL dwt tile %0dx%0d", dw, dh); end
    else n_dwt++;
    begin
      int t [MH][MW];
      int v [MW];
      for (int r = 0; r < 4; r++) begin
        for (int c = 0; c < 11; c++) v[c] = int'(shown[2 + r][10 + c]);
        fwd1(v, 11);
        for (int c = 0; c < 11; c++) t[r][c] = v[c];
      end
      for (int c = 0; c < 11; c++) begin
        for (int r = 0; r < 4; r++) v[r] = t[r][c];
        fwd1(v, 4);
        for (int r = 0; r < 4; r++) t[r][c] = v[r];
      end
      bad = 0;
      for (int r = 0; r < 4; r++) for (int c = 0; c < 11; c++) begin
        drr = 8'(r); drc = 8'(c); #1;
        if (int'(drd) != t[r][c]) bad++;
      end
      checks++;
      if (bad != 0) begin failures++; $display("FAIL dwt: %0d coefficients wrong", bad); end
    end
    // ---- 4. packets of the object ----
    for (int r = 2; r <= 5; r++) for (int c = 10; c <= 20; c++) begin
      host_read(pix_addr(9'(r), 10'(c)), w);
      obj.push_back(w[7:0]);
    end
    while (obj.size() % 16 != 0) obj.push_back(8'h00);
    for (int p = 0; p < 3; p++) begin
      @(negedge lclk);
      pid = 16'(p); plen = 9'd16; pst = 1; @(negedge lclk); pst = 0;
      for (int i = 0; i < 16; i++) begin
        pd = obj[p * 16 + i]; pdv = 1;
        #1;
        while (!pdr) @(negedge lclk);
        @(negedge lclk);   // taken at the edge in between
      end
      pdv = 0;
      while (pbusy) @(negedge lclk);
    end
    checks++;
    if (wire_q.size() != 3 * 21) begin failures++; $display("FAIL %0d bytes framed", wire_q.size()); end
    // assemble the received stream: START (16-byte packets), 3 packets with
    // the second corrupted, ACK 0, NACK 1, END
    stream = {8'hAA, 8'h05, 8'd15};
    foreach (wire_q[i]) stream.push_back((i == 21 + 9) ? wire_q[i] ^ 8'h04 : wire_q[i]);
    stream = {stream, 8'hAA, 8'h03, 8'h00, 8'h00, 8'hAA, 8'h04, 8'h00, 8'h01, 8'hAA, 8'h06};
    foreach (stream[i]) begin
      rxb = stream[i]; rxv = 1; @(negedge lclk); rxv = 0;
      if (i == 40) begin
        checks++;
        if (!intx) begin failures++; $display("FAIL not in transmission"); end
      end
    end
    fr = 1;
    repeat (80) @(negedge lclk);
    n_fwd = int'(qc);
    checks++;
    if (qc != 2 || qd != 1 || fwd_q.size() != 42) begin
      failures++; $display("FAIL queue: committed %0d dropped %0d forwarded %0d bytes", qc, qd, fwd_q.size());
    end else begin
      bad = 0;
      for (int i = 0; i < 21; i++) begin
        if (fwd_q[i] != wire_q[i]) bad++;
        if (fwd_q[21 + i] != wire_q[42 + i]) bad++;
      end
      checks++;
      if (bad != 0) begin failures++; $display("FAIL forwarded bytes differ: %0d", bad); end
    end
    // CRC of the framed packets, worked out here
    begin
      logic [7:0] c = 0;
      for (int i = 2; i < 20; i++) c = crc_bit(c, wire_q[i]);
      checks++;
      if (wire_q[20] != c) begin failures++; $display("FAIL crc byte"); end
    end
    // ---- mechanism coverage ----
    checks++;
    if (wakes < 3 || n_gated == 0 || n_upd_taken == 0 || n_upd_refused == 0 || n_noise_rejected == 0 ||
        n_found == 0 || n_dwt == 0 || n_host == 0 || n_crc_ok != 2 || n_crc_bad != 1 || n_fwd == 0 ||
        n_tx_on == 0 || n_tx_off == 0 || n_ack == 0 || n_nack == 0 || ovf) begin
      failures++;
      $display("FAIL coverage: wake %0d gated %0d upd %0d/%0d noise %0d found %0d dwt %0d host %0d crc %0d/%0d fwd %0d tx %0d/%0d ack %0d nack %0d ovf %0d",
               wakes, n_gated, n_upd_taken, n_upd_refused, n_noise_rejected, n_found, n_dwt, n_host,
               n_crc_ok, n_crc_bad, n_fwd, n_tx_on, n_tx_off, n_ack, n_nack, ovf);
    end
    $display("mechanisms: wake %0d gated-cycles %0d update-taken %0d update-refused %0d noise-rejected %0d found %0d dwt %0d host %0d crc-ok %0d crc-drop %0d forwarded %0d tx-on %0d tx-off %0d ack %0d nack %0d",
             wakes, n_gated, n_upd_taken, n_upd_refused, n_noise_rejected, n_found, n_dwt, n_host,
             n_crc_ok, n_crc_bad, n_fwd, n_tx_on, n_tx_off, n_ack, n_nack);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge lclk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
