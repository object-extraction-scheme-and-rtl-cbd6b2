// tb_wmsn_full: the node at its default size (640x480 camera frames,
// 160x100 DWT tile limit, 512Kx16 external RAM as two 256Kx16 devices),
// with no parameter overridden. The network-processor model
//   1. captures a background frame (OP_LOAD_BG),
//   2. captures a frame holding a 160x80 object and isolated noise pixels
//      and checks the reported box (OP_EXTRACT),
//   3. checks a sample of RAM words {background, frame} through the host
//      port against the running-average rule worked out here,
//   4. has the box transformed with three DWT levels (OP_DWT) and checks
//      every coefficient against a 5/3 lifting reference computed here.
// The camera sends a frame only while a capture command is in progress, one
// pixel every 8 image-clock cycles (640x480x8 = 2,457,600 cycles a frame,
// the processing rate reported for the original at 50 MHz); the camera FIFO
// must never overflow at that rate. The image-clock cycles each command
// keeps the block awake are printed. Image clock 20 ns, network clock 80 ns.
module tb_wmsn_full;
  import wmsn_pkg::*;
  localparam int COLS = 640, ROWS = 480, MW = 160, MH = 100;
  localparam int OT = 200, OB = 279, OL = 300, OR = 459;   // object box
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
  logic vs = 0, href = 0, pv = 0, ovf;
  logic [7:0] cd = 0;
  logic [7:0] drr = 0, drc = 0, dw, dh;
  logic signed [11:0] drd;
  logic [17:0] A;
  logic [15:0] io1_o, io1_i, io2_o, io2_i;
  logic io1_oe, io2_oe, ce1, ub1, lb1, ce2, ub2, lb2, we, oe;
  logic pst = 0, pbusy, pdone, pdv = 0, pdr, ptv, ptr = 1;
  logic [15:0] pid = 0;
  logic [8:0] plen = 16;
  logic [7:0] pd = 0, ptb;
  logic rxv = 0, mv, mok, intx, fv, fr = 1, fl;
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

  // ---------------- camera: one frame per request ----------------
  logic [7:0] img [ROWS][COLS];
  logic cam_go = 0, cam_busy = 0;
  initial begin
    forever begin
      @(negedge hclk);
      if (cam_go) begin
        cam_busy = 1; cam_go = 0;
        vs = 1; @(negedge hclk); vs = 0;
        repeat (10) @(negedge hclk);
        for (int r = 0; r < ROWS; r++) begin
          href = 1;
          for (int c = 0; c < COLS; c++) begin
            cd = img[r][c]; pv = 1; @(negedge hclk); pv = 0;
            repeat (7) @(negedge hclk);
          end
          href = 0;
          repeat (4) @(negedge hclk);
        end
        cam_busy = 0;
      end
    end
  end

  task automatic command(input opcode_e op, input logic frame, output sts_t s);
    ncmd = '0; ncmd.op = op; ncmd.asel = 3'd1; ncmd.thr = 8'd30; ncmd.diff_thr = 8'd3; ncmd.levels = 2'd3;
    ncv = 1;
    #1;
    while (!ncr) @(negedge lclk);
    @(negedge lclk);
    ncv = 0;
    if (frame) begin
      // the camera interface arms on the command; start the frame after that
      repeat (20) @(negedge lclk);
      cam_go = 1;
    end
    while (!nsv) @(negedge lclk);
    s = nsts;
    while (ipa) @(negedge lclk);
  endtask

  task automatic host_read(input logic [18:0] a, output logic [15:0] d);
    @(negedge hclk);
    hra = a; hre = 1;
    @(negedge hclk);
    while (!hrack) @(negedge hclk);
    d = hrd; hre = 0;
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

  logic [7:0] bgi [ROWS][COLS];
  int t [MH][MW];
  int hcyc = 0;
  always @(posedge hclk) if (dut.en_h) hcyc++;

  initial begin
    sts_t s;
    logic [15:0] w;
    int bad, n, h, wd;
    foreach (img[r, c]) img[r][c] = 8'(60 + ((r * 7 + c * 3) % 20));
    repeat (3) @(negedge lclk);
    rst_n = 1;
    repeat (3) @(negedge lclk);
    // ---- 1. background ----
    command(OP_LOAD_BG, 1'b1, s);
    bgi = img;
    checks++;
    if (s.op != OP_LOAD_BG || ovf) begin failures++; $display("FAIL load_bg status / overflow"); end
    $display("background captured: %0d image-clock cycles awake", hcyc);
    hcyc = 0;
    // ---- 2. object and noise ----
    foreach (img[r, c]) if (r >= OT && r <= OB && c >= OL && c <= OR) img[r][c] = 8'(150 + ((r * 5 + c * 11) % 100));
    img[10][10] = 8'd250; img[479][639] = 8'd0; img[100][600] = 8'd255; img[101][601] = 8'd255;
    img[400][20] = 8'd0; img[402][20] = 8'd0;
    command(OP_EXTRACT, 1'b1, s);
    checks++;
    if (!s.found || s.top != OT || s.bottom != OB || s.left != OL || s.right != OR || ovf) begin
      failures++; $display("FAIL box: found %0d rows %0d..%0d cols %0d..%0d ovf %0d", s.found, s.top, s.bottom, s.left, s.right, ovf);
    end
    $display("object extracted: rows %0d..%0d cols %0d..%0d, %0d image-clock cycles awake", s.top, s.bottom, s.left, s.right, hcyc);
    // ---- 3. sampled RAM words ----
    bad = 0; n = 0;
    for (int r = 0; r < ROWS; r += 7) for (int c = (r % 13); c < COLS; c += 13) begin
      int d, m, e;
      host_read(pix_addr(9'(r), 10'(c)), w);
      d = int'(img[r][c]) - int'(bgi[r][c]);
      m = d < 0 ? -d : d;
      if (m > 30) e = d < 0 ? int'(bgi[r][c]) - (m >> 1) : int'(bgi[r][c]) + (m >> 1);
      else        e = int'(bgi[r][c]);
      if (w !== {8'(e), img[r][c]}) bad++;
      n++;
    end
    checks++;
    if (bad != 0) begin failures++; $display("FAIL %0d of %0d sampled RAM words wrong", bad, n); end
    // ---- 4. DWT of the box ----
    hcyc = 0;
    command(OP_DWT, 1'b0, s);
    $display("3-level DWT of the box: %0d image-clock cycles awake", hcyc);
    h = OB - OT + 1; wd = OR - OL + 1;
    checks++;
    if (!s.found || dw != 8'(wd) || dh != 8'(h)) begin failures++; $display("FAIL dwt tile %0dx%0d", dw, dh); end
    begin
      int v [MW];
      int lw, lh;
      for (int r = 0; r < h; r++) for (int c = 0; c < wd; c++) t[r][c] = int'(img[OT + r][OL + c]);
      lw = wd; lh = h;
      for (int l = 0; l < 3; l++) begin   // each level on the LL region of the last
        for (int r = 0; r < lh; r++) begin
          for (int c = 0; c < lw; c++) v[c] = t[r][c];
          fwd1(v, lw);
          for (int c = 0; c < lw; c++) t[r][c] = v[c];
        end
        for (int c = 0; c < lw; c++) begin
          for (int r = 0; r < lh; r++) v[r] = t[r][c];
          fwd1(v, lh);
          for (int r = 0; r < lh; r++) t[r][c] = v[r];
        end
        lw = (lw + 1) / 2; lh = (lh + 1) / 2;
      end
    end
    bad = 0;
    for (int r = 0; r < h; r++) for (int c = 0; c < wd; c++) begin
      drr = 8'(r); drc = 8'(c); #1;
      if (int'(drd) != t[r][c]) bad++;
    end
    checks++;
    if (bad != 0) begin failures++; $display("FAIL dwt: %0d coefficients wrong", bad); end
    $display("dwt done at %0t, wakes %0d, active network-clock cycles %0d", $time, wakes, actc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000000) @(posedge lclk);
    failures++;
    $display("watchdog expired: img state %0d cam_busy %0d ipa %0d wakes %0d ncr %0d nsv %0d", dut.u_img.state, cam_busy, ipa, wakes, ncr, nsv);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
