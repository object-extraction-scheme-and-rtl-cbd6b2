// tb_img_proc: the image processing block on a 32x8 image with a 16x8 DWT
// buffer, against the RAM interface and two behavioural SRAMs.
//   1. OP_LOAD_BG captures a background frame; RAM must hold B = F = frame.
//   2. OP_EXTRACT captures a frame holding a bright 11x4 object plus isolated
//      noise pixels; the status must give the object's box (noise rejected by
//      the run threshold 3), the background must move toward the frame by
//      1/2^asel only where Update is set.
//   3. OP_DWT transforms the box; the coefficients are compared with a 5/3
//      transform computed here from the frame.
//   4. The host port writes and reads a RAM word while the block is idle.
module tb_img_proc;
  import wmsn_pkg::*;
  localparam int COLS = 32, ROWS = 8, MW = 16, MH = 8;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;  // a falling edge, so asynchronous resets take effect
  always #5 clk = !clk;
  int checks = 0, failures = 0;

  logic cv = 0, cr, sv, sr = 0;
  cmd_t cmd = '0;
  sts_t sts;
  logic vs = 0, href = 0, pv = 0, ovf;
  logic [7:0] cd = 0;
  logic [18:0] ra, wa, hra = 0, hwa = 0, updc;
  logic re, rack, we_, wack, hre = 0, hrack, hwe = 0, hwack, busy;
  logic [15:0] rd, wd, hwd = 0;
  logic [7:0] drr = 0, drc = 0, dw, dh;
  logic signed [11:0] drd;
  logic [17:0] A;
  logic [15:0] io1_o, io1_i, io2_o, io2_i;
  logic io1_oe, io2_oe, ce1, ub1, lb1, ce2, ub2, lb2, we, oe;

  img_proc #(.COLS(COLS), .ROWS(ROWS), .MAX_W(MW), .MAX_H(MH)) dut (.clk, .rst_n,
    .cmd_valid(cv), .cmd_ready(cr), .cmd, .sts_valid(sv), .sts_ready(sr), .sts,
    .cam_vsync(vs), .cam_href(href), .cam_pix_valid(pv), .cam_data(cd), .cam_overflow(ovf),
    .ram_rd_addr(ra), .ram_rd_en(re), .ram_rd_ack(rack), .ram_rd_data(rd),
    .ram_wr_addr(wa), .ram_wr_en(we_), .ram_wr_ack(wack), .ram_wr_data(wd),
    .host_rd_addr(hra), .host_rd_en(hre), .host_rd_ack(hrack),
    .host_wr_addr(hwa), .host_wr_en(hwe), .host_wr_ack(hwack), .host_wr_data(hwd),
    .dwt_rd_row(drr), .dwt_rd_col(drc), .dwt_rd_data(drd), .dwt_width(dw), .dwt_height(dh),
    .busy, .upd_count(updc));
  ext_ram_if u_if (.hclock(clk), .rst_n,
    .Write_address(wa), .Write_enable(we_), .Write_ack(wack), .Write_data(wd),
    .Read_address(ra), .Read_enable(re), .Read_ack(rack), .Read_data(rd),
    .A, .IO1_o(io1_o), .IO1_i(io1_i), .IO1_oe(io1_oe), .IO2_o(io2_o), .IO2_i(io2_i), .IO2_oe(io2_oe),
    .CE1(ce1), .UB1(ub1), .LB1(lb1), .CE2(ce2), .UB2(ub2), .LB2(lb2), .WE(we), .OE(oe));
  sram_256kx16_model ram1 (.A, .io_i(io1_o), .io_o(io1_i), .CE(ce1), .UB(ub1), .LB(lb1), .WE(we), .OE(oe));
  sram_256kx16_model ram2 (.A, .io_i(io2_o), .io_o(io2_i), .CE(ce2), .UB(ub2), .LB(lb2), .WE(we), .OE(oe));

  function automatic logic [15:0] mem_rd(logic [18:0] a);
    return a[18] ? ram2.mem[a[17:0]] : ram1.mem[a[17:0]];
  endfunction

  logic [7:0] img [ROWS][COLS];
  logic [7:0] bgi [ROWS][COLS];

  task automatic frame();
    @(negedge clk) vs = 1; @(negedge clk) vs = 0;
    repeat (4) @(negedge clk);
    for (int r = 0; r < ROWS; r++) begin
      href = 1;
      for (int c = 0; c < COLS; c++) begin
        cd = img[r][c]; pv = 1; @(negedge clk); pv = 0;
        repeat (13) @(negedge clk);
      end
      href = 0;
      repeat (5) @(negedge clk);
    end
  endtask

  task automatic command(input opcode_e op, output sts_t s);
    cmd = '0; cmd.op = op; cmd.asel = 3'd2; cmd.thr = 8'd30; cmd.diff_thr = 8'd3;
    cv = 1;
    #1;
    while (!cr) @(negedge clk);
    @(negedge clk);
    cv = 0;
    if (op != OP_DWT) frame();
    sr = 1;
    while (!sv) @(negedge clk);
    s = sts;
    @(negedge clk);
    sr = 0;
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

  initial begin
    sts_t s;
    int bad;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // ---- background ----
    foreach (img[r, c]) img[r][c] = 8'(60 + ((r * 7 + c * 3) % 20));
    command(OP_LOAD_BG, s);
    bad = 0;
    foreach (img[r, c]) if (mem_rd(pix_addr(9'(r), 10'(c))) !== {img[r][c], img[r][c]}) bad++;
    checks++;
    if (bad != 0 || s.op != OP_LOAD_BG) begin failures++; $display("FAIL load_bg: %0d words wrong", bad); end
    foreach (img[r, c]) bgi[r][c] = img[r][c];
    // ---- extract: object rows 2..5, cols 10..20, noise ----
    foreach (img[r, c]) if (r >= 2 && r <= 5 && c >= 10 && c <= 20) img[r][c] = 8'(200 - r - c);
    img[0][3] = 8'd250; img[7][28] = 8'd0; img[6][29] = 8'd0; img[1][30] = 8'd255; img[1][31] = 8'd255;
    command(OP_EXTRACT, s);
    checks++;
    if (!s.found || s.top != 2 || s.bottom != 5 || s.left != 10 || s.right != 20 || s.op != OP_EXTRACT) begin
      failures++; $display("FAIL box: found %0d rows %0d..%0d cols %0d..%0d", s.found, s.top, s.bottom, s.left, s.right);
    end
    bad = 0;
    foreach (img[r, c]) begin
      int d, m, e;
      d = int'(img[r][c]) - int'(bgi[r][c]);
      m = d < 0 ? -d : d;
      e = (m > 30) ? (d < 0 ? int'(bgi[r][c]) - (m >> 2) : int'(bgi[r][c]) + (m >> 2)) : int'(bgi[r][c]);
      if (mem_rd(pix_addr(9'(r), 10'(c))) !== {8'(e), img[r][c]}) bad++;
    end
    checks++;
    if (bad != 0 || ovf) begin failures++; $display("FAIL background update: %0d words wrong, overflow %0d", bad, ovf); end
    checks++;
    if (updc != 19'(44 + 5)) begin failures++; $display("FAIL update count %0d", updc); end
    // ---- DWT of the box ----
    command(OP_DWT, s);
    checks++;
    if (!s.found || dw != 11 || dh != 4) begin failures++; $display("FAIL dwt tile %0dx%0d", dw, dh); end
    begin
      int t [MH][MW];
      int v [MW];
      for (int r = 0; r < 4; r++) begin
        for (int c = 0; c < 11; c++) v[c] = int'(img[2 + r][10 + c]);
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
    // ---- host access while idle ----
    @(negedge clk);
    hwa = 19'h12345; hwd = 16'hC0DE; hwe = 1;
    while (!hwack) @(negedge clk);
    hwe = 0;
    @(negedge clk);
    hra = 19'h12345; hre = 1;
    while (!hrack) @(negedge clk);
    checks++;
    if (rd !== 16'hC0DE) begin failures++; $display("FAIL host read %h", rd); end
    hre = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
