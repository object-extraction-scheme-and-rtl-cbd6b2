// tb_obj_scan: row/column scan of the Update flags.
// Case 1 is the 16x8 worked example of the object extraction scheme with
// difference threshold 3: the box must be rows 2..7 and columns 5..12
// (1-based), i.e. 1..6 and 4..11 here. Further cases are random flag maps on
// a 64x16 image, compared with a direct search for runs written here, and an
// empty map (found = 0).
module tb_obj_scan;
  localparam int COLS = 64, ROWS = 16;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;  // a falling edge, so asynchronous resets take effect
  always #5 clk = !clk;
  int checks = 0, failures = 0;

  logic start = 0, busy, done, found;
  logic [7:0] dt;
  logic [8:0] top, bottom;
  logic [9:0] left, right;
  logic [18:0] ra, wa;
  logic re, rack, wack;
  logic [15:0] rd;
  logic [17:0] A;
  logic [15:0] io1_o, io1_i, io2_o, io2_i;
  logic io1_oe, io2_oe, ce1, ub1, lb1, ce2, ub2, lb2, we, oe;

  // two instances share one RAM: the example (16x8) and the random (64x16)
  logic start16 = 0, busy16, done16, found16;
  logic [8:0] top16, bottom16;
  logic [9:0] left16, right16;
  logic [18:0] ra16, ra64;
  logic re16, re64;
  logic use16 = 0;

  obj_scan #(.COLS(16), .ROWS(8)) dut16 (.clk, .rst_n, .start(start16), .diff_thr(dt),
    .rd_addr(ra16), .rd_en(re16), .rd_ack(rack), .rd_data(rd),
    .busy(busy16), .done(done16), .found(found16), .top(top16), .bottom(bottom16), .left(left16), .right(right16));
  obj_scan #(.COLS(COLS), .ROWS(ROWS)) dut (.clk, .rst_n, .start, .diff_thr(dt),
    .rd_addr(ra64), .rd_en(re64), .rd_ack(rack), .rd_data(rd),
    .busy, .done, .found, .top, .bottom, .left, .right);
  assign ra = use16 ? ra16 : ra64;
  assign re = use16 ? re16 : re64;
  assign wa = '0;

  ext_ram_if u_if (.hclock(clk), .rst_n,
    .Write_address(wa), .Write_enable(1'b0), .Write_ack(wack), .Write_data(16'h0),
    .Read_address(ra), .Read_enable(re), .Read_ack(rack), .Read_data(rd),
    .A, .IO1_o(io1_o), .IO1_i(io1_i), .IO1_oe(io1_oe), .IO2_o(io2_o), .IO2_i(io2_i), .IO2_oe(io2_oe),
    .CE1(ce1), .UB1(ub1), .LB1(lb1), .CE2(ce2), .UB2(ub2), .LB2(lb2), .WE(we), .OE(oe));
  sram_256kx16_model ram1 (.A, .io_i(io1_o), .io_o(io1_i), .CE(ce1), .UB(ub1), .LB(lb1), .WE(we), .OE(oe));
  sram_256kx16_model ram2 (.A, .io_i(io2_o), .io_o(io2_i), .CE(ce2), .UB(ub2), .LB(lb2), .WE(we), .OE(oe));

  bit flags [ROWS][COLS];

  task automatic store(int nr, int nc);
    for (int r = 0; r < nr; r++)
      for (int w = 0; w < nc / 16; w++) begin
        logic [15:0] v;
        for (int b = 0; b < 16; b++) v[b] = flags[r][w * 16 + b];
        ram2.mem[{3'b111, 9'(r), 6'(w)}] = v;   // {1111, r, w}: bit 18 set, RAM 2
      end
  endtask

  task automatic reference(int nr, int nc, int thr, output bit f, output int t, b, l, rr);
    int fr = -1, lr = -1, fc = -1, lc = -1;
    for (int r = 0; r < nr; r++) begin
      int run = 0; bit hit = 0;
      for (int c = 0; c < nc; c++) begin
        run = flags[r][c] ? run + 1 : 0;
        if (flags[r][c] && run >= thr) hit = 1;
      end
      if (hit) begin if (fr < 0) fr = r; lr = r; end
    end
    for (int c = 0; c < nc; c++) begin
      int run = 0; bit hit = 0;
      for (int r = 0; r < nr; r++) begin
        run = flags[r][c] ? run + 1 : 0;
        if (flags[r][c] && run >= thr) hit = 1;
      end
      if (hit) begin if (fc < 0) fc = c; lc = c; end
    end
    f = (fr >= 0) && (fc >= 0);
    t = fr; b = lr; l = fc; rr = lc;
  endtask

  // the worked example, rows top to bottom, columns left to right
  string ex [8] = '{
    "0000110000000000",
    "1000011110000110",
    "0000011111110000",
    "0000111111110000",
    "0000110001110000",
    "1000111110000110",
    "0000011011100000",
    "0000000000000000"};

  initial begin
    bit f; int t, b, l, r;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // ---- worked example ----
    foreach (flags[i, j]) flags[i][j] = 0;
    for (int i = 0; i < 8; i++) for (int j = 0; j < 16; j++) flags[i][j] = (ex[i][j] == "1");
    store(8, 16);
    use16 = 1; dt = 3;
    @(negedge clk) start16 = 1; @(negedge clk) start16 = 0;
    while (!done16) @(negedge clk);
    checks++;
    if (!found16 || top16 != 1 || bottom16 != 6 || left16 != 4 || right16 != 11) begin
      failures++;
      $display("FAIL example: found %0d rows %0d..%0d cols %0d..%0d", found16, top16, bottom16, left16, right16);
    end
    use16 = 0;
    // ---- random maps ----
    for (int n = 0; n < 12; n++) begin
      foreach (flags[i, j]) flags[i][j] = 0;
      if (n != 0) begin
        // noise plus a blob
        int r0, c0;
        r0 = $urandom % 10; c0 = $urandom % 50;
        foreach (flags[i, j]) flags[i][j] = ($urandom % 100) < 12;
        for (int i = r0; i < r0 + 1 + $urandom % 6; i++)
          for (int j = c0; j < c0 + 1 + $urandom % 14; j++) flags[i][j] = ($urandom % 100) < 85;
      end
      store(ROWS, COLS);
      dt = 8'(2 + n % 3);
      reference(ROWS, COLS, dt, f, t, b, l, r);
      @(negedge clk) start = 1; @(negedge clk) start = 0;
      while (!done) @(negedge clk);
      checks++;
      if (found !== f || (f && (top != 9'(t) || bottom != 9'(b) || left != 10'(l) || right != 10'(r)))) begin
        failures++;
        $display("FAIL map %0d: found %0d %0d..%0d %0d..%0d want %0d %0d..%0d %0d..%0d",
                 n, found, top, bottom, left, right, f, t, b, l, r);
      end
    end
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
