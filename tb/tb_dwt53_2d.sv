// tb_dwt53_2d: 2-D 5/3 DWT, one to three levels, on tiles of several sizes
// (even, odd, the 2x2 minimum and the full 16x8 buffer). Each result is checked twice:
// against a forward transform computed here on separate row and column
// arrays, and by running the JPEG2000 5/3 inverse lifting on the
// coefficients, which must give back the pixels exactly (the filter is
// lossless). A flat tile must give LL = the level and zero high bands. The
// cycle count from start to done must be the sum over levels of
// 2*w_l*h_l, plus 1 (w_l, h_l halved and rounded up per level).
module tb_dwt53_2d;
  localparam int MW = 16, MH = 8;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;  // a falling edge, so asynchronous resets take effect
  always #5 clk = !clk;
  int checks = 0, failures = 0;

  logic lv = 0, start = 0, busy, done;
  logic [7:0] lr = 0, lc = 0, ld = 0, w, h, rr = 0, rc = 0;
  logic [1:0] nlev = 1;
  logic signed [11:0] rdat;

  dwt53_2d #(.MAX_W(MW), .MAX_H(MH), .CW(12)) dut (.clk, .rst_n, .load_valid(lv), .load_row(lr),
    .load_col(lc), .load_data(ld), .start, .width(w), .height(h), .levels(nlev), .busy, .done,
    .rd_row(rr), .rd_col(rc), .rd_data(rdat));

  int px [MH][MW];
  int co [MH][MW];   // read back, sub-band layout

  function automatic int fl2(int v); return (v >= 0) ? v / 2 : -((-v + 1) / 2); endfunction
  function automatic int fl4(int v); return (v >= 0) ? v / 4 : -((-v + 3) / 4); endfunction

  // 1-D forward 5/3 of x[0..n-1] -> low ceil(n/2) then high floor(n/2)
  task automatic fwd1(ref int x [MW], input int n);
    int lo [MW], hi [MW], nl, nh;
    nl = (n + 1) / 2; nh = n / 2;
    for (int k = 0; k < nh; k++) begin
      int a = x[2*k], b = (2*k + 2 < n) ? x[2*k + 2] : x[2*k];
      hi[k] = x[2*k + 1] - fl2(a + b);
    end
    for (int k = 0; k < nl; k++) begin
      int dl = (k > 0) ? hi[k - 1] : hi[0];
      int dr = (k < nh) ? hi[k] : hi[nh - 1];
      lo[k] = x[2*k] + fl4(dl + dr + 2);
    end
    for (int k = 0; k < nl; k++) x[k] = lo[k];
    for (int k = 0; k < nh; k++) x[nl + k] = hi[k];
  endtask

  task automatic inv1(ref int x [MW], input int n);
    int lo [MW], hi [MW], y [MW], nl, nh;
    nl = (n + 1) / 2; nh = n / 2;
    for (int k = 0; k < nl; k++) lo[k] = x[k];
    for (int k = 0; k < nh; k++) hi[k] = x[nl + k];
    for (int k = 0; k < nl; k++) begin
      int dl = (k > 0) ? hi[k - 1] : hi[0];
      int dr = (k < nh) ? hi[k] : hi[nh - 1];
      y[2*k] = lo[k] - fl4(dl + dr + 2);
    end
    for (int k = 0; k < nh; k++) begin
      int a = y[2*k], b = (2*k + 2 < n) ? y[2*k + 2] : y[2*k];
      y[2*k + 1] = hi[k] + fl2(a + b);
    end
    for (int k = 0; k < n; k++) x[k] = y[k];
  endtask

  task automatic run(input int W, input int H, input int kind, input int L = 1);
    int ref2 [MH][MW];
    int v [MW];
    int cyc, ecyc, ww, hh;
    int sw [4], sh [4];
    for (int r = 0; r < H; r++) for (int c = 0; c < W; c++)
      px[r][c] = (kind == 0) ? 77 : (kind == 1) ? int'($urandom % 256) : ((r * 40 + c * 17) % 256);
    for (int r = 0; r < H; r++) for (int c = 0; c < W; c++) begin
      lr = 8'(r); lc = 8'(c); ld = 8'(px[r][c]); lv = 1; @(negedge clk);
    end
    lv = 0;
    w = 8'(W); h = 8'(H); nlev = 2'(L); start = 1; @(negedge clk); start = 0;
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    checks++;
    // one lifting step per cycle: len steps per line, w*h per pass, two passes
    sw[0] = W; sh[0] = H;
    for (int l = 1; l < 4; l++) begin sw[l] = (sw[l-1] + 1) / 2; sh[l] = (sh[l-1] + 1) / 2; end
    ecyc = 1;
    for (int l = 0; l < L; l++) ecyc += 2 * sw[l] * sh[l];
    if (cyc != ecyc) begin
      failures++; $display("FAIL cycles %0d for %0dx%0d", cyc, W, H);
    end
    // reference forward transform: level l works on the top-left LL region
    for (int r = 0; r < H; r++) for (int c = 0; c < W; c++) ref2[r][c] = px[r][c];
    for (int l = 0; l < L; l++) begin
      ww = sw[l]; hh = sh[l];
      for (int r = 0; r < hh; r++) begin
        for (int c = 0; c < ww; c++) v[c] = ref2[r][c];
        fwd1(v, ww);
        for (int c = 0; c < ww; c++) ref2[r][c] = v[c];
      end
      for (int c = 0; c < ww; c++) begin
        for (int r = 0; r < hh; r++) v[r] = ref2[r][c];
        fwd1(v, hh);
        for (int r = 0; r < hh; r++) ref2[r][c] = v[r];
      end
    end
    for (int r = 0; r < H; r++) for (int c = 0; c < W; c++) begin
      rr = 8'(r); rc = 8'(c); #1;
      co[r][c] = int'(rdat);
      checks++;
      if (co[r][c] != ref2[r][c]) begin
        failures++;
        if (failures < 10) $display("FAIL %0dx%0d coef (%0d,%0d) = %0d want %0d", W, H, r, c, co[r][c], ref2[r][c]);
      end
    end
    if (kind == 0) begin
      checks++;
      if (co[0][0] != 77 || co[H - 1][W - 1] != 0) begin failures++; $display("FAIL flat tile"); end
    end
    // inverse, coarsest level first: columns then rows
    for (int l = L - 1; l >= 0; l--) begin
      ww = sw[l]; hh = sh[l];
      for (int c = 0; c < ww; c++) begin
        for (int r = 0; r < hh; r++) v[r] = co[r][c];
        inv1(v, hh);
        for (int r = 0; r < hh; r++) co[r][c] = v[r];
      end
      for (int r = 0; r < hh; r++) begin
        for (int c = 0; c < ww; c++) v[c] = co[r][c];
        inv1(v, ww);
        for (int c = 0; c < ww; c++) co[r][c] = v[c];
      end
    end
    for (int r = 0; r < H; r++) for (int c = 0; c < W; c++) begin
      checks++;
      if (co[r][c] != px[r][c]) begin
        failures++;
        if (failures < 10) $display("FAIL %0dx%0d reconstruct (%0d,%0d) = %0d want %0d", W, H, r, c, co[r][c], px[r][c]);
      end
    end
    @(negedge clk);
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    run(16, 8, 0);
    run(16, 8, 1);
    run(13, 7, 1);
    run(2, 2, 1);
    run(5, 3, 2);
    run(16, 5, 1);
    run(16, 8, 1, 2);
    run(16, 8, 2, 3);
    run(13, 7, 1, 3);
    run(11, 6, 1, 2);
    run(16, 8, 0, 3);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
