// tb_camera_if: drives a small 32x4 camera frame (with pixels before the
// frame start that must be ignored and gaps between lines), takes pixels
// with a randomly stalling consumer, and checks every pixel's value, row,
// column and the last flag. A second frame with the consumer stopped must
// set the overflow flag and keep only the FIFO's worth of pixels.
module tb_camera_if;
  localparam int COLS = 32, ROWS = 4, DEPTH = 8;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;  // a falling edge, so asynchronous resets take effect
  always #5 clk = !clk;
  int checks = 0, failures = 0;

  logic arm = 0, vs = 0, href = 0, pv = 0, ready = 0;
  logic [7:0] d = 0;
  logic pix_valid, pix_last, capturing, overflow;
  logic [7:0] pix_data;
  logic [8:0] pix_row;
  logic [9:0] pix_col;

  camera_if #(.COLS(COLS), .ROWS(ROWS), .FIFO_DEPTH(DEPTH)) dut (
    .clk, .rst_n, .arm, .cam_vsync(vs), .cam_href(href), .cam_pix_valid(pv), .cam_data(d),
    .pix_valid, .pix_ready(ready), .pix_data, .pix_row, .pix_col, .pix_last, .capturing, .overflow
  );

  function automatic logic [7:0] pix(int r, int c);
    return 8'((r * 37 + c * 11) ^ 8'h5A);
  endfunction

  int got = 0, exp_r = 0, exp_c = 0, lasts = 0;
  bit consume = 1;
  always @(negedge clk) ready = consume && ($urandom % 10 < 7);
  always @(posedge clk) if (rst_n && pix_valid && ready) begin
    got++;
    checks++;
    if (pix_data !== pix(exp_r, exp_c) || pix_row !== 9'(exp_r) || pix_col !== 10'(exp_c) ||
        pix_last !== (exp_r == ROWS - 1 && exp_c == COLS - 1)) begin
      failures++;
      $display("FAIL pixel %0d: r%0d c%0d d%h last%0d, want r%0d c%0d d%h", got, pix_row, pix_col,
               pix_data, pix_last, exp_r, exp_c, pix(exp_r, exp_c));
    end
    if (pix_last) lasts++;
    if (exp_c == COLS - 1) begin exp_c = 0; exp_r++; end else exp_c++;
  end

  task automatic frame();
    @(negedge clk) vs = 1; @(negedge clk) vs = 0;
    repeat (3) @(negedge clk);
    for (int r = 0; r < ROWS; r++) begin
      href = 1;
      for (int c = 0; c < COLS; c++) begin
        d = pix(r, c); pv = 1; @(negedge clk); pv = 0; @(negedge clk);
      end
      href = 0;
      repeat (4) @(negedge clk);
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    // pixels while not armed are ignored
    href = 1; for (int i = 0; i < 5; i++) begin pv = 1; d = 8'hFF; @(negedge clk); end
    pv = 0; href = 0;
    arm = 1; @(negedge clk); arm = 0;
    frame();
    repeat (100) @(negedge clk);
    checks++;
    if (got != COLS * ROWS || lasts != 1 || capturing || overflow) begin
      failures++; $display("FAIL frame 1: got %0d lasts %0d cap %0d ovf %0d", got, lasts, capturing, overflow);
    end
    // overflow: consumer stopped
    consume = 0;
    arm = 1; @(negedge clk); arm = 0;
    frame();
    checks++;
    if (!overflow) begin failures++; $display("FAIL no overflow"); end
    consume = 1; got = 0; exp_r = 0; exp_c = 0;
    repeat (100) @(negedge clk);
    checks++;
    if (got != DEPTH) begin failures++; $display("FAIL kept %0d pixels", got); end
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
