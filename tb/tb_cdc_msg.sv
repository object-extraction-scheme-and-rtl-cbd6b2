// tb_cdc_msg: commands from a slow clock (37 ns) to a fast one (10 ns) and
// status words back, with a randomly slow receiver on the fast side and the
// release input toggled. Every word must arrive once, unchanged and in
// order; no command may be taken while release is low.
module tb_cdc_msg;
  logic lclk = 0, hclk = 0, rst_n = 1;
  initial #1 rst_n = 0;  // a falling edge, so asynchronous resets take effect
  always #18.5 lclk = !lclk;
  always #5 hclk = !hclk;
  int checks = 0, failures = 0;

  logic rel = 0, lcv = 0, lcr, lsv, hcv, hcr = 0, hsv = 0, hsr;
  logic [31:0] lc = 0, hc;
  logic [45:0] ls, hs = 0;

  cdc_msg #(.CW(32), .SW(46)) dut (.lclk, .l_rst_n(rst_n), .hclk, .h_rst_n(rst_n),
    .l_release(rel), .l_cmd_valid(lcv), .l_cmd_ready(lcr), .l_cmd(lc), .l_sts_valid(lsv), .l_sts(ls),
    .h_cmd_valid(hcv), .h_cmd_ready(hcr), .h_cmd(hc), .h_sts_valid(hsv), .h_sts_ready(hsr), .h_sts(hs));

  localparam int N = 20;
  logic [31:0] cmds [N];
  logic [45:0] stss [N];
  int nrx = 0, nsrx = 0, taken_blocked = 0;

  // fast side: accept commands after a random wait, answer each with a status
  always @(negedge hclk) hcr = ($urandom % 4 == 0);
  always @(posedge hclk) if (rst_n && hcv && hcr) begin
    checks++;
    if (hc !== cmds[nrx]) begin failures++; $display("FAIL cmd %0d: %h want %h", nrx, hc, cmds[nrx]); end
    nrx++;
  end
  initial begin
    int k = 0;
    wait (rst_n);
    while (k < N) begin
      @(negedge hclk);
      if (nrx > k && hsr) begin
        hs = stss[k]; hsv = 1; @(negedge hclk); hsv = 0; k++;
      end
    end
  end
  // slow side: status arrival
  always @(posedge lclk) if (rst_n && lsv) begin
    checks++;
    if (ls !== stss[nsrx]) begin failures++; $display("FAIL sts %0d", nsrx); end
    nsrx++;
  end
  always @(posedge lclk) if (rst_n && lcv && lcr && !rel) taken_blocked++;

  initial begin
    for (int i = 0; i < N; i++) begin cmds[i] = $urandom; stss[i] = {14'($urandom), 32'($urandom)}; end
    repeat (3) @(negedge lclk);
    rst_n = 1;
    for (int i = 0; i < N; i++) begin
      lc = cmds[i]; lcv = 1;
      if (i % 3 == 0) begin
        rel = 0;                 // held back: must not be taken
        repeat (2) @(negedge lclk);
        rel = 1;
      end
      #1;                        // let lcr settle before looking at it
      while (!lcr) @(negedge lclk);
      @(negedge lclk);           // taken at the edge in between
      lcv = 0;
      lc = '0;
      repeat (2) @(negedge lclk);
    end
    repeat (60) @(negedge lclk);
    checks++;
    if (nrx != N || nsrx != N || taken_blocked != 0) begin
      failures++; $display("FAIL counts cmd %0d sts %0d blocked %0d", nrx, nsrx, taken_blocked);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge lclk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
