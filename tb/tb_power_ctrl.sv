// tb_power_ctrl: wake / work / sleep cycles of the power control unit. A
// pending command must enable the block's clock; ip_ready must follow only
// after the enable is acknowledged from the fast domain (modelled as a
// two-cycle delay here); done must stop the clock, and the unit must return
// to inactive only once the acknowledge drops. Wake count and active-cycle
// count are checked against the cycles counted here.
module tb_power_ctrl;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;  // a falling edge, so asynchronous resets take effect
  always #5 clk = !clk;
  int checks = 0, failures = 0;

  logic pend = 0, done = 0, en_ack, en, ready;
  logic [15:0] wakes;
  logic [31:0] act;
  logic d1 = 0, d2 = 0;
  always @(posedge clk) begin d1 <= en; d2 <= d1; end
  assign en_ack = d2;

  power_ctrl dut (.lclk(clk), .rst_n, .np_cmd_pending(pend), .task_done(done), .en_ack,
    .ip_clk_en(en), .ip_ready(ready), .wake_count(wakes), .active_cycles(act));


  task automatic expect_(input logic e_en, input logic e_rdy, input string what);
    checks++;
    if (en !== e_en || ready !== e_rdy) begin
      failures++; $display("FAIL %s: en %0d ready %0d", what, en, ready);
    end
  endtask

  initial begin
    int n_active = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    expect_(0, 0, "reset: inactive");
    for (int k = 0; k < 3; k++) begin
      int t;
      pend = 1;
      @(negedge clk); n_active++;
      expect_(1, 0, "waking");
      t = 0;
      while (!ready) begin @(negedge clk); n_active++; t++; end
      checks++;
      if (t != 3) begin failures++; $display("FAIL wake took %0d", t); end  // 2-cycle ack + 1
      pend = 0;
      repeat (5 + k) begin @(negedge clk); n_active++; expect_(1, 1, "active"); end
      done = 1; @(negedge clk); n_active++; done = 0;
      expect_(0, 0, "sleeping");
      while (en_ack) begin @(negedge clk); n_active++; end
      @(negedge clk);
      expect_(0, 0, "inactive");
      repeat (4) @(negedge clk);
      expect_(0, 0, "stays inactive");
    end
    checks++;
    if (wakes != 3) begin failures++; $display("FAIL wake count %0d", wakes); end
    checks++;
    if (act != 32'(n_active)) begin failures++; $display("FAIL active cycles %0d want %0d", act, n_active); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
