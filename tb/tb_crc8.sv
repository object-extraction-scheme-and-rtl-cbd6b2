// tb_crc8: checks the byte-wide CRC-8 against a bit-serial shift-register
// reference and the published check value of CRC-8 (poly 0x07, init 0) for
// the ASCII string "123456789", which is 0xF4.
module tb_crc8;
  logic clk = 0, rst_n = 1, clear = 0, en = 0;
  initial #1 rst_n = 0;  // a falling edge, so asynchronous resets take effect
  logic [7:0] din, crc;
  int checks = 0, failures = 0;
  always #5 clk = !clk;

  crc8 dut (.clk, .rst_n, .clear, .en, .din, .crc);

  function automatic logic [7:0] ref_crc(input logic [7:0] c, input logic [7:0] d);
    // one bit at a time, message bit shifted in msb first
    for (int i = 7; i >= 0; i--) begin
      logic fb;
      fb = c[7] ^ d[i];
      c  = {c[6:0], 1'b0};
      if (fb) c = c ^ 8'h07;
    end
    return c;
  endfunction

  // Inputs change on the falling edge, away from the sampling edge.
  task automatic send(input logic [7:0] b);
    din = b; en = 1'b1;
    @(negedge clk);
    en = 1'b0;
  endtask

  initial begin
    static string s = "123456789";
    logic [7:0] r;
    din = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    clear = 1; @(negedge clk); clear = 0;
    for (int i = 0; i < 9; i++) send(s[i]);
    checks++;
    if (crc !== 8'hF4) begin failures++; $display("FAIL check value %h", crc); end
    // appending the CRC gives zero
    send(8'hF4);
    checks++;
    if (crc !== 8'h00) begin failures++; $display("FAIL residue %h", crc); end
    // random messages
    for (int m = 0; m < 50; m++) begin
      clear = 1; @(negedge clk); clear = 0;
      r = 0;
      for (int i = 0; i < 1 + m * 5; i++) begin
        logic [7:0] b;
        b = 8'($urandom);
        r = ref_crc(r, b);
        send(b);
      end
      checks++;
      if (crc !== r) begin failures++; $display("FAIL msg %0d: %h vs %h", m, crc, r); end
    end
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
