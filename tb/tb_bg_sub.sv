// tb_bg_sub: self-checking test of the background subtraction datapath.
// Hand-worked vectors first, then random pixels compared with the running
// average equation B + (F - B)/2^asel (truncating the step toward B) and the
// threshold test |F - B| > Thr.
module tb_bg_sub;
  logic [7:0] b, f, thr, bn;
  logic [2:0] asel;
  logic       upd;
  int checks = 0, failures = 0;

  bg_sub dut (.Bn_1(b), .Fn(f), .asel, .Thr(thr), .Bn(bn), .Update(upd));

  task automatic check(input logic [7:0] eb, input logic eu, input string what);
    checks++;
    if (bn !== eb || upd !== eu) begin
      failures++;
      $display("FAIL %s: B=%0d F=%0d asel=%0d thr=%0d -> Bn=%0d Upd=%0d, want %0d %0d",
               what, b, f, asel, thr, bn, upd, eb, eu);
    end
  endtask

  initial begin
    // hand-worked: 100 + (180-100)/4 = 120, |80| > 50
    b = 100; f = 180; asel = 2; thr = 50; #1 check(8'd120, 1'b1, "up");
    // 200 - (200-40)/2 = 120
    b = 200; f = 40;  asel = 1; thr = 200; #1 check(8'd120, 1'b0, "down");
    // alpha = 1 copies F
    b = 7;   f = 250; asel = 0; thr = 0;   #1 check(8'd250, 1'b1, "alpha1");
    // difference equal to threshold is not an update
    b = 10;  f = 30;  asel = 7; thr = 20;  #1 check(8'd10, 1'b0, "equal thr");
    // 1/128 step of 255-0 = 1
    b = 0;   f = 255; asel = 7; thr = 254; #1 check(8'd1, 1'b1, "1/128");
    for (int i = 0; i < 20000; i++) begin
      int d, m, s, e;
      b = 8'($urandom); f = 8'($urandom); asel = 3'($urandom); thr = 8'($urandom);
      d = int'(f) - int'(b);
      m = (d < 0) ? -d : d;
      s = m / (1 << asel);
      e = (d < 0) ? int'(b) - s : int'(b) + s;
      if (e > 255) e = 255;
      #1 check(8'(e), m > int'(thr), "random");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
