// tb_ext_ram_if: the RAM interface against two behavioural 256Kx16 SRAMs.
// Writes random words to random addresses in both devices, reads them back,
// checks that address bit 18 selects the device, that untouched words stay
// as written, and that a read acknowledges 2 cycles and a write 3 cycles
// after the request is raised.
module tb_ext_ram_if;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;  // a falling edge, so asynchronous resets take effect
  always #5 clk = !clk;
  int checks = 0, failures = 0;

  logic [18:0] waddr, raddr;
  logic        wen, ren, wack, rack;
  logic [15:0] wdata, rdata;
  logic [17:0] A;
  logic [15:0] io1_o, io1_i, io2_o, io2_i;
  logic        io1_oe, io2_oe, ce1, ub1, lb1, ce2, ub2, lb2, we, oe;

  ext_ram_if dut (
    .hclock(clk), .rst_n,
    .Write_address(waddr), .Write_enable(wen), .Write_ack(wack), .Write_data(wdata),
    .Read_address(raddr), .Read_enable(ren), .Read_ack(rack), .Read_data(rdata),
    .A, .IO1_o(io1_o), .IO1_i(io1_i), .IO1_oe(io1_oe), .IO2_o(io2_o), .IO2_i(io2_i), .IO2_oe(io2_oe),
    .CE1(ce1), .UB1(ub1), .LB1(lb1), .CE2(ce2), .UB2(ub2), .LB2(lb2), .WE(we), .OE(oe)
  );
  sram_256kx16_model ram1 (.A, .io_i(io1_o), .io_o(io1_i), .CE(ce1), .UB(ub1), .LB(lb1), .WE(we), .OE(oe));
  sram_256kx16_model ram2 (.A, .io_i(io2_o), .io_o(io2_i), .CE(ce2), .UB(ub2), .LB(lb2), .WE(we), .OE(oe));

  // Only one device may be selected, and never both.
  int both_sel = 0, sel2_seen = 0, sel1_seen = 0;
  always @(posedge clk) begin
    if (!ce1 && !ce2) both_sel++;
    if (!ce2) sel2_seen++;
    if (!ce1) sel1_seen++;
  end

  task automatic write(input logic [18:0] a, input logic [15:0] d, output int lat);
    @(negedge clk);  // let the previous ack cycle pass: interface idle
    lat = 0;
    waddr = a; wdata = d; wen = 1;
    do begin @(negedge clk); lat++; end while (!wack);
    wen = 0;
  endtask

  task automatic read(input logic [18:0] a, output logic [15:0] d, output int lat);
    @(negedge clk);
    lat = 0;
    raddr = a; ren = 1;
    do begin @(negedge clk); lat++; end while (!rack);
    d = rdata;
    ren = 0;
  endtask

  logic [18:0] addrs [64];
  logic [15:0] vals  [64];
  initial begin
    int lat;
    logic [15:0] d;
    wen = 0; ren = 0; waddr = 0; raddr = 0; wdata = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int i = 0; i < 64; i++) begin
      addrs[i] = {i[0], 12'($urandom), i[5:0]};   // distinct, both devices
      vals[i]  = 16'($urandom);
      write(addrs[i], vals[i], lat);
      checks++;
      if (lat != 3) begin failures++; $display("FAIL write latency %0d", lat); end
    end
    for (int i = 0; i < 64; i++) begin
      read(addrs[i], d, lat);
      checks++;
      if (d !== vals[i]) begin failures++; $display("FAIL read %h: %h want %h", addrs[i], d, vals[i]); end
      checks++;
      if (lat != 2) begin failures++; $display("FAIL read latency %0d", lat); end
      // the word is in the device that bit 18 names
      checks++;
      if ((addrs[i][18] ? ram2.mem[addrs[i][17:0]] : ram1.mem[addrs[i][17:0]]) !== vals[i]) begin
        failures++; $display("FAIL device select for %h", addrs[i]);
      end
    end
    // back-to-back read and write requests raised together: read first
    raddr = addrs[0]; ren = 1; waddr = addrs[1]; wdata = 16'h1234; wen = 1;
    do @(negedge clk); while (!rack);
    ren = 0;
    checks++;
    if (rdata !== vals[0]) begin failures++; $display("FAIL read priority"); end
    do @(negedge clk); while (!wack);
    wen = 0;
    read(addrs[1], d, lat);
    checks++;
    if (d !== 16'h1234) begin failures++; $display("FAIL write after read"); end
    checks++;
    if (both_sel != 0 || sel1_seen == 0 || sel2_seen == 0) begin
      failures++; $display("FAIL chip enables %0d %0d %0d", both_sel, sel1_seen, sel2_seen);
    end
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
