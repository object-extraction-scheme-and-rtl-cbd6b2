// tb_bgs_ctrl: the per-pixel background update against the RAM interface
// and two behavioural SRAMs. The RAM is preloaded with a background; three
// 64-pixel rows of a new frame are streamed in (with random gaps), and every
// pixel word {B', F} and every packed Update word at {1111, row, col[9:4]} is
// compared with values computed here from the running-average rule. A row in
// load_bg mode must store B' = F and clear its Update flags.
module tb_bgs_ctrl;
  import wmsn_pkg::*;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;  // a falling edge, so asynchronous resets take effect
  always #5 clk = !clk;
  int checks = 0, failures = 0;

  logic        clear = 0, load_bg = 0;
  logic [2:0]  asel = 3;
  logic [7:0]  thr = 40;
  logic        pv = 0, pr;
  logic [7:0]  pd = 0;
  logic [8:0]  prow = 0;
  logic [9:0]  pcol = 0;
  logic [18:0] ra, wa, upd_count;
  logic        re, rack, we_, wack, busy;
  logic [15:0] rd, wd;
  logic [17:0] A;
  logic [15:0] io1_o, io1_i, io2_o, io2_i;
  logic        io1_oe, io2_oe, ce1, ub1, lb1, ce2, ub2, lb2, we, oe;

  bgs_ctrl dut (.clk, .rst_n, .clear, .load_bg, .asel, .thr,
    .pix_valid(pv), .pix_ready(pr), .pix_data(pd), .pix_row(prow), .pix_col(pcol),
    .rd_addr(ra), .rd_en(re), .rd_ack(rack), .rd_data(rd),
    .wr_addr(wa), .wr_en(we_), .wr_ack(wack), .wr_data(wd), .busy, .upd_count);
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
  task automatic mem_wr(logic [18:0] a, logic [15:0] v);
    if (a[18]) ram2.mem[a[17:0]] = v; else ram1.mem[a[17:0]] = v;
  endtask

  localparam int NR = 4, NC = 64;
  logic [7:0] bg [NR][NC];
  logic [7:0] fr [NR][NC];
  int rows [NR] = '{0, 1, 479, 200};

  task automatic send(int r, int c, logic [7:0] v);
    pd = v; prow = 9'(r); pcol = 10'(c); pv = 1;
    do @(negedge clk); while (!pr);   // pr high while idle: taken at this edge
    pv = 0;
    repeat ($urandom % 3) @(negedge clk);
  endtask

  initial begin
    int nupd = 0;
    for (int i = 0; i < NR; i++)
      for (int c = 0; c < NC; c++) begin
        bg[i][c] = 8'($urandom);
        fr[i][c] = ($urandom % 2) ? bg[i][c] + 8'($urandom % 20) : 8'($urandom);
        mem_wr(pix_addr(9'(rows[i]), 10'(c)), {bg[i][c], 8'h00});
      end
    repeat (2) @(negedge clk);
    rst_n = 1;
    clear = 1; @(negedge clk); clear = 0;
    for (int i = 0; i < NR; i++) begin
      load_bg = (i == NR - 1);
      for (int c = 0; c < NC; c++) begin
        // the controller takes the pixel only when idle
        while (!pr) @(negedge clk);
        send(rows[i], c, fr[i][c]);
      end
    end
    while (busy) @(negedge clk);
    load_bg = 0;
    for (int i = 0; i < NR; i++) begin
      logic [15:0] uw;
      for (int c = 0; c < NC; c++) begin
        int d, m, s, e;
        logic u;
        d = int'(fr[i][c]) - int'(bg[i][c]);
        m = d < 0 ? -d : d;
        s = m >> 3;
        u = (i != NR - 1) && (m > 40);
        e = (i == NR - 1) ? int'(fr[i][c]) : (u ? (d < 0 ? int'(bg[i][c]) - s : int'(bg[i][c]) + s) : int'(bg[i][c]));
        if (e > 255) e = 255;
        if (u) nupd++;
        uw[c % 16] = u;
        checks++;
        if (mem_rd(pix_addr(9'(rows[i]), 10'(c))) !== {8'(e), fr[i][c]}) begin
          failures++;
          $display("FAIL pixel r%0d c%0d: %h want %h", rows[i], c, mem_rd(pix_addr(9'(rows[i]), 10'(c))), {8'(e), fr[i][c]});
        end
        if (c % 16 == 15) begin
          checks++;
          if (mem_rd({4'b1111, 9'(rows[i]), 6'(c / 16)}) !== uw) begin
            failures++;
            $display("FAIL update word r%0d w%0d: %h want %h", rows[i], c / 16, mem_rd({4'b1111, 9'(rows[i]), 6'(c / 16)}), uw);
          end
        end
      end
    end
    checks++;
    if (upd_count != 19'(nupd)) begin failures++; $display("FAIL upd_count %0d want %0d", upd_count, nupd); end
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
