// Self-checking testbench for burst_fifo with a 250 MHz write clock and a
// 200 MHz read clock, for a 32-bit (2:1 gearbox) and a 64-bit input port.
// Phase 1 streams counter words with random gaps on both sides and checks
// every 64-bit entry read back (first word in the low half). Phase 2 stops
// the reader, overfills the FIFO, and checks the full flag, the latched full
// flag, that exactly DEPTH entries were kept, and that clear_latch clears it.
// Phase 3 checks that wr_realign abandons a half-collected entry.
`timescale 1ns/1ps
module tb_burst_fifo;
  localparam int DEPTH = 16;
  logic wclk = 0, rclk = 0, wrst_n = 0, rrst_n = 0;
  always #2   wclk = ~wclk;
  always #2.5 rclk = ~rclk;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (200000) @(posedge rclk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- 32-bit input instance ----
  logic        realign_a = 0;
  logic        wr_en_a, clr_a, full_a, fl_a, rd_en_a;
  logic [31:0] wd_a;
  logic [63:0] rd_a;
  logic [4:0]  wc_a, rc_a;
  burst_fifo #(.WR_W(32), .RD_W(64), .DEPTH(DEPTH)) dut_a (
    .wr_clk(wclk), .wr_rst_n(wrst_n), .wr_en(wr_en_a), .wr_data(wd_a), .wr_realign(realign_a), .clear_latch(clr_a),
    .full(full_a), .full_latched(fl_a), .wr_count(wc_a),
    .rd_clk(rclk), .rd_rst_n(rrst_n), .rd_en(rd_en_a), .rd_data(rd_a), .rd_count(rc_a));

  // ---- 64-bit input instance ----
  logic        wr_en_b, clr_b, full_b, fl_b, rd_en_b;
  logic [63:0] wd_b, rd_b;
  logic [4:0]  wc_b, rc_b;
  burst_fifo #(.WR_W(64), .RD_W(64), .DEPTH(DEPTH)) dut_b (
    .wr_clk(wclk), .wr_rst_n(wrst_n), .wr_en(wr_en_b), .wr_data(wd_b), .wr_realign(1'b0), .clear_latch(clr_b),
    .full(full_b), .full_latched(fl_b), .wr_count(wc_b),
    .rd_clk(rclk), .rd_rst_n(rrst_n), .rd_en(rd_en_b), .rd_data(rd_b), .rd_count(rc_b));

  logic [63:0] exp_a[$], exp_b[$];
  bit   phase2 = 0, rd_stop = 0, wr_done = 0;
  int   words_a = 0, words_b = 0;

  // writer: the 32-bit instance gets word n = 32'h5A00_0000 + n, the 64-bit
  // instance {~n, n}; in phase 1 a word is offered only while not full
  initial begin
    logic [31:0] half;
    wr_en_a = 0; wr_en_b = 0; wd_a = 0; wd_b = 0; clr_a = 0; clr_b = 0;
    repeat (4) @(posedge wclk);
    wrst_n = 1;
    for (int n = 0; n < 6000; n++) begin
      @(negedge wclk);
      wr_en_a = !full_a && ($urandom_range(0, 3) != 0);
      wd_a = 32'h5A00_0000 + 32'(words_a);
      wr_en_b = !full_b && ($urandom_range(0, 2) == 0);
      wd_b = {~32'(words_b), 32'(words_b)};
      @(posedge wclk);
      if (wr_en_a) begin
        if (words_a % 2 == 0) half = wd_a;
        else exp_a.push_back({wd_a, half});
        words_a++;
      end
      if (wr_en_b) begin exp_b.push_back(wd_b); words_b++; end
    end
    @(negedge wclk);
    wr_en_a = 0; wr_en_b = 0;
    wr_done = 1;
  end

  // reader with a one-clock read latency
  initial begin
    logic pa, pb;
    rd_en_a = 0; rd_en_b = 0; pa = 0; pb = 0;
    repeat (4) @(posedge rclk);
    rrst_n = 1;
    forever begin
      @(negedge rclk);
      if (pa) begin
        check(exp_a.size() > 0 && rd_a == exp_a[0], $sformatf("A data %h vs %h", rd_a, exp_a[0]));
        void'(exp_a.pop_front());
      end
      if (pb) begin
        check(exp_b.size() > 0 && rd_b == exp_b[0], $sformatf("B data %h vs %h", rd_b, exp_b[0]));
        void'(exp_b.pop_front());
      end
      rd_en_a = !rd_stop && rc_a != 0 && ($urandom_range(0, 2) != 0);
      rd_en_b = !rd_stop && rc_b != 0 && ($urandom_range(0, 2) != 0);
      pa = rd_en_a; pb = rd_en_b;
    end
  end

  initial begin
    wait (wr_done);
    repeat (200) @(posedge rclk);
    check(exp_a.size() == 0 && rc_a == 0, "A drained");
    check(exp_b.size() == 0 && rc_b == 0, "B drained");
    check(!fl_a && !fl_b, "no full latched while writer respected full");
    // phase 2: reader stopped, writer keeps writing
    rd_stop = 1;
    @(negedge wclk);
    for (int n = 0; n < 4 * DEPTH; n++) begin
      wr_en_a = 1; wd_a = 32'hC000_0000 + 32'(n);
      wr_en_b = 1; wd_b = {32'hD000_0000, 32'(n)};
      if (n % 2 == 1 && n / 2 < DEPTH) exp_a.push_back({wd_a, 32'hC000_0000 + 32'(n - 1)});
      if (n < DEPTH) exp_b.push_back(wd_b);
      if (n == 2 * DEPTH - 1) check(!fl_a, "A latch still clear before the overfull word");
      @(negedge wclk);
    end
    wr_en_a = 0; wr_en_b = 0;
    check(full_a && fl_a && wc_a == 5'(DEPTH), $sformatf("A full=%0d latched=%0d count=%0d", full_a, fl_a, wc_a));
    check(full_b && fl_b && wc_b == 5'(DEPTH), $sformatf("B full=%0d latched=%0d count=%0d", full_b, fl_b, wc_b));
    repeat (10) @(posedge rclk);
    check(rc_a == 5'(DEPTH) && rc_b == 5'(DEPTH), "read side sees DEPTH entries");
    rd_stop = 0;
    repeat (200) @(posedge rclk);
    check(exp_a.size() == 0 && exp_b.size() == 0, "kept entries all read back");
    check(fl_a && fl_b, "latch holds after draining");
    @(negedge wclk);
    clr_a = 1; clr_b = 1;
    @(negedge wclk);
    clr_a = 0; clr_b = 0;
    check(!fl_a && !fl_b && !full_a && !full_b, "latch cleared");
    // realign: a lone word is abandoned, the next words pair up afresh
    repeat (10) @(posedge rclk);
    check(rc_a == 0, "A empty before realign test");
    @(negedge wclk);
    wr_en_a = 1; wd_a = 32'hDEAD_0001;
    @(negedge wclk);
    wr_en_a = 0; realign_a = 1;
    @(negedge wclk);
    realign_a = 0;
    for (int n = 0; n < 4; n++) begin
      wr_en_a = 1; wd_a = 32'hF000_0000 + 32'(n);
      if (n % 2 == 1) exp_a.push_back({wd_a, 32'hF000_0000 + 32'(n - 1)});
      @(negedge wclk);
    end
    wr_en_a = 0;
    repeat (20) @(posedge rclk);
    check(exp_a.size() == 0, "realigned entries read back");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
