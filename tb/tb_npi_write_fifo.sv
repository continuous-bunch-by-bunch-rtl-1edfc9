// Self-checking testbench for npi_write_fifo: random pushes and pops against
// a queue model, checking show-ahead data, count and space, and that a burst
// of 32 entries followed by a second fits (two-burst depth).
`timescale 1ns/1ps
module tb_npi_write_fifo;
  logic clk = 0, rst_n = 0;
  always #2.5 clk = ~clk;

  logic        push, pop;
  logic [63:0] push_data, pop_data;
  logic [6:0]  count, space;

  npi_write_fifo dut (.clk, .rst_n, .push, .push_data, .pop, .pop_data, .count, .space);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [63:0] q[$];
  initial begin
    push = 0; pop = 0; push_data = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // two whole bursts fill it exactly
    @(negedge clk);
    for (int i = 0; i < 64; i++) begin
      push = 1; push_data = {32'hB0B0_0000, 32'(i)};
      q.push_back(push_data);
      @(negedge clk);
    end
    push = 0;
    check(count == 7'd64 && space == 7'd0, $sformatf("full after 64: count=%0d space=%0d", count, space));
    // random traffic
    for (int n = 0; n < 20000; n++) begin
      push = (q.size() < 64) && ($urandom_range(0, 1) == 1);
      pop  = (q.size() > 0) && ($urandom_range(0, 2) != 0);
      push_data = {$urandom, $urandom};
      if (q.size() > 0) check(pop_data == q[0], $sformatf("data %h vs %h", pop_data, q[0]));
      check(count == 7'(q.size()), $sformatf("count %0d vs %0d", count, q.size()));
      check(space == 7'(64 - q.size()), "space");
      @(posedge clk);
      if (pop) void'(q.pop_front());
      if (push) q.push_back(push_data);
      @(negedge clk);
    end
    push = 0; pop = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
