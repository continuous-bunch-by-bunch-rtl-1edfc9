// Self-checking testbench for npi_burst_ctrl. The burst FIFO is modelled as
// a counter source with one clock of read latency; the write FIFO as a queue
// with space = 64 - size; the memory controller acknowledges requests after
// a random hold-off and then drains one burst. Checks: data order, exactly
// one burst of 32 entries pushed before each request, a request only when a
// burst is available, stable address while waiting, the circular address
// sequence with wrap, restart on a new capture (discarding the previous
// capture's leftover), and the fill rate (one burst
// every 34 clocks when nothing holds it off).
`timescale 1ns/1ps
module tb_npi_burst_ctrl;
  localparam int BEATS = 32;
  localparam logic [31:0] BASE = 32'h0000_1000;
  localparam longint BUF = 256 * 5;
  logic clk = 0, rst_n = 0;
  always #2.5 clk = ~clk;

  logic        capture_en;
  logic [11:0] fifo_rd_count;
  logic        fifo_rd_en, wf_push, npi_addr_req, npi_rnw, npi_addr_ack, wrapped, busy;
  logic [63:0] fifo_rd_data, wf_data;
  logic [6:0]  wf_space;
  logic [31:0] npi_addr, next_addr, burst_count;

  npi_burst_ctrl #(.BASE_ADDR(BASE), .BUF_BYTES(BUF)) dut (
    .clk, .rst_n, .capture_en, .fifo_rd_count, .fifo_rd_en, .fifo_rd_data,
    .wf_push, .wf_data, .wf_space, .npi_addr_req, .npi_addr, .npi_rnw, .npi_addr_ack,
    .next_addr, .burst_count, .wrapped, .busy);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // source model
  int unsigned avail = 0, rd_idx = 0, push_idx = 0;
  int          arrive_pct = 100;
  always @(posedge clk) begin
    if (rst_n) begin
      if (fifo_rd_en) begin
        fifo_rd_data <= {32'hA5A5_0000 + rd_idx, rd_idx};
        rd_idx++;
      end
      avail = avail - (fifo_rd_en ? 1 : 0) + ((capture_en && $urandom_range(1, 100) <= arrive_pct) ? 1 : 0);
    end
  end
  assign fifo_rd_count = 12'(avail > 4000 ? 4000 : avail);

  // write FIFO and memory controller model
  logic [63:0] wq[$];
  int   unexec = 0;       // entries pushed but not yet covered by a request
  int   holdoff = 0, max_holdoff = 20, drain = 0;
  int   nbursts = 0, last_ack_cycle = -1, cycle = 0, gap_sum = 0, gaps = 0;
  logic [31:0] exp_addr = BASE;
  bit   was_req = 0;
  logic [31:0] req_addr;
  assign wf_space = 7'(64 - wq.size());
  assign npi_addr_ack = npi_addr_req && holdoff == 0;

  always @(posedge clk) begin
    cycle++;
    if (rst_n) begin
      if (drain > 0) begin void'(wq.pop_front()); drain--; end
      if (wf_push) begin
        check(wf_data == {32'hA5A5_0000 + push_idx, push_idx}, $sformatf("push data %h idx %0d", wf_data, push_idx));
        wq.push_back(wf_data);
        push_idx++;
        unexec++;
        check(!npi_addr_req, "no push while requesting");
      end
      if (npi_addr_req) begin
        if (!was_req) begin
          check(unexec == BEATS, $sformatf("request after %0d pushes", unexec));
          req_addr = npi_addr;
        end else check(npi_addr == req_addr, "address stable while waiting");
        check(!npi_rnw, "write request");
      end
      if (npi_addr_ack) begin
        check(npi_addr == exp_addr, $sformatf("address %h vs %h", npi_addr, exp_addr));
        exp_addr = (exp_addr + 256 == BASE + 32'(BUF)) ? BASE : exp_addr + 256;
        unexec -= BEATS;
        drain += BEATS;
        nbursts++;
        if (last_ack_cycle >= 0) begin gap_sum += cycle - last_ack_cycle; gaps++; end
        last_ack_cycle = cycle;
        holdoff = $urandom_range(0, max_holdoff);
      end else if (npi_addr_req && holdoff > 0) holdoff--;
      was_req = npi_addr_req && !npi_addr_ack;
    end
  end

  initial begin
    int n0;
    int unsigned a0, r0, p0;
    capture_en = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    capture_en = 1;
    // random arrivals, random hold-off
    arrive_pct = 60;
    wait (nbursts == 12);
    @(negedge clk);
    check(wrapped, "wrapped after 12 bursts of a 5-burst buffer");
    check(burst_count == 12, $sformatf("burst_count %0d", burst_count));
    // rate with no hold-off and ample data: one burst per 35 clocks
    arrive_pct = 100; max_holdoff = 0;
    avail = avail + 200;
    gap_sum = 0; gaps = 0; last_ack_cycle = -1;
    wait (nbursts == 30);
    check(gaps > 0 && gap_sum == 35 * gaps, $sformatf("burst period %0d/%0d", gap_sum, gaps));
    // stop, then restart: address goes back to the base
    arrive_pct = 0;
    wait (!busy && avail < BEATS);
    @(negedge clk);
    capture_en = 0;
    repeat (5) @(negedge clk);
    check(!busy && !npi_addr_req, "idle when no full burst is waiting");
    a0 = avail; r0 = rd_idx; p0 = push_idx;
    check(a0 > 0, "a partial burst is left over");
    capture_en = 1;
    @(negedge clk);
    check(next_addr == BASE && burst_count == 0 && !wrapped, "restart at base address");
    // the leftover of the previous capture is read and discarded
    repeat (50) @(negedge clk);
    check(rd_idx == r0 + a0 && avail == 0, $sformatf("discarded %0d of %0d leftover entries", rd_idx - r0, a0));
    check(push_idx == p0 && !busy, "nothing pushed while discarding");
    push_idx = rd_idx;
    exp_addr = BASE;
    arrive_pct = 100; max_holdoff = 5;
    n0 = nbursts;
    wait (nbursts == n0 + 6);
    @(negedge clk);
    check(burst_count == 6 && next_addr == BASE + 256, $sformatf("after restart count %0d addr %h", burst_count, next_addr));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
