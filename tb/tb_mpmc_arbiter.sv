// Self-checking testbench for mpmc_arbiter: random requests and controller
// ready in both modes, against a reference model of rotating and fixed
// priority; also checks that two always-requesting ports alternate under
// round-robin and that the NPI port always wins under NPI priority.
`timescale 1ns/1ps
module tb_mpmc_arbiter;
  import bbb_daq_pkg::*;
  logic clk = 0, rst_n = 0;
  always #2.5 clk = ~clk;

  arb_mode_e  mode;
  logic [1:0] req, grant;
  logic       mc_ready, grant_valid, grant_port;
  logic [2:0] req3, grant3;
  logic       gv3;
  logic [1:0] gp3;

  mpmc_arbiter dut (.clk, .rst_n, .mode, .req, .mc_ready, .grant, .grant_valid, .grant_port);
  mpmc_arbiter #(.NUM_PORTS(3), .PRIO_PORT(2)) dut3 (
    .clk, .rst_n, .mode, .req(req3), .mc_ready, .grant(grant3), .grant_valid(gv3), .grant_port(gp3));

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

  // reference: returns the one-hot grant and advances the pointer
  function automatic logic [2:0] ref_grant(input int n, input int prio, input arb_mode_e m,
                                           input logic [2:0] r, input bit rdy, inout int top);
    logic [2:0] g = '0;
    if (!rdy || r == 0) return '0;
    if (m == ARB_NPI_PRIORITY && r[prio]) g[prio] = 1;
    else begin
      for (int k = 0; k < n; k++) begin
        int p = (top + k) % n;
        if (r[p]) begin g[p] = 1; break; end
      end
    end
    for (int p = 0; p < n; p++) if (g[p]) top = (p + 1) % n;
    return g;
  endfunction

  initial begin
    int top2 = 0, top3 = 0;
    logic [2:0] e2, e3;
    int last = -1, alternations = 0, npi_wins = 0;
    mode = ARB_ROUND_ROBIN; req = 0; req3 = 0; mc_ready = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int n = 0; n < 20000; n++) begin
      if (n % 5000 == 0) mode = arb_mode_e'(n / 5000 % 2);
      req = 2'($urandom); req3 = 3'($urandom); mc_ready = ($urandom_range(0, 3) != 0);
      #0.1;
      e2 = ref_grant(2, PORT_NPI, mode, {1'b0, req}, mc_ready, top2);
      e3 = ref_grant(3, 2, mode, req3, mc_ready, top3);
      check(grant == e2[1:0], $sformatf("2-port grant %b vs %b (req %b mode %s)", grant, e2[1:0], req, mode.name()));
      check(grant3 == e3, $sformatf("3-port grant %b vs %b (req %b)", grant3, e3, req3));
      check(grant_valid == (e2 != 0) && (e2 == 0 || grant_port == e2[1]), "valid/port");
      @(negedge clk);
    end
    // both ports always requesting, controller ready every 4th clock
    mode = ARB_ROUND_ROBIN; req = 2'b11; req3 = 0;
    for (int n = 0; n < 400; n++) begin
      mc_ready = (n % 4 == 0);
      #0.1;
      if (grant_valid) begin
        if (last >= 0 && int'(grant_port) != last) alternations++;
        last = int'(grant_port);
      end
      @(negedge clk);
    end
    check(alternations == 99, $sformatf("round-robin alternations %0d of 99", alternations));
    mode = ARB_NPI_PRIORITY;
    for (int n = 0; n < 400; n++) begin
      mc_ready = (n % 4 == 0);
      #0.1;
      if (grant_valid && grant_port == 1'(PORT_NPI)) npi_wins++;
      @(negedge clk);
    end
    check(npi_wins == 100, $sformatf("NPI priority wins %0d of 100", npi_wins));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
