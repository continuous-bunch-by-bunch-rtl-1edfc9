// Self-checking testbench for my_npi_core with a 250 MHz ADC clock, a
// 200 MHz DDR clock and a continuous 32-bit input word every ADC clock
// (1 GByte/s). The write FIFO and memory controller are modelled: a request
// is acknowledged after a hold-off and its burst is then drained. Phase 1
// uses hold-offs that keep up on average and checks that every beat arrives
// in order (word 2k in the low half, 2k+1 in the high half), addresses run
// in 256-byte steps, and the FIFO never fills. Phase 2 holds requests off
// long enough to overfill the burst FIFO and checks the latched full flag.
`timescale 1ns/1ps
module tb_my_npi_core;
  localparam int BEATS = 32, DEPTH = 256;
  logic adc_clk = 0, ddr_clk = 0, adc_rst_n = 0, ddr_rst_n = 0;
  always #2   adc_clk = ~adc_clk;
  always #2.5 ddr_clk = ~ddr_clk;

  logic        in_valid, clear_full_latch, full_latched, capture_en;
  logic [31:0] in_data;
  logic        wf_push, npi_addr_req, npi_rnw, npi_addr_ack, wrapped, busy;
  logic [63:0] wf_data;
  logic [6:0]  wf_space;
  logic [31:0] npi_addr, next_addr, burst_count;
  logic [8:0]  fifo_level;

  my_npi_core #(.FIFO_DEPTH(DEPTH), .BUF_BYTES(64'd1024 * 1024)) dut (
    .adc_clk, .adc_rst_n, .in_valid, .in_data, .in_realign(1'b0), .clear_full_latch, .full_latched,
    .ddr_clk, .ddr_rst_n, .capture_en, .wf_push, .wf_data, .wf_space,
    .npi_addr_req, .npi_addr, .npi_rnw, .npi_addr_ack,
    .fifo_level, .next_addr, .burst_count, .wrapped, .busy);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (400000) @(posedge ddr_clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ADC-side source: word n = n (a simple ramp), one per ADC clock
  int unsigned wn = 0;
  always @(posedge adc_clk) begin
    if (in_valid) wn <= wn + 1;
  end
  assign in_data = wn;

  // memory side
  logic [63:0] wq[$];
  int unsigned beat = 0;
  int holdoff = 0, hmin = 5, hmax = 20, drain = 0, nbursts = 0;
  logic [31:0] exp_addr = 0;
  assign wf_space = 7'(64 - wq.size());
  assign npi_addr_ack = npi_addr_req && holdoff == 0 && drain == 0;
  always @(posedge ddr_clk) begin
    if (ddr_rst_n) begin
      if (drain > 0) begin
        check(wq[0] == {32'(2 * beat + 1), 32'(2 * beat)},
              $sformatf("beat %0d data %h", beat, wq[0]));
        void'(wq.pop_front());
        beat++;
        drain--;
      end
      if (wf_push) wq.push_back(wf_data);
      if (npi_addr_ack) begin
        check(npi_addr == exp_addr, $sformatf("addr %h vs %h", npi_addr, exp_addr));
        exp_addr += 256;
        drain = BEATS;
        nbursts++;
        holdoff = $urandom_range(hmin, hmax);
      end else if (npi_addr_req && holdoff > 0) holdoff--;
    end
  end

  initial begin
    in_valid = 0; clear_full_latch = 0; capture_en = 0;
    repeat (4) @(posedge ddr_clk);
    adc_rst_n = 1; ddr_rst_n = 1;
    @(negedge ddr_clk);
    capture_en = 1;
    @(negedge adc_clk);
    in_valid = 1;
    // each burst takes 32 drain clocks + hold-off; 51.2 DDR clocks of input
    // per burst, so hold-offs of 5..20 keep up
    wait (nbursts == 200);
    check(!full_latched, "no overflow while the memory side keeps up");
    check(burst_count == 200, "burst count");
    // long hold-off: 2 us with no service overfills a 256 x 64-bit FIFO
    hmin = 400; hmax = 400;
    wait (nbursts == 203);
    check(full_latched, "latched full after starvation");
    @(negedge adc_clk);
    clear_full_latch = 1;
    @(negedge adc_clk);
    clear_full_latch = 0;
    check(!full_latched || dut.u_burst_fifo.full, "latch clears");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
