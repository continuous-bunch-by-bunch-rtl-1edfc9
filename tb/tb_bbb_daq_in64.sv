// End-to-end testbench for the 64-bit input-port variant of bbb_daq_top:
// four 16-bit lanes per ADC clock (NUM_ADC=4, 16-bit samples), so the
// burst FIFO takes one whole 64-bit entry per write with no gearbox. The
// ADC clock is 125 MHz (8 bytes per clock = 1.0 GByte/s, the same load as
// the main configuration; the variant's own sample rate is not given). With
// NPI-first arbitration and the processor read loop running, it checks
// every written beat (consecutive 16-bit ramp values, consecutive addresses
// through two wraps of an 8 KByte buffer), that the FIFO never fills, and
// that the buffer read back after a stop holds one unbroken run.
`timescale 1ns/1ps
module tb_bbb_daq_in64;
  import bbb_daq_pkg::*;
  localparam longint BUF       = 8192;
  localparam int     BUF_WORDS = int'(BUF / 8);

  logic adc_clk = 0, ddr_clk = 0, adc_rst_n = 0, ddr_rst_n = 0;
  always #4   adc_clk = ~adc_clk;   // 125 MHz
  always #2.5 ddr_clk = ~ddr_clk;   // 200 MHz

  logic [3:0][15:0] adc_samples;
  logic             capture_en, full_latched, wrapped;
  logic [31:0]      next_addr, burst_count;
  logic [8:0]       fifo_level;
  logic             plb_req, plb_rnw, plb_ack, plb_done;
  logic [31:0]      plb_addr, mc_addr, beat_addr;
  logic             mc_ready, mc_start, mc_port, mc_rnw, mc_wr_pop, beat_valid;
  logic [63:0]      mc_wr_data, beat_data;

  bbb_daq_top #(.ADC_BITS(16), .NUM_ADC(4), .FIFO_DEPTH(256), .BUF_BYTES(BUF)) dut (
    .adc_clk, .adc_rst_n, .adc_samples, .ddr_clk, .ddr_rst_n, .capture_en,
    .arb_mode(ARB_NPI_PRIORITY), .full_latched, .next_addr, .burst_count, .wrapped, .fifo_level,
    .plb_req, .plb_addr, .plb_rnw, .plb_ack,
    .mc_ready, .mc_start, .mc_port, .mc_addr, .mc_rnw, .mc_wr_pop, .mc_wr_data);

  mc_ddr_model u_mc (
    .clk(ddr_clk), .rst_n(ddr_rst_n), .mc_ready, .mc_start, .mc_port, .mc_addr, .mc_rnw,
    .mc_wr_pop, .mc_wr_data, .beat_valid, .beat_addr, .beat_data, .plb_done);

  plb_master_model u_cpu (
    .clk(ddr_clk), .rst_n(ddr_rst_n), .enable(1'b1), .plb_req, .plb_addr, .plb_rnw,
    .plb_ack, .plb_done);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", msg);
    end
  endtask

  initial begin
    #(64'd200_000_000);  // 200 us
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // 16-bit ramp: lane i at ADC clock n carries 4n+i
  int unsigned adc_n = 0;
  always @(posedge adc_clk) adc_n <= adc_n + 1;
  always_comb for (int i = 0; i < 4; i++) adc_samples[i] = 16'(4 * adc_n + i);

  logic [63:0] mem [BUF_WORDS];
  bit          have_prev = 0;
  logic [15:0] prev;
  logic [31:0] exp_beat_addr = 0;
  int          n_npi = 0;
  always @(posedge ddr_clk) begin
    if (mc_start && mc_port == 1'(PORT_NPI)) n_npi++;
    if (beat_valid) begin
      mem[beat_addr[$clog2(BUF_WORDS)+2:3]] <= beat_data;
      check(beat_addr == exp_beat_addr, $sformatf("beat address %h vs %h", beat_addr, exp_beat_addr));
      for (int l = 0; l < 4; l++) begin
        if (have_prev) check(beat_data[16*l +: 16] == prev + 16'd1, "consecutive samples");
        prev = beat_data[16*l +: 16];
        have_prev = 1;
      end
      exp_beat_addr = (exp_beat_addr + 8 == 32'(BUF)) ? 32'h0 : exp_beat_addr + 8;
    end
  end

  initial begin
    capture_en = 0;
    repeat (4) @(negedge ddr_clk);
    adc_rst_n = 1; ddr_rst_n = 1;
    repeat (4) @(negedge ddr_clk);
    capture_en = 1;
    wait (n_npi == 2 * int'(BUF / 256) + 10);
    check(wrapped, "buffer wrapped");
    check(!full_latched, "no overflow");
    capture_en = 0;
    repeat (400) @(negedge ddr_clk);
    check(fifo_level < 32 && burst_count == 32'(n_npi), "drained after stop");
    begin
      int a;
      logic [15:0] p;
      a = int'(next_addr / 8);
      p = mem[a][15:0] - 16'd1;
      for (int k = 0; k < BUF_WORDS; k++) begin
        for (int l = 0; l < 4; l++) begin
          check(mem[a][16*l +: 16] == p + 16'd1, $sformatf("buffer word %0d lane %0d", a, l));
          p = mem[a][16*l +: 16];
        end
        a = (a + 1) % BUF_WORDS;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
