// Full-size end-to-end testbench for bbb_daq_top, with every parameter at
// its default (2048-entry burst FIFO, 64 MByte buffer): one complete capture
// that fills and wraps the whole buffer, then the same sequence as the
// reduced testbench tb_bbb_daq_top. The set-up: two ramp-generating 12-bit ADCs at
// 250 MHz (bunch k has value k mod 4096), the DDR2 controller modelled at
// transaction level (225 ns per 256-byte burst, 60 ns per processor read) at
// 200 MHz, and a processor reading DDR in a tight loop on the bus port.
//
// Phase A, NPI-first arbitration: capture until the circular buffer has
// wrapped, checking every written beat (consecutive bunches, consecutive
// addresses with wrap), the sustained burst rate (one burst per 51.2 DDR
// clocks = 1 GByte/s), that processor reads still get in (about one per two
// bursts) and that the burst FIFO never fills. Then a stop trigger: every
// complete burst drains, and the buffer read back from the oldest entry
// holds one unbroken run of bunches.
// Phase B, a new capture started without a reset (the previous capture's
// leftover is discarded), round-robin arbitration: bursts and processor
// reads alternate, one burst per 285 ns (57 clocks, 0.9 GByte/s), which is
// below the ADC rate, so the burst FIFO overfills and its latched full flag
// is set.
// Every mechanism (burst, processor read, NPI request held off by a
// processor read, more than one burst waiting in the burst FIFO, address
// wrap, stop trigger, mode switch, overflow) is counted and must occur.
`timescale 1ns/1ps
module tb_bbb_daq_full;
  import bbb_daq_pkg::*;
  localparam int          FIFO_DEPTH = 2048;
  localparam longint      BUF        = 64'd67108864;
  localparam int          BUF_WORDS  = int'(BUF / 8);
  localparam int          BEATS      = BURST_BEATS;

  logic adc_clk = 0, ddr_clk = 0, adc_rst_n = 0, ddr_rst_n = 0;
  always #2   adc_clk = ~adc_clk;   // 250 MHz ADC clock
  always #2.5 ddr_clk = ~ddr_clk;   // 200 MHz DDR clock

  logic [1:0][11:0] adc_samples;
  logic             capture_en, full_latched, wrapped;
  arb_mode_e        arb_mode;
  logic [31:0]      next_addr, burst_count;
  logic [$clog2(FIFO_DEPTH):0] fifo_level;
  logic             plb_req, plb_rnw, plb_ack, plb_done, plb_en;
  logic [31:0]      plb_addr, mc_addr, beat_addr;
  logic             mc_ready, mc_start, mc_port, mc_rnw, mc_wr_pop, beat_valid;
  logic [63:0]      mc_wr_data, beat_data;

  bbb_daq_top dut (
    .adc_clk, .adc_rst_n, .adc_samples, .ddr_clk, .ddr_rst_n, .capture_en, .arb_mode,
    .full_latched, .next_addr, .burst_count, .wrapped, .fifo_level,
    .plb_req, .plb_addr, .plb_rnw, .plb_ack,
    .mc_ready, .mc_start, .mc_port, .mc_addr, .mc_rnw, .mc_wr_pop, .mc_wr_data);

  mc_ddr_model u_mc (
    .clk(ddr_clk), .rst_n(ddr_rst_n), .mc_ready, .mc_start, .mc_port, .mc_addr, .mc_rnw,
    .mc_wr_pop, .mc_wr_data, .beat_valid, .beat_addr, .beat_data, .plb_done);

  plb_master_model u_cpu (
    .clk(ddr_clk), .rst_n(ddr_rst_n), .enable(plb_en), .plb_req, .plb_addr, .plb_rnw,
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
    #(64'd200_000_000_000);  // 200 ms
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ADC ramp: bunch 2n on ADC 0, bunch 2n+1 on ADC 1 at ADC clock n
  int unsigned adc_n = 0;
  always @(posedge adc_clk) adc_n <= adc_n + 1;
  always_comb begin
    adc_samples[0] = 12'(2 * adc_n);
    adc_samples[1] = 12'(2 * adc_n + 1);
  end

  // written-data checker and memory image
  logic [63:0] mem [BUF_WORDS];
  bit          stream_on = 0, have_prev = 0;
  logic [11:0] prev;
  logic [31:0] exp_beat_addr;
  int unsigned beats_seen = 0;
  always @(posedge ddr_clk) begin
    if (beat_valid) begin
      mem[beat_addr[$clog2(BUF_WORDS)+2:3]] <= beat_data;
      beats_seen++;
      if (stream_on && !full_latched) begin
        check(beat_addr == exp_beat_addr, $sformatf("beat address %h vs %h", beat_addr, exp_beat_addr));
        for (int l = 0; l < 4; l++) begin
          logic [15:0] v;
          v = beat_data[16*l +: 16];
          check(v[15:12] == 4'h0, "spare lane bits zero");
          if (have_prev) check(v[11:0] == prev + 12'd1, $sformatf("bunch %h after %h", v[11:0], prev));
          prev = v[11:0];
          have_prev = 1;
        end
      end
      exp_beat_addr = (exp_beat_addr + 8 == 32'(BUF)) ? 32'h0 : exp_beat_addr + 8;
    end
  end

  // mechanism counters
  int n_npi = 0, n_plb = 0, n_holdoff = 0, n_multi = 0, n_wrap = 0, n_stop = 0;
  int n_mode = 0, n_overflow = 0, cyc = 0;
  int first_npi_cyc = -1, last_npi_cyc = -1, win_npi = 0;
  bit serving_plb = 0, npi_req_q = 0, wrapped_q = 0;
  always @(posedge ddr_clk) begin
    cyc++;
    if (ddr_rst_n) begin
      if (mc_start && mc_port == 1'(PORT_NPI)) begin
        n_npi++; win_npi++;
        if (first_npi_cyc < 0) first_npi_cyc = cyc;
        last_npi_cyc = cyc;
      end
      if (mc_start) serving_plb = (mc_port == 1'(PORT_PLB));
      if (mc_start && mc_port == 1'(PORT_PLB)) n_plb++;
      if (dut.npi_req && !npi_req_q && !mc_ready && serving_plb) n_holdoff++;
      if (fifo_level > (BEATS + 1)) n_multi++;
      if (wrapped && !wrapped_q) n_wrap++;
      npi_req_q = dut.npi_req;
      wrapped_q = wrapped;
    end
  end

  task automatic reset_all();
    capture_en = 0; plb_en = 0;
    @(negedge ddr_clk);
    adc_rst_n = 0; ddr_rst_n = 0;
    repeat (4) @(negedge ddr_clk);
    adc_rst_n = 1; ddr_rst_n = 1;
    repeat (4) @(negedge ddr_clk);
  endtask

  initial begin
    int npi0, plb0;
    real period;
    arb_mode = ARB_NPI_PRIORITY;
    reset_all();
    // ---------------- phase A ----------------
    plb_en = 1;
    capture_en = 1;
    stream_on = 1; have_prev = 0; exp_beat_addr = 0;
    wait (n_npi == 20);
    npi0 = n_npi; plb0 = n_plb; first_npi_cyc = -1; win_npi = 0;
    wait (wrapped && n_npi >= int'(BUF / 256) + 60);
    period = real'(last_npi_cyc - first_npi_cyc) / real'(win_npi - 1);
    check(period > 50.5 && period < 52.0, $sformatf("NPI-first burst period %.2f clocks (input is 51.2)", period));
    check(real'(n_npi - npi0) / real'(n_plb - plb0) >= 1.5 && real'(n_npi - npi0) / real'(n_plb - plb0) <= 3.0,
          $sformatf("bursts per processor read %0d/%0d", n_npi - npi0, n_plb - plb0));
    check(!full_latched, "no overflow under NPI-first arbitration");
    // stop trigger
    capture_en = 0;
    n_stop++;
    repeat (400) @(negedge ddr_clk);
    check(fifo_level < BEATS && !dut.u_npi_core.busy, "all complete bursts written after stop");
    check(burst_count == 32'(n_npi), $sformatf("burst count %0d vs %0d", burst_count, n_npi));
    check(next_addr == 32'((n_npi * 256) % BUF), "next address after stop");
    // read back the circular buffer from its oldest entry
    begin
      int a;
      logic [11:0] p;
      a = int'(next_addr / 8);
      p = mem[a][11:0] - 12'd1;
      for (int k = 0; k < BUF_WORDS; k++) begin
        for (int l = 0; l < 4; l++) begin
          check(mem[a][16*l +: 12] == p + 12'd1, $sformatf("buffer word %0d lane %0d", a, l));
          p = mem[a][16*l +: 12];
        end
        a = (a + 1) % BUF_WORDS;
      end
    end
    // ---------------- phase B: restart without a reset ----------------
    arb_mode = ARB_ROUND_ROBIN;
    n_mode++;
    plb_en = 1;
    capture_en = 1;
    have_prev = 0; exp_beat_addr = 0;
    repeat (10) @(negedge ddr_clk);
    check(next_addr == 0 && burst_count == 0 && !full_latched, "restart state");
    wait (n_npi - npi0 > 0);
    npi0 = n_npi;
    wait (n_npi == npi0 + 10);
    first_npi_cyc = -1; win_npi = 0;
    wait (n_npi == npi0 + 40 || full_latched);
    period = real'(last_npi_cyc - first_npi_cyc) / real'(win_npi - 1);
    check(period > 56.9 && period < 57.1, $sformatf("round-robin burst period %.2f clocks (285 ns = 57)", period));
    wait (full_latched);
    n_overflow++;
    @(negedge ddr_clk);
    $display("bursts=%0d cpu_reads=%0d holdoffs=%0d multi_burst_cycles=%0d wraps=%0d stops=%0d mode_switches=%0d overflows=%0d",
             n_npi, n_plb, n_holdoff, n_multi, n_wrap, n_stop, n_mode, n_overflow);
    check(n_npi > 0, "burst writes happened");
    check(n_plb > 0, "processor reads happened");
    check(n_holdoff > 0, "NPI request held off by a processor read");
    check(n_multi > 0, "more than one burst waiting in the burst FIFO");
    check(n_wrap > 0, "address wrap");
    check(n_stop > 0, "stop trigger");
    check(n_mode > 0, "arbitration mode switch");
    check(n_overflow > 0, "burst FIFO overflow latched");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
