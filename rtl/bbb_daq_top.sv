// Continuous bunch-by-bunch capture into DDR2 SDRAM: top level.
//
// Data path: NUM_ADC time-interleaved ADCs (two 12-bit, 250 Msps, half a
// clock apart = 500 Msps bunch rate) -> adc_packer (each sample in a 16-bit
// lane, one 32-bit word per ADC clock, 1 GByte/s) -> my_npi_core (burst
// FIFO across to the 200 MHz DDR clock, burst control) -> npi_write_fifo ->
// DDR memory controller. The memory controller is shared with a processor
// bus (PLB) port; mpmc_arbiter picks which port's transaction runs next,
// round-robin or with the NPI port always first.
//
// The DDR2 controller/PHY that executes transactions and the processor are
// outside this module; their connections are ports:
//   mc_ready      controller idle and able to start a transaction
//   mc_start      one-clock pulse: start the transaction of port mc_port
//                 (mc_addr, mc_rnw); for the NPI port this is a write burst
//                 of BURST_BEATS x 64 bit taken from mc_wr_data, one entry
//                 per mc_wr_pop, show-ahead
//   plb_req/ack   processor port request, held until plb_ack
// capture_en (DDR clock domain) starts a capture on its rising edge and
// stops it when it falls; it is synchronised into the ADC clock domain to
// gate the samples. full_latched reports, in the DDR clock domain, that the
// burst FIFO filled (data were lost) since the capture started.
// The chain of blocks, the clock rates and the two arbitration modes follow
// the published system; the transaction-level interface to the memory
// controller and the capture_en control are this design's own. A new
// capture may follow a stop without a reset: the leftover of the previous
// one (less than a burst) is discarded and the gearbox realigned.
module bbb_daq_top #(
  parameter int unsigned     ADC_BITS   = bbb_daq_pkg::ADC_BITS,
  parameter int unsigned     NUM_ADC    = bbb_daq_pkg::NUM_ADC,
  parameter int unsigned     FIFO_DEPTH = 2048,
  parameter int unsigned     WF_DEPTH   = 2 * bbb_daq_pkg::BURST_BEATS,
  parameter logic [31:0]     BASE_ADDR  = 32'h0000_0000,
  parameter longint unsigned BUF_BYTES  = bbb_daq_pkg::BUF_BYTES,
  localparam int unsigned    DW         = bbb_daq_pkg::NPI_DW,
  localparam int unsigned    IN_W       = NUM_ADC * bbb_daq_pkg::LANE_BITS,
  localparam int unsigned    AW         = bbb_daq_pkg::ADDR_W,
  localparam int unsigned    FCW        = $clog2(FIFO_DEPTH) + 1,
  localparam int unsigned    WCW        = $clog2(WF_DEPTH) + 1
) (
  // ADC clock domain
  input  logic                             adc_clk,
  input  logic                             adc_rst_n,
  input  logic [NUM_ADC-1:0][ADC_BITS-1:0] adc_samples,
  // DDR clock domain: control and status
  input  logic                             ddr_clk,
  input  logic                             ddr_rst_n,
  input  logic                             capture_en,
  input  bbb_daq_pkg::arb_mode_e           arb_mode,
  output logic                             full_latched,
  output logic [AW-1:0]                    next_addr,
  output logic [31:0]                      burst_count,
  output logic                             wrapped,
  output logic [FCW-1:0]                   fifo_level,
  // processor bus port of the memory controller
  input  logic                             plb_req,
  input  logic [AW-1:0]                    plb_addr,
  input  logic                             plb_rnw,
  output logic                             plb_ack,
  // memory controller transaction side
  input  logic                             mc_ready,
  output logic                             mc_start,
  output logic                             mc_port,
  output logic [AW-1:0]                    mc_addr,
  output logic                             mc_rnw,
  input  logic                             mc_wr_pop,
  output logic [DW-1:0]                    mc_wr_data
);
  import bbb_daq_pkg::*;

  // ---------------- ADC clock domain ----------------
  logic            cap_adc, cap_adc_q;
  logic [IN_W-1:0] packed_word;
  logic            packed_valid;
  logic            full_latched_adc;

  cdc_sync #(.W(1)) u_sync_cap (
    .clk(adc_clk), .rst_n(adc_rst_n), .d(capture_en), .q(cap_adc)
  );

  always_ff @(posedge adc_clk or negedge adc_rst_n) begin
    if (!adc_rst_n) cap_adc_q <= 1'b0;
    else            cap_adc_q <= cap_adc;
  end

  adc_packer #(
    .ADC_BITS(ADC_BITS),
    .NUM_ADC (NUM_ADC)
  ) u_packer (
    .clk         (adc_clk),
    .rst_n       (adc_rst_n),
    .samples     (adc_samples),
    .sample_valid(cap_adc),
    .word        (packed_word),
    .word_valid  (packed_valid)
  );

  // ---------------- DDR clock domain ----------------
  logic          wf_push;
  logic [DW-1:0] wf_data;
  logic [WCW-1:0] wf_space, wf_count;
  logic          npi_req, npi_rnw, npi_ack;
  logic [AW-1:0] npi_addr;
  logic          ctrl_busy;
  logic [NUM_PORTS-1:0] req, grant;
  logic          grant_valid;
  logic          grant_port;

  my_npi_core #(
    .IN_W      (IN_W),
    .DW        (DW),
    .BEATS     (BURST_BEATS),
    .FIFO_DEPTH(FIFO_DEPTH),
    .WF_CNT_W  (WCW),
    .BASE_ADDR (BASE_ADDR),
    .BUF_BYTES (BUF_BYTES),
    .ADDR_W    (AW)
  ) u_npi_core (
    .adc_clk         (adc_clk),
    .adc_rst_n       (adc_rst_n),
    .in_valid        (packed_valid),
    .in_data         (packed_word),
    .in_realign      (cap_adc && !cap_adc_q),
    .clear_full_latch(cap_adc && !cap_adc_q),
    .full_latched    (full_latched_adc),
    .ddr_clk         (ddr_clk),
    .ddr_rst_n       (ddr_rst_n),
    .capture_en      (capture_en),
    .wf_push         (wf_push),
    .wf_data         (wf_data),
    .wf_space        (wf_space),
    .npi_addr_req    (npi_req),
    .npi_addr        (npi_addr),
    .npi_rnw         (npi_rnw),
    .npi_addr_ack    (npi_ack),
    .fifo_level      (fifo_level),
    .next_addr       (next_addr),
    .burst_count     (burst_count),
    .wrapped         (wrapped),
    .busy            (ctrl_busy)
  );

  cdc_sync #(.W(1)) u_sync_full (
    .clk(ddr_clk), .rst_n(ddr_rst_n), .d(full_latched_adc), .q(full_latched)
  );

  npi_write_fifo #(
    .DW   (DW),
    .DEPTH(WF_DEPTH)
  ) u_npi_wfifo (
    .clk      (ddr_clk),
    .rst_n    (ddr_rst_n),
    .push     (wf_push),
    .push_data(wf_data),
    .pop      (mc_wr_pop),
    .pop_data (mc_wr_data),
    .count    (wf_count),
    .space    (wf_space)
  );

  always_comb begin
    req           = '0;
    req[PORT_PLB] = plb_req;
    req[PORT_NPI] = npi_req;
  end

  mpmc_arbiter #(
    .NUM_PORTS(NUM_PORTS),
    .PRIO_PORT(PORT_NPI)
  ) u_arbiter (
    .clk        (ddr_clk),
    .rst_n      (ddr_rst_n),
    .mode       (arb_mode),
    .req        (req),
    .mc_ready   (mc_ready),
    .grant      (grant),
    .grant_valid(grant_valid),
    .grant_port (grant_port)
  );

  assign npi_ack  = grant[PORT_NPI];
  assign plb_ack  = grant[PORT_PLB];
  assign mc_start = grant_valid;
  assign mc_port  = grant_port;
  assign mc_addr  = (grant_port == 1'(PORT_NPI)) ? npi_addr : plb_addr;
  assign mc_rnw   = (grant_port == 1'(PORT_NPI)) ? npi_rnw  : plb_rnw;

  // The write FIFO holds at most the data of the bursts requested or being
  // requested; ctrl_busy and wf_count are kept for observation only.
  logic unused_ok;
  assign unused_ok = ^{ctrl_busy, wf_count};
endmodule
