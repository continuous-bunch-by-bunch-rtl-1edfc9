// My NPI burst controller core: the custom logic between the packed ADC
// data and the memory controller's native port interface (NPI).
//
// It is the burst FIFO (dual-clock, ADC clock in, DDR clock out, with a
// latched full flag) followed by the burst control logic that moves one
// 256-byte burst at a time into the NPI write FIFO and then requests the
// burst write. IN_W is the width of the input port: 32 bits (two 16-bit
// samples per ADC clock) in the main configuration, 64 bits in the variant
// with a 64-bit input port. Both sides run continuously; see burst_fifo and
// npi_burst_ctrl for timing. The split into a burst FIFO and control logic,
// and the two input widths, follow the published core; the status outputs
// are this design's additions.
module my_npi_core #(
  parameter int unsigned     IN_W        = bbb_daq_pkg::PACK_W,
  parameter int unsigned     DW          = bbb_daq_pkg::NPI_DW,
  parameter int unsigned     BEATS       = bbb_daq_pkg::BURST_BEATS,
  parameter int unsigned     FIFO_DEPTH  = 2048,
  parameter int unsigned     WF_CNT_W    = 7,
  parameter logic [31:0]     BASE_ADDR   = 32'h0000_0000,
  parameter longint unsigned BUF_BYTES   = bbb_daq_pkg::BUF_BYTES,
  parameter int unsigned     ADDR_W      = bbb_daq_pkg::ADDR_W,
  localparam int unsigned    FCW         = $clog2(FIFO_DEPTH) + 1
) (
  // ADC clock domain
  input  logic                adc_clk,
  input  logic                adc_rst_n,
  input  logic                in_valid,
  input  logic [IN_W-1:0]     in_data,
  input  logic                in_realign,
  input  logic                clear_full_latch,
  output logic                full_latched,
  // DDR clock domain
  input  logic                ddr_clk,
  input  logic                ddr_rst_n,
  input  logic                capture_en,
  output logic                wf_push,
  output logic [DW-1:0]       wf_data,
  input  logic [WF_CNT_W-1:0] wf_space,
  output logic                npi_addr_req,
  output logic [ADDR_W-1:0]   npi_addr,
  output logic                npi_rnw,
  input  logic                npi_addr_ack,
  output logic [FCW-1:0]      fifo_level,
  output logic [ADDR_W-1:0]   next_addr,
  output logic [31:0]         burst_count,
  output logic                wrapped,
  output logic                busy
);
  logic          fifo_rd_en;
  logic [DW-1:0] fifo_rd_data;
  logic          fifo_full;
  logic [FCW-1:0] fifo_wr_count;

  burst_fifo #(
    .WR_W (IN_W),
    .RD_W (DW),
    .DEPTH(FIFO_DEPTH)
  ) u_burst_fifo (
    .wr_clk      (adc_clk),
    .wr_rst_n    (adc_rst_n),
    .wr_en       (in_valid),
    .wr_data     (in_data),
    .wr_realign  (in_realign),
    .clear_latch (clear_full_latch),
    .full        (fifo_full),
    .full_latched(full_latched),
    .wr_count    (fifo_wr_count),
    .rd_clk      (ddr_clk),
    .rd_rst_n    (ddr_rst_n),
    .rd_en       (fifo_rd_en),
    .rd_data     (fifo_rd_data),
    .rd_count    (fifo_level)
  );

  npi_burst_ctrl #(
    .DW        (DW),
    .BEATS     (BEATS),
    .ADDR_W    (ADDR_W),
    .BASE_ADDR (BASE_ADDR),
    .BUF_BYTES (BUF_BYTES),
    .FIFO_CNT_W(FCW),
    .WF_CNT_W  (WF_CNT_W)
  ) u_ctrl (
    .clk          (ddr_clk),
    .rst_n        (ddr_rst_n),
    .capture_en   (capture_en),
    .fifo_rd_count(fifo_level),
    .fifo_rd_en   (fifo_rd_en),
    .fifo_rd_data (fifo_rd_data),
    .wf_push      (wf_push),
    .wf_data      (wf_data),
    .wf_space     (wf_space),
    .npi_addr_req (npi_addr_req),
    .npi_addr     (npi_addr),
    .npi_rnw      (npi_rnw),
    .npi_addr_ack (npi_addr_ack),
    .next_addr    (next_addr),
    .burst_count  (burst_count),
    .wrapped      (wrapped),
    .busy         (busy)
  );

  // The instantaneous full flag and write-side level are only used through
  // the latched flag; they are kept for observation in simulation.
  logic unused_ok;
  assign unused_ok = ^{fifo_full, fifo_wr_count};
endmodule
