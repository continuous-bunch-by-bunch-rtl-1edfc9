// NPI burst control logic: moves ADC data from the burst FIFO into the
// memory controller's native-port write FIFO one burst at a time and then
// asks the memory controller to write that burst to DDR.
//
// Operation, in the DDR clock domain:
//   IDLE  wait until the burst FIFO holds a whole burst (BEATS entries of
//         DW bits, 64 x 32-bit words = 256 bytes by default) and the write
//         FIFO has room for one;
//   FILL  read BEATS entries from the burst FIFO and push each into the
//         write FIFO, one per clock (the burst FIFO read has one clock of
//         latency, so pushes trail reads by one clock);
//   REQ   hold npi_addr_req with the burst's byte address until the memory
//         controller's arbiter acknowledges it, then advance the address by
//         one burst and return to IDLE.
// The write FIFO holds two bursts, so the next burst is filled while the
// previous one is being written to DDR; throughput is then set by the
// memory controller alone.
//
// Addresses run through a circular buffer of BUF_BYTES starting at
// BASE_ADDR; after the last burst of the buffer the address returns to
// BASE_ADDR and `wrapped` is set. A rising edge of capture_en (the start of
// a capture) restarts the address at BASE_ADDR and clears the counters, so
// after a stop trigger the buffer holds the most recent BUF_BYTES of data
// ending just below next_addr. At that start the controller first discards
// (DROP state) whatever the burst FIFO still holds from the previous
// capture, less than one burst left when it stopped, so that a new buffer
// begins with new data. Samples of the new capture cannot yet be counted
// then: they reach the read-side count only several clocks later, through
// the ADC-domain gating and the pointer synchroniser. The fill-then-request order and the burst
// size follow the document; the circular addressing, the start/stop
// handling and the status outputs are this design's choices.
module npi_burst_ctrl #(
  parameter int unsigned     DW          = bbb_daq_pkg::NPI_DW,
  parameter int unsigned     BEATS       = bbb_daq_pkg::BURST_BEATS,
  parameter int unsigned     ADDR_W      = bbb_daq_pkg::ADDR_W,
  parameter logic [31:0]     BASE_ADDR   = 32'h0000_0000,
  parameter longint unsigned BUF_BYTES   = bbb_daq_pkg::BUF_BYTES,
  parameter int unsigned     FIFO_CNT_W  = 12,   // width of the burst FIFO count
  parameter int unsigned     WF_CNT_W    = 7,    // width of the write FIFO space
  localparam int unsigned    BURST_BYTES = BEATS * DW / 8
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  capture_en,
  // burst FIFO read side
  input  logic [FIFO_CNT_W-1:0] fifo_rd_count,
  output logic                  fifo_rd_en,
  input  logic [DW-1:0]         fifo_rd_data,
  // NPI write FIFO
  output logic                  wf_push,
  output logic [DW-1:0]         wf_data,
  input  logic [WF_CNT_W-1:0]   wf_space,
  // NPI address request
  output logic                  npi_addr_req,
  output logic [ADDR_W-1:0]     npi_addr,
  output logic                  npi_rnw,
  input  logic                  npi_addr_ack,
  // status
  output logic [ADDR_W-1:0]     next_addr,
  output logic [31:0]           burst_count,
  output logic                  wrapped,
  output logic                  busy
);
  localparam int unsigned BW = $clog2(BEATS + 1);
  localparam logic [ADDR_W-1:0] BUF_END = ADDR_W'(BASE_ADDR + BUF_BYTES);

  typedef enum logic [1:0] {S_IDLE, S_FILL, S_REQ, S_DROP} state_e;
  state_e       state;
  logic [BW-1:0] rd_issued, pushed;
  logic [FIFO_CNT_W-1:0] drop_left;
  logic          cap_q;
  logic          start;
  logic [ADDR_W-1:0] addr, addr_inc;

  assign start   = capture_en && !cap_q;
  assign npi_rnw = 1'b0;  // this port only writes
  assign npi_addr_req = (state == S_REQ);
  assign npi_addr     = addr;
  assign next_addr    = addr;
  assign busy         = (state != S_IDLE);
  assign fifo_rd_en   = ((state == S_FILL) && (rd_issued != BW'(BEATS))) ||
                        ((state == S_DROP) && (drop_left != '0));
  assign wf_data      = fifo_rd_data;
  assign addr_inc     = addr + ADDR_W'(BURST_BYTES);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= S_IDLE;
      rd_issued   <= '0;
      pushed      <= '0;
      wf_push     <= 1'b0;
      drop_left   <= '0;
      cap_q       <= 1'b0;
      addr        <= BASE_ADDR[ADDR_W-1:0];
      burst_count <= '0;
      wrapped     <= 1'b0;
    end else begin
      cap_q   <= capture_en;
      wf_push <= fifo_rd_en && (state == S_FILL);
      unique case (state)
        S_IDLE: begin
          if (start) begin
            addr        <= BASE_ADDR[ADDR_W-1:0];
            burst_count <= '0;
            wrapped     <= 1'b0;
            if (fifo_rd_count != '0) begin
              state     <= S_DROP;
              drop_left <= fifo_rd_count;
            end
          end else if (fifo_rd_count >= FIFO_CNT_W'(BEATS) &&
                       wf_space >= WF_CNT_W'(BEATS)) begin
            state     <= S_FILL;
            rd_issued <= '0;
            pushed    <= '0;
          end
        end
        S_FILL: begin
          if (fifo_rd_en) rd_issued <= rd_issued + 1'b1;
          if (wf_push) begin
            pushed <= pushed + 1'b1;
            if (pushed == BW'(BEATS - 1)) state <= S_REQ;
          end
        end
        S_REQ: begin
          if (npi_addr_ack) begin
            state       <= S_IDLE;
            burst_count <= burst_count + 1'b1;
            if (addr_inc == BUF_END) begin
              addr    <= BASE_ADDR[ADDR_W-1:0];
              wrapped <= 1'b1;
            end else begin
              addr <= addr_inc;
            end
          end
        end
        S_DROP: begin
          if (drop_left != '0) drop_left <= drop_left - 1'b1;
          else                 state     <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // A request stays up, with a stable address, until it is acknowledged
  a_req_hold: assert property (@(posedge clk) disable iff (!rst_n)
                               npi_addr_req && !npi_addr_ack |=> npi_addr_req && $stable(npi_addr));
  // Pushes never exceed one burst per request
  a_no_ack_idle: assert property (@(posedge clk) disable iff (!rst_n)
                                  npi_addr_ack |-> npi_addr_req);
endmodule
