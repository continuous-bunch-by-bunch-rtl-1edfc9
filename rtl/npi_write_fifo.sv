// NPI write FIFO: the single-clock FIFO at the memory controller's native
// port that holds burst data until the controller writes it to DDR.
//
// The controller core pushes a whole burst before requesting the write; the
// memory controller pops the entries while it performs the burst. DEPTH is
// two bursts (2 x 32 entries of 64 bits) so one burst can be filled while
// the previous one drains; the document only says the FIFO is required for
// burst transfers, so its depth and the show-ahead read (pop_data always
// shows the oldest entry) are this design's choices.
//
// Timing: push and pop take effect on the clock edge; space and count are
// registered-state derived and valid every cycle. Pushing when full or
// popping when empty is a protocol error and is ignored.
module npi_write_fifo #(
  parameter int unsigned DW    = bbb_daq_pkg::NPI_DW,
  parameter int unsigned DEPTH = 2 * bbb_daq_pkg::BURST_BEATS,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          push,
  input  logic [DW-1:0] push_data,
  input  logic          pop,
  output logic [DW-1:0] pop_data,
  output logic [AW:0]   count,
  output logic [AW:0]   space
);
  if ((DEPTH & (DEPTH - 1)) != 0) begin : g_bad_depth
    $error("npi_write_fifo: DEPTH must be a power of two");
  end

  logic [DW-1:0] mem [DEPTH];
  logic [AW:0]   wptr, rptr;
  logic          do_push, do_pop;

  assign count    = wptr - rptr;
  assign space    = (AW + 1)'(DEPTH) - count;
  assign do_push  = push && (count != (AW + 1)'(DEPTH));
  assign do_pop   = pop && (count != '0);
  assign pop_data = mem[rptr[AW-1:0]];

  always_ff @(posedge clk) begin
    if (do_push) mem[wptr[AW-1:0]] <= push_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wptr <= '0;
      rptr <= '0;
    end else begin
      if (do_push) wptr <= wptr + 1'b1;
      if (do_pop)  rptr <= rptr + 1'b1;
    end
  end

  a_no_overflow:  assert property (@(posedge clk) disable iff (!rst_n)
                                   push |-> count != (AW + 1)'(DEPTH));
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n)
                                   pop |-> count != '0);
endmodule
