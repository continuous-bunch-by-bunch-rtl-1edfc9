// Burst FIFO: the dual-clock buffer between the ADC clock domain and the DDR
// clock domain.
//
// Packed ADC words (WR_W bits, 32 for the two-ADC system, 64 for the 64-bit
// input variant) are written every ADC clock. A small gearbox collects
// RD_W/WR_W consecutive words, first word in the low bits, into one RD_W-bit
// entry so that the read side, at the slower DDR clock, moves 64 bits per
// clock: 250 MHz x 32 bit (1.0 GByte/s) in, up to 200 MHz x 64 bit
// (1.6 GByte/s) out. Pointers cross the clock domains Gray-coded through
// two-flop synchronisers, so the fill level each side sees is conservative.
//
// Besides moving data across clocks, the FIFO absorbs the time during which
// the memory controller holds off the burst request. If it ever fills, the
// entry that does not fit is dropped and full_latched is set; it stays set
// until clear_latch (write domain) so that a loss of continuity can be seen
// after a long capture. wr_realign marks the start of a new word stream: a
// half-collected entry left from an earlier stream is abandoned and the word
// written with (or after) it becomes the low word of a new entry.
//
// Timing: rd_data is valid the clock after rd_en (block-RAM style read).
// rd_count is the number of entries the read side may take. DEPTH is the
// number of RD_W-bit entries and must be a power of two; the document only
// says the FIFO may be as deep as the FPGA resources allow, 2048 x 64 bit
// (16 KByte) is this design's choice.
module burst_fifo #(
  parameter int unsigned WR_W  = 32,
  parameter int unsigned RD_W  = 64,
  parameter int unsigned DEPTH = 2048,
  localparam int unsigned AW   = $clog2(DEPTH),
  localparam int unsigned RATIO = RD_W / WR_W
) (
  // write side, ADC clock domain
  input  logic            wr_clk,
  input  logic            wr_rst_n,
  input  logic            wr_en,
  input  logic [WR_W-1:0] wr_data,
  input  logic            wr_realign,
  input  logic            clear_latch,
  output logic            full,
  output logic            full_latched,
  output logic [AW:0]     wr_count,
  // read side, DDR clock domain
  input  logic            rd_clk,
  input  logic            rd_rst_n,
  input  logic            rd_en,
  output logic [RD_W-1:0] rd_data,
  output logic [AW:0]     rd_count
);
  if (RATIO * WR_W != RD_W || (RATIO & (RATIO - 1)) != 0) begin : g_bad_ratio
    $error("burst_fifo: RD_W must be WR_W times a power of two");
  end
  if ((DEPTH & (DEPTH - 1)) != 0) begin : g_bad_depth
    $error("burst_fifo: DEPTH must be a power of two");
  end

  logic [RD_W-1:0] mem [DEPTH];

  function automatic logic [AW:0] bin2gray(input logic [AW:0] b);
    return b ^ (b >> 1);
  endfunction

  function automatic logic [AW:0] gray2bin(input logic [AW:0] g);
    logic [AW:0] b;
    b[AW] = g[AW];
    for (int i = AW - 1; i >= 0; i--) b[i] = b[i+1] ^ g[i];
    return b;
  endfunction

  logic [AW:0]      rptr;           // read pointer (read domain)

  // ---------------- write domain ----------------
  logic [AW:0]      wptr, wptr_gray;
  logic [AW:0]      rptr_gray_w, rptr_bin_w;
  logic [RD_W-1:0]  gear;           // words collected so far
  logic             gear_last;      // this word completes an entry
  logic             entry_we;

  cdc_sync #(.W(AW + 1)) u_sync_rptr (
    .clk(wr_clk), .rst_n(wr_rst_n), .d(bin2gray(rptr)), .q(rptr_gray_w)
  );
  assign rptr_bin_w = gray2bin(rptr_gray_w);
  assign wr_count   = wptr - rptr_bin_w;
  assign full       = (wr_count == (AW + 1)'(DEPTH));

  if (RATIO == 1) begin : g_no_gear
    assign gear_last = 1'b1;
    assign gear      = '0;
    logic unused_realign;
    assign unused_realign = wr_realign;
  end else begin : g_gear
    localparam int unsigned GW = $clog2(RATIO);
    logic [GW-1:0] gear_cnt, gear_pos;
    assign gear_pos  = wr_realign ? '0 : gear_cnt;
    assign gear_last = (gear_pos == GW'(RATIO - 1));
    always_ff @(posedge wr_clk or negedge wr_rst_n) begin
      if (!wr_rst_n) begin
        gear_cnt <= '0;
        gear     <= '0;
      end else if (wr_en) begin
        gear_cnt <= gear_pos + 1'b1;
        gear[gear_pos*WR_W +: WR_W] <= wr_data;
      end else if (wr_realign) begin
        gear_cnt <= '0;
      end
    end
  end

  assign entry_we = wr_en && gear_last && !full;

  // Entry written to RAM: earlier words from the gearbox, newest word on top
  logic [RD_W-1:0] entry;
  always_comb begin
    entry = gear;
    entry[RD_W-1 -: WR_W] = wr_data;
  end

  always_ff @(posedge wr_clk) begin
    if (entry_we) mem[wptr[AW-1:0]] <= entry;
  end

  always_ff @(posedge wr_clk or negedge wr_rst_n) begin
    if (!wr_rst_n) begin
      wptr         <= '0;
      full_latched <= 1'b0;
    end else begin
      if (entry_we) wptr <= wptr + 1'b1;
      if (clear_latch)                       full_latched <= 1'b0;
      else if (full && wr_en && gear_last)   full_latched <= 1'b1;
    end
  end

  // ---------------- read domain ----------------
  logic [AW:0] wptr_gray_r, wptr_bin_r;

  assign wptr_gray = bin2gray(wptr);
  cdc_sync #(.W(AW + 1)) u_sync_wptr (
    .clk(rd_clk), .rst_n(rd_rst_n), .d(wptr_gray), .q(wptr_gray_r)
  );
  assign wptr_bin_r = gray2bin(wptr_gray_r);
  assign rd_count   = wptr_bin_r - rptr;

  always_ff @(posedge rd_clk) begin
    if (rd_en) rd_data <= mem[rptr[AW-1:0]];
  end

  always_ff @(posedge rd_clk or negedge rd_rst_n) begin
    if (!rd_rst_n) rptr <= '0;
    else if (rd_en && rd_count != '0) rptr <= rptr + 1'b1;
  end

  // Reading an empty FIFO is a protocol error of the reader
  a_no_underflow: assert property (@(posedge rd_clk) disable iff (!rd_rst_n)
                                   rd_en |-> rd_count != '0);
endmodule
