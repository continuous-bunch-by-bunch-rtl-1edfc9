// Behavioural model (not synthesizable) of the DDR2 memory controller and
// PHY behind the arbitrated ports, at transaction level, for testbenches.
//
// While idle it raises mc_ready; on mc_start it performs the granted port's
// transaction and is busy for a fixed time measured from mc_start to the
// next possible mc_start:
//   NPI write burst: NPI_CYCLES clocks (45 x 5 ns = 225 ns for a 256-byte
//     burst at 200 MHz, 32-bit DDR2, 64-bit port); it pops the BEATS
//     entries of the burst from the write FIFO on clocks POP_LAT ..
//     POP_LAT+BEATS-1 after the start and reports each as a written beat
//     (beat_valid/beat_addr/beat_data) for the testbench to store or check.
//   PLB single read: PLB_CYCLES clocks (12 x 5 ns = 60 ns), after which
//     plb_done pulses.
// The two durations reproduce the published transaction spacing: 285 ns per
// NPI burst when NPI and PLB alternate, 510 ns for two NPI bursts and one
// PLB read. DRAM refresh and bank effects are not modelled.
`timescale 1ns/1ps
module mc_ddr_model #(
  parameter int NPI_CYCLES = 45,
  parameter int PLB_CYCLES = 12,
  parameter int BEATS      = 32,
  parameter int POP_LAT    = 8,
  parameter int PORT_NPI   = 1
) (
  input  logic        clk,
  input  logic        rst_n,
  output logic        mc_ready,
  input  logic        mc_start,
  input  logic        mc_port,
  input  logic [31:0] mc_addr,
  input  logic        mc_rnw,
  output logic        mc_wr_pop,
  input  logic [63:0] mc_wr_data,
  output logic        beat_valid,
  output logic [31:0] beat_addr,
  output logic [63:0] beat_data,
  output logic        plb_done
);
  int          remaining = 0, elapsed = 0;
  bit          cur_npi = 0;
  logic [31:0] cur_addr;

  assign mc_ready   = rst_n && remaining == 0;
  assign mc_wr_pop  = remaining > 0 && cur_npi && elapsed >= POP_LAT && elapsed < POP_LAT + BEATS;
  assign beat_valid = mc_wr_pop;
  assign beat_data  = mc_wr_data;
  assign beat_addr  = cur_addr + 32'((elapsed - POP_LAT) * 8);

  always @(posedge clk) begin
    plb_done <= 1'b0;
    if (!rst_n) begin
      remaining <= 0;
      elapsed   <= 0;
    end else if (mc_start) begin
      cur_npi   <= (int'(mc_port) == PORT_NPI);
      cur_addr  <= mc_addr;
      remaining <= (int'(mc_port) == PORT_NPI) ? NPI_CYCLES - 1 : PLB_CYCLES - 1;
      elapsed   <= 1;
      if (int'(mc_port) == PORT_NPI && mc_rnw) $display("mc_ddr_model: unexpected NPI read");
    end else if (remaining > 0) begin
      remaining <= remaining - 1;
      elapsed   <= elapsed + 1;
      if (remaining == 1 && !cur_npi) plb_done <= 1'b1;
    end
  end
endmodule
