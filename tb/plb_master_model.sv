// Behavioural model (not synthesizable) of the embedded processor's bus
// port running a tight loop of single 32-bit reads from one DDR address.
// It requests a read, holds the request until it is granted, waits for the
// read to complete (plb_done) and GAP further clocks, then requests again.
// With enable low it stops requesting after the current read.
`timescale 1ns/1ps
module plb_master_model #(
  parameter logic [31:0] ADDR = 32'h0F00_0000,
  parameter int          GAP  = 2
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        enable,
  output logic        plb_req,
  output logic [31:0] plb_addr,
  output logic        plb_rnw,
  input  logic        plb_ack,
  input  logic        plb_done
);
  typedef enum {P_IDLE, P_REQ, P_WAIT, P_GAP} st_e;
  st_e st = P_IDLE;
  int  gap_cnt = 0;

  assign plb_req  = (st == P_REQ);
  assign plb_addr = ADDR;
  assign plb_rnw  = 1'b1;

  always @(posedge clk) begin
    if (!rst_n) st <= P_IDLE;
    else case (st)
      P_IDLE: if (enable) st <= P_REQ;
      P_REQ:  if (plb_ack) st <= P_WAIT;
      P_WAIT: if (plb_done) begin st <= P_GAP; gap_cnt <= GAP; end
      P_GAP:  if (gap_cnt <= 1) st <= P_IDLE; else gap_cnt <= gap_cnt - 1;
    endcase
  end
endmodule
