// Memory-controller port arbiter: decides which port's transaction the DDR
// controller performs next.
//
// Ports raise req and hold it until they see their bit of grant. A grant is
// given only while the DDR controller is idle (mc_ready), for one clock, to
// one port; the controller starts that port's transaction on the same edge.
// Two schemes, chosen by `mode`:
//   ARB_ROUND_ROBIN   top priority rotates over the ports in order; after
//                     a port is served the next port in order gets top
//                     priority. With two ports both always requesting this
//                     alternates NPI, PLB, NPI, PLB ...
//   ARB_NPI_PRIORITY  port PRIO_PORT (the NPI port) is served whenever it
//                     requests; the other ports are served, in rotation,
//                     only while it does not.
// The two schemes are those the design was evaluated with; rotating the
// pointer past the served port (rather than by one per transaction) is
// this design's reading of "each port is sequentially given top priority".
// The grant is combinational from req, mode, mc_ready and the rotation
// pointer; only the pointer is state.
module mpmc_arbiter #(
  parameter int unsigned NUM_PORTS = bbb_daq_pkg::NUM_PORTS,
  parameter int unsigned PRIO_PORT = bbb_daq_pkg::PORT_NPI,
  localparam int unsigned PW = (NUM_PORTS > 1) ? $clog2(NUM_PORTS) : 1
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  bbb_daq_pkg::arb_mode_e  mode,
  input  logic [NUM_PORTS-1:0]    req,
  input  logic                    mc_ready,
  output logic [NUM_PORTS-1:0]    grant,
  output logic                    grant_valid,
  output logic [PW-1:0]           grant_port
);
  import bbb_daq_pkg::*;

  logic [PW-1:0] top;  // port with top priority in round-robin order

  logic [PW-1:0] cand;  // candidate port in rotation order

  always_comb begin
    grant      = '0;
    grant_port = '0;
    cand       = '0;
    if (mc_ready) begin
      if (mode == ARB_NPI_PRIORITY && req[PRIO_PORT]) begin
        grant[PRIO_PORT] = 1'b1;
        grant_port       = PW'(PRIO_PORT);
      end else begin
        for (int k = NUM_PORTS - 1; k >= 0; k--) begin
          cand = PW'((int'(top) + k) % NUM_PORTS);
          if (req[cand]) begin
            grant       = '0;
            grant[cand] = 1'b1;
            grant_port  = cand;
          end
        end
      end
    end
  end
  assign grant_valid = |grant;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) top <= '0;
    else if (grant_valid)
      top <= (int'(grant_port) == NUM_PORTS - 1) ? '0 : grant_port + 1'b1;
  end

  a_onehot: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(grant));
  a_ready:  assert property (@(posedge clk) disable iff (!rst_n) grant_valid |-> mc_ready);
endmodule
