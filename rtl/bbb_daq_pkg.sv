// Shared constants and types of the bunch-by-bunch DDR2 capture design.
//
// The numbers here are those of the 500 MHz / 12-bit capture system: two
// 12-bit ADCs each carried in a 16-bit lane, a 64-bit port into the memory
// controller, 256-byte (64 x 32-bit word) bursts and a 64 MByte buffer.
// The arbitration modes are the two schemes the design was evaluated with.
package bbb_daq_pkg;

  // Sample and word widths
  localparam int unsigned ADC_BITS     = 12;  // resolution of each ADC
  localparam int unsigned LANE_BITS    = 16;  // each sample is stored as 2 bytes
  localparam int unsigned NUM_ADC      = 2;   // time-interleaved ADCs
  localparam int unsigned PACK_W       = NUM_ADC * LANE_BITS;  // 32-bit packed word
  localparam int unsigned NPI_DW       = 64;  // native port data width
  localparam int unsigned BURST_WORDS  = 64;  // burst length in 32-bit words
  localparam int unsigned BURST_BYTES  = BURST_WORDS * 4;      // 256 bytes
  localparam int unsigned BURST_BEATS  = BURST_BYTES / (NPI_DW / 8);  // 32 beats of 64 bits
  localparam int unsigned ADDR_W       = 32;  // byte address on the memory ports
  localparam longint unsigned BUF_BYTES = 64'd67108864;  // 64 MByte capture buffer

  // Memory-controller port numbers (port 0 is the processor bus port)
  localparam int unsigned NUM_PORTS = 2;
  localparam int unsigned PORT_PLB  = 0;
  localparam int unsigned PORT_NPI  = 1;

  typedef enum logic {
    ARB_ROUND_ROBIN  = 1'b0,  // top priority rotates over the ports
    ARB_NPI_PRIORITY = 1'b1   // the NPI port always wins when it requests
  } arb_mode_e;

endpackage
