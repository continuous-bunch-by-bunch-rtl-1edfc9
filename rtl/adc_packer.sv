// ADC packer: puts one sample from each of the time-interleaved ADCs into a
// single packed word, each sample in a 16-bit lane, once per ADC clock.
//
// Two 12-bit ADCs run at 250 Msps, clocked half a period apart, so sample
// pair (adc[0], adc[1]) taken on one ADC clock is two consecutive bunches of
// a 500 MHz bunch train. Lane 0 (bits 15:0) holds adc[0], the earlier bunch,
// lane 1 (bits 31:16) holds adc[1]. Keeping each sample in whole bytes is
// what the design does to avoid crossing byte boundaries on the way to DDR;
// the lane order and how the spare upper bits are filled (zero by default,
// or a copy of the sign bit with SIGN_EXTEND=1) are this design's choices.
//
// Timing: one register stage. word/word_valid follow samples/sample_valid
// one clock later. ADC_BITS may be anything up to LANE_BITS (16 for a 16-bit
// converter).
module adc_packer #(
  parameter int unsigned ADC_BITS    = bbb_daq_pkg::ADC_BITS,
  parameter int unsigned LANE_BITS   = bbb_daq_pkg::LANE_BITS,
  parameter int unsigned NUM_ADC     = bbb_daq_pkg::NUM_ADC,
  parameter bit          SIGN_EXTEND = 1'b0
) (
  input  logic                              clk,
  input  logic                              rst_n,
  input  logic [NUM_ADC-1:0][ADC_BITS-1:0]  samples,
  input  logic                              sample_valid,
  output logic [NUM_ADC*LANE_BITS-1:0]      word,
  output logic                              word_valid
);
  if (ADC_BITS > LANE_BITS) begin : g_bad_width
    $error("adc_packer: ADC_BITS must not exceed LANE_BITS");
  end

  logic [NUM_ADC*LANE_BITS-1:0] packed_d;

  always_comb begin
    for (int i = 0; i < NUM_ADC; i++) begin
      logic [LANE_BITS-1:0] lane;
      lane = '0;
      for (int b = 0; b < LANE_BITS; b++) begin
        if (b < ADC_BITS) lane[b] = samples[i][b];
        else              lane[b] = SIGN_EXTEND ? samples[i][ADC_BITS-1] : 1'b0;
      end
      packed_d[i*LANE_BITS +: LANE_BITS] = lane;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      word       <= '0;
      word_valid <= 1'b0;
    end else begin
      word       <= packed_d;
      word_valid <= sample_valid;
    end
  end
endmodule
