// gyro_sensor_if: the gyro sensor data interface placed in programmable
// logic. It samples both channels of a dual-channel 16-bit ADC at 500 kSPS
// and streams the samples as packetised AXI4-Stream toward an AXI DMA
// engine working in S2MM (stream-to-memory) mode.
//
// Structure: ads8354_ctrl paces conversions and turns the two serial ADC
// outputs into one parallel sample. axis_packetizer turns each sample into a
// 32-bit stream word and marks every 32nd word with TLAST. The DMA then
// writes fixed 128-byte packets into a DDR buffer without processor
// involvement. At the defaults the stream carries one word every 200 clocks
// (100 MHz / 500 kSPS): 4 bytes * 500 k/s = 2 MB/s, and one packet every
// 6400 clocks (64 us). A sample appears on TVALID 131 clocks after its
// conversion frame starts.
//
// Interface: fabric clock `clk` with active-low asynchronous reset `rst_n`;
// `enable` starts and stops acquisition; ADC pins adc_*; the AXI4-Stream
// master m_axis_* connects to the DMA's S2MM slave port. `overflow` and
// `drop_count` report samples lost because the DMA held TREADY low for more
// than a sample period; they stay zero in loss-free operation.
//
// The split into a sampling controller and a packetizer, the enable input
// and the overflow report are this design's own; the rates, widths and
// packet length follow the system specification.
module gyro_sensor_if
  import gyro_pkg::*;
#(
  parameter int unsigned SAMPLE_DIV  = CLK_HZ / SAMPLE_HZ,  // 200 clocks per sample
  parameter int unsigned SCLK_HALF   = 2,                   // SCLK = clk / 4
  parameter int unsigned FRAME_SCLKS = 32,                  // SCLK periods per frame
  parameter int unsigned PKT_WORDS_P = PKT_WORDS,           // words per packet
  parameter int unsigned DROP_W      = 16
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   enable,

  // ADC pins
  output logic                   adc_cs_n,
  output logic                   adc_sclk,
  output logic                   adc_sdi,
  input  logic                   adc_sdo_a,
  input  logic                   adc_sdo_b,

  // AXI4-Stream master toward the DMA S2MM channel
  output logic [AXIS_DATA_W-1:0] m_axis_tdata,
  output logic [AXIS_KEEP_W-1:0] m_axis_tkeep,
  output logic                   m_axis_tlast,
  output logic                   m_axis_tvalid,
  input  logic                   m_axis_tready,

  // status
  output logic                   busy,
  output logic                   overflow,
  output logic [DROP_W-1:0]      drop_count
);

  gyro_sample_t sample;
  logic         sample_valid;

  ads8354_ctrl #(
    .SAMPLE_DIV  (SAMPLE_DIV),
    .SCLK_HALF   (SCLK_HALF),
    .FRAME_SCLKS (FRAME_SCLKS),
    .DATA_BITS   (ADC_BITS)
  ) u_adc (
    .clk          (clk),
    .rst_n        (rst_n),
    .enable       (enable),
    .adc_cs_n     (adc_cs_n),
    .adc_sclk     (adc_sclk),
    .adc_sdi      (adc_sdi),
    .adc_sdo_a    (adc_sdo_a),
    .adc_sdo_b    (adc_sdo_b),
    .sample       (sample),
    .sample_valid (sample_valid),
    .busy         (busy)
  );

  axis_packetizer #(
    .PKT_WORDS_P (PKT_WORDS_P),
    .DROP_W      (DROP_W)
  ) u_pkt (
    .clk           (clk),
    .rst_n         (rst_n),
    .in_sample     (sample),
    .in_valid      (sample_valid),
    .m_axis_tdata  (m_axis_tdata),
    .m_axis_tkeep  (m_axis_tkeep),
    .m_axis_tlast  (m_axis_tlast),
    .m_axis_tvalid (m_axis_tvalid),
    .m_axis_tready (m_axis_tready),
    .overflow      (overflow),
    .drop_count    (drop_count)
  );

endmodule
