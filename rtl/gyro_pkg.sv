// Shared constants and types of the gyro sensor interface.
//
// The acquisition path reads a dual-channel 16-bit ADC at 500 kSPS from a
// 100 MHz fabric clock and ships every sample as one 32-bit AXI4-Stream word;
// a packet is 32 words (128 bytes). These numbers are the ones the
// acquisition system is specified with. The word layout (channel A in the low
// half, channel B in the high half) is this design's own choice.
package gyro_pkg;

  // Fabric clock and sampling rate.
  localparam int unsigned CLK_HZ      = 100_000_000;
  localparam int unsigned SAMPLE_HZ   = 500_000;

  // ADC resolution and stream geometry.
  localparam int unsigned ADC_BITS    = 16;
  localparam int unsigned AXIS_DATA_W = 32;
  localparam int unsigned AXIS_KEEP_W = AXIS_DATA_W / 8;
  localparam int unsigned PKT_WORDS   = 32;

  // One conversion of both channels, packed as it appears on TDATA.
  typedef struct packed {
    logic [ADC_BITS-1:0] ch_b;  // TDATA[31:16]
    logic [ADC_BITS-1:0] ch_a;  // TDATA[15:0]
  } gyro_sample_t;

endpackage
