// axis_packetizer: turns the ADC sample strobe into a packetised
// AXI4-Stream for an S2MM DMA channel.
//
// Each dual-channel sample becomes one 32-bit TDATA word (channel A in
// [15:0], channel B in [31:16]) with all TKEEP bits set. A word counter
// raises TLAST on every PKT_WORDS-th accepted word, so the stream is cut into
// fixed 32-word (128-byte) packets that tell the DMA where each transfer
// ends. These two points, the 32-bit word and TLAST every 32 words, follow
// the acquisition system's specification.
//
// The output is one register stage: a sample is loaded when the register is
// empty or is being emptied in the same clock (TVALID && TREADY). While the
// DMA stalls, TDATA/TLAST are held. A sample that arrives while the register
// is still full cannot be stored. It is dropped, `overflow` is set (sticky
// until reset) and `drop_count` (saturating) counts it. A dropped sample
// does not advance the word counter, so packets stay 32 words long. Latency
// from `in_valid` to TVALID is one clock. This overflow handling is this
// design's own choice; the specification only requires that no sample is
// lost at 500 kSPS, which `overflow` lets a system check.
module axis_packetizer
  import gyro_pkg::*;
#(
  parameter int unsigned PKT_WORDS_P = PKT_WORDS,  // words per packet (TLAST period)
  parameter int unsigned DROP_W      = 16          // width of the drop counter
) (
  input  logic                   clk,
  input  logic                   rst_n,

  input  gyro_sample_t           in_sample,
  input  logic                   in_valid,

  output logic [AXIS_DATA_W-1:0] m_axis_tdata,
  output logic [AXIS_KEEP_W-1:0] m_axis_tkeep,
  output logic                   m_axis_tlast,
  output logic                   m_axis_tvalid,
  input  logic                   m_axis_tready,

  output logic                   overflow,
  output logic [DROP_W-1:0]      drop_count
);

  if (PKT_WORDS_P < 2) begin : g_chk_pkt
    $error("axis_packetizer: PKT_WORDS_P must be at least 2");
  end

  localparam int unsigned CNT_W = $clog2(PKT_WORDS_P);

  logic [CNT_W-1:0] word_cnt;   // index of the next word inside its packet
  logic             can_load;
  logic             load;
  logic             drop;

  assign can_load = !m_axis_tvalid || m_axis_tready;
  assign load     = in_valid && can_load;
  assign drop     = in_valid && !can_load;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      m_axis_tvalid <= 1'b0;
      m_axis_tdata  <= '0;
      m_axis_tlast  <= 1'b0;
      word_cnt      <= '0;
    end else if (load) begin
      m_axis_tvalid <= 1'b1;
      m_axis_tdata  <= in_sample;
      m_axis_tlast  <= (word_cnt == CNT_W'(PKT_WORDS_P - 1));
      word_cnt      <= (word_cnt == CNT_W'(PKT_WORDS_P - 1)) ? '0 : word_cnt + 1'b1;
    end else if (m_axis_tready) begin
      m_axis_tvalid <= 1'b0;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      overflow   <= 1'b0;
      drop_count <= '0;
    end else if (drop) begin
      overflow <= 1'b1;
      if (drop_count != '1)
        drop_count <= drop_count + 1'b1;
    end
  end

  assign m_axis_tkeep = '1;

  // AXI4-Stream: once TVALID is up, the beat is held until TREADY.
  a_axis_hold: assert property (@(posedge clk) disable iff (!rst_n)
      m_axis_tvalid && !m_axis_tready |=>
        m_axis_tvalid && $stable(m_axis_tdata) && $stable(m_axis_tlast));

endmodule
