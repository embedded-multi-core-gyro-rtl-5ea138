// ads8354_ctrl: sample-rate timer and serial read-out for a dual-channel,
// dual-SDO 16-bit SAR ADC (ADS8354 class).
//
// A conversion frame starts every SAMPLE_DIV clocks while `enable` is high:
// 100 MHz / 200 = 500 kSPS, the sampling rate the acquisition system runs at.
// A frame pulls CS_n low, runs FRAME_SCLKS serial clocks and shifts the
// first DATA_BITS bits of both serial outputs (channel A on SDO-A, channel B
// on SDO-B, MSB first) into two shift registers. The controller samples
// SDO-A/B on the rising SCLK edge. It expects the ADC to present the MSB
// once CS_n falls and each further bit after a falling edge. When the last SCLK
// period ends, CS_n is raised and the parallel sample is presented for one
// clock on `sample`/`sample_valid`.
//
// Timing at the defaults: SCLK = clk / (2*SCLK_HALF) = 25 MHz, a frame lasts
// FRAME_SCLKS*2*SCLK_HALF = 128 clocks of SCLK (CS_n is low for 129), and
// `sample_valid` pulses 130 clocks
// after the clock in which the frame was started. The first frame starts in
// the first clock `enable` is seen high; the frame grid then repeats every
// SAMPLE_DIV clocks. Dropping `enable` lets a running frame finish.
//
// The 16-bit dual-channel ADC, the 500 kSPS rate, the 100 MHz clock and the
// serial-to-parallel conversion come from the system specification. The SCLK
// rate, the frame length, the capture edge and the held-low SDI pin (the ADC
// is used in its power-up configuration) are this design's own choices.
module ads8354_ctrl
  import gyro_pkg::*;
#(
  parameter int unsigned SAMPLE_DIV  = CLK_HZ / SAMPLE_HZ,  // clocks per conversion
  parameter int unsigned SCLK_HALF   = 2,                   // clocks per SCLK half-period
  parameter int unsigned FRAME_SCLKS = 32,                  // SCLK periods per frame
  parameter int unsigned DATA_BITS   = ADC_BITS             // bits captured per channel
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         enable,        // run conversions at the sample rate

  // ADC pins
  output logic         adc_cs_n,
  output logic         adc_sclk,
  output logic         adc_sdi,
  input  logic         adc_sdo_a,
  input  logic         adc_sdo_b,

  // parallel sample out
  output gyro_sample_t sample,
  output logic         sample_valid,
  output logic         busy           // a frame is in progress
);

  // A frame plus the CS_n-high gap must fit in one sample period.
  if (FRAME_SCLKS * 2 * SCLK_HALF + 2 > SAMPLE_DIV) begin : g_chk_frame
    $error("ads8354_ctrl: frame of %0d clocks does not fit a %0d-clock sample period",
           FRAME_SCLKS * 2 * SCLK_HALF + 2, SAMPLE_DIV);
  end
  if (DATA_BITS > FRAME_SCLKS || DATA_BITS != ADC_BITS) begin : g_chk_bits
    $error("ads8354_ctrl: DATA_BITS must equal ADC_BITS and fit in the frame");
  end

  localparam int unsigned RATE_W = $clog2(SAMPLE_DIV);
  localparam int unsigned HALF_W = (SCLK_HALF > 1) ? $clog2(SCLK_HALF) : 1;
  localparam int unsigned EDGE_W = $clog2(FRAME_SCLKS + 1);

  typedef enum logic [1:0] {S_IDLE, S_SHIFT, S_DONE} state_t;

  state_t              state;
  logic [RATE_W-1:0]   rate_cnt;
  logic [HALF_W-1:0]   half_cnt;
  logic [EDGE_W-1:0]   edge_cnt;     // completed SCLK periods in this frame
  logic [ADC_BITS-1:0] shreg_a, shreg_b;
  logic                tick;

  // Sample-rate grid: rate_cnt sits at 0 while disabled, so the first frame
  // starts as soon as enable rises.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)
      rate_cnt <= '0;
    else if (!enable && rate_cnt == '0)
      rate_cnt <= '0;
    else if (rate_cnt == RATE_W'(SAMPLE_DIV - 1))
      rate_cnt <= '0;
    else
      rate_cnt <= rate_cnt + 1'b1;
  end

  assign tick = enable && (rate_cnt == '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state        <= S_IDLE;
      adc_cs_n     <= 1'b1;
      adc_sclk     <= 1'b0;
      half_cnt     <= '0;
      edge_cnt     <= '0;
      shreg_a      <= '0;
      shreg_b      <= '0;
      sample       <= '0;
      sample_valid <= 1'b0;
    end else begin
      sample_valid <= 1'b0;
      unique case (state)
        S_IDLE: begin
          if (tick) begin
            adc_cs_n <= 1'b0;
            adc_sclk <= 1'b0;
            half_cnt <= '0;
            edge_cnt <= '0;
            state    <= S_SHIFT;
          end
        end
        S_SHIFT: begin
          if (half_cnt == HALF_W'(SCLK_HALF - 1)) begin
            half_cnt <= '0;
            adc_sclk <= ~adc_sclk;
            if (!adc_sclk) begin
              // rising SCLK edge: capture while data bits remain
              if (edge_cnt < EDGE_W'(DATA_BITS)) begin
                shreg_a <= {shreg_a[ADC_BITS-2:0], adc_sdo_a};
                shreg_b <= {shreg_b[ADC_BITS-2:0], adc_sdo_b};
              end
            end else begin
              // falling SCLK edge closes one SCLK period
              edge_cnt <= edge_cnt + 1'b1;
              if (edge_cnt == EDGE_W'(FRAME_SCLKS - 1))
                state <= S_DONE;
            end
          end else begin
            half_cnt <= half_cnt + 1'b1;
          end
        end
        S_DONE: begin
          adc_cs_n     <= 1'b1;
          sample       <= '{ch_b: shreg_b, ch_a: shreg_a};
          sample_valid <= 1'b1;
          state        <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign adc_sdi = 1'b0;
  assign busy    = (state != S_IDLE);

  // SCLK only toggles while CS_n is low.
  a_sclk_idle: assert property (@(posedge clk) disable iff (!rst_n)
                                adc_cs_n |-> !adc_sclk);

endmodule
