// tb_gyro_sine_workloads: runs the nine sine-excitation test conditions
// through the gyro sensor interface at its default parameters: 8, 16 and
// 32 kHz at 250, 500 and 750 mVpp, sampled at 500 kSPS.
//
// The behavioural ADC converts the sine for each condition, plus uniform
// noise of +-8 codes, on channel B; channel A carries the frame serial
// number. Input voltages become codes assuming a +-2.5 V full scale on 16
// bits (76.3 uV per code), so the three amplitudes are 1638, 3277 and 4915
// codes. For every condition acquisition is restarted, 4 packets (128
// samples) are collected through the DMA buffer and every word is compared
// with the code the ADC produced for that frame. The peak-to-peak code span
// and the number of sine periods seen are then compared with the condition.
// The nine conditions are those the system is evaluated with; the full-scale
// range, the noise and the run length are this test's own choices.
module tb_gyro_sine_workloads;
  import gyro_pkg::*;

  localparam int PKTS_PER_RUN = 4;
  localparam int SAMPLES_PER_RUN = PKTS_PER_RUN * 32;

  logic clk = 0;
  logic rst_n = 0;
  logic enable = 0;
  logic cs_n, sclk, sdi, sdo_a, sdo_b;
  logic [31:0] tdata;
  logic [3:0] tkeep;
  logic tlast, tvalid, tready;
  logic busy, overflow;
  logic [15:0] drop_count;
  logic [15:0] code_a = 0, code_b = 0;
  int frames, last_sclks;
  logic irq;
  int pkt_base, pkt_len, beats, packets, bursts, stall_beats;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  gyro_sensor_if dut (
    .clk(clk), .rst_n(rst_n), .enable(enable),
    .adc_cs_n(cs_n), .adc_sclk(sclk), .adc_sdi(sdi),
    .adc_sdo_a(sdo_a), .adc_sdo_b(sdo_b),
    .m_axis_tdata(tdata), .m_axis_tkeep(tkeep), .m_axis_tlast(tlast),
    .m_axis_tvalid(tvalid), .m_axis_tready(tready),
    .busy(busy), .overflow(overflow), .drop_count(drop_count)
  );

  ads8354_model adc (
    .cs_n(cs_n), .sclk(sclk), .sdi(sdi), .sdo_a(sdo_a), .sdo_b(sdo_b),
    .code_a(code_a), .code_b(code_b), .frames(frames), .last_frame_sclks(last_sclks)
  );

  axi_dma_s2mm_model #(.BUF_WORDS(1024), .BURST_LEN(16)) dma (
    .clk(clk), .rst_n(rst_n), .stall(1'b0),
    .s_axis_tdata(tdata), .s_axis_tkeep(tkeep), .s_axis_tlast(tlast),
    .s_axis_tvalid(tvalid), .s_axis_tready(tready),
    .irq(irq), .pkt_base(pkt_base), .pkt_len(pkt_len),
    .beats(beats), .packets(packets), .bursts(bursts), .stall_beats(stall_beats)
  );

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  real freq_hz = 8000.0;
  real amp_codes = 1638.0;
  int  run_idx = 0;      // sample index inside the current run

  function automatic logic [15:0] sine_code(input int n, input real f, input real a);
    return 16'(int'(a * $sin(2.0 * 3.141592653589793 * f * real'(n) / 500000.0)));
  endfunction

  // Codes presented to each frame, in order, for comparison.
  logic [31:0] sent_q[$];
  always @(negedge cs_n) sent_q.push_back({code_b, code_a});
  always @(posedge cs_n) begin
    run_idx = run_idx + 1;
    code_a  = code_a + 1;
    code_b  = sine_code(run_idx, freq_hz, amp_codes) + 16'($urandom_range(0, 16) - 8);
  end

  int   got = 0;
  int   bmin, bmax;
  int   crossings;
  logic last_sign;

  always @(posedge clk) if (rst_n && irq) begin
    check(pkt_len == 32, "packet length");
    for (int i = 0; i < 32; i++) begin
      logic [31:0] w, e;
      int b;
      w = dma.mem[(pkt_base + i) % 1024];
      e = (sent_q.size() > 0) ? sent_q.pop_front() : 32'hDEAD_BEEF;
      check(w == e, $sformatf("word %h expected %h", w, e));
      b = int'($signed(w[31:16]));
      if (got == 0) begin
        bmin = b;
        bmax = b;
      end else begin
        if (b < bmin) bmin = b;
        if (b > bmax) bmax = b;
        // upward zero crossings, with hysteresis above the noise
        if (!last_sign && b > 64) crossings++;
      end
      if (b > 64) last_sign = 1;
      else if (b < -64) last_sign = 0;
      got++;
    end
  end

  real freqs[3] = '{8000.0, 16000.0, 32000.0};
  int  mvpp[3]  = '{250, 500, 750};

  initial begin
    repeat (5) @(posedge clk);
    rst_n <= 1;
    repeat (10) @(posedge clk);
    foreach (freqs[fi]) foreach (mvpp[ai]) begin
      int want_span, want_cycles;
      freq_hz   = freqs[fi];
      amp_codes = real'(mvpp[ai]) / 2.0 / 1000.0 / 2.5 * 32768.0;
      run_idx   = 0;
      code_b    = 16'($urandom_range(0, 16) - 8);
      got       = 0;
      crossings = 0;
      last_sign = 1;
      enable <= 1;
      while (got < SAMPLES_PER_RUN) @(posedge clk);
      enable <= 0;
      while (busy) @(posedge clk);
      repeat (300) @(posedge clk);
      sent_q.delete();
      want_span   = int'(2.0 * amp_codes);
      // sine periods in one run of 128 samples
      want_cycles = int'(freq_hz * real'(SAMPLES_PER_RUN) / 500000.0);
      check(bmax - bmin > want_span - 60 && bmax - bmin < want_span + 20,
            $sformatf("%0.0f Hz %0d mVpp: span %0d codes, expected %0d",
                      freq_hz, mvpp[ai], bmax - bmin, want_span));
      check(crossings >= want_cycles - 1 && crossings <= want_cycles + 1,
            $sformatf("%0.0f Hz %0d mVpp: %0d periods, expected %0d",
                      freq_hz, mvpp[ai], crossings, want_cycles));
      $display("%0.0f Hz / %0d mVpp: span %0d codes, %0d periods in %0d samples",
               freq_hz, mvpp[ai], bmax - bmin, crossings, got);
    end
    check(!overflow && drop_count == 0, "no drops");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (9 * (SAMPLES_PER_RUN + 10) * 200 + 20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
