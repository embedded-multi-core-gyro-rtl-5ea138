// tb_gyro_sensor_if: end-to-end test of the gyro sensor interface at its
// default parameters (500 kSPS, 32-word packets, 100 MHz).
//
// Chain: behavioural ADC -> gyro_sensor_if -> behavioural S2MM DMA writing a
// ring buffer. The ADC returns a serial number on channel A (a 16-bit frame
// counter) and a sampled 8 kHz sine of 375-code amplitude on channel B. On
// every end-of-packet interrupt the test reads the packet back from the
// buffer, as the receiving processor would, and checks it: 32 words, serial
// numbers consecutive except where the interface reported drops, channel B
// matching the sine for that serial number.
//
// Phases: (A) a free-running sink, where the interrupt spacing must be
// 6400 clocks (128 bytes per 64 us = 2 MB/s) and the first word must reach
// TVALID 130 clocks after CS_n falls; (B) random sink stalls shorter than a
// sample period, which must lose nothing; (C) one stall longer than two
// sample periods, which must drop samples and report exactly as many as are
// missing; (D) acquisition stopped and restarted with `enable`. Each
// mechanism (packet end, burst split, sink stall, overflow drop, restart) is
// counted and must occur at least once.
module tb_gyro_sensor_if;
  import gyro_pkg::*;

  localparam real SINE_HZ  = 8000.0;
  localparam real SINE_AMP = 375.0;

  logic clk = 0;
  logic rst_n = 0;
  logic enable = 0;
  logic stall = 0;
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
  longint cyc = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

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
    .clk(clk), .rst_n(rst_n), .stall(stall),
    .s_axis_tdata(tdata), .s_axis_tkeep(tkeep), .s_axis_tlast(tlast),
    .s_axis_tvalid(tvalid), .s_axis_tready(tready),
    .irq(irq), .pkt_base(pkt_base), .pkt_len(pkt_len),
    .beats(beats), .packets(packets), .bursts(bursts), .stall_beats(stall_beats)
  );

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL @%0d: %s", cyc, what);
    end
  endtask

  function automatic logic [15:0] sine_code(input int n);
    return 16'(int'(SINE_AMP * $sin(2.0 * 3.141592653589793 * SINE_HZ * real'(n) / 500000.0)));
  endfunction

  // ADC stimulus: frame n returns serial n and the sine at sample n.
  int serial = 0;
  initial begin
    code_a = 0;
    code_b = sine_code(0);
  end
  always @(posedge cs_n) if (rst_n) begin
    serial = serial + 1;
    code_a = 16'(serial);
    code_b = sine_code(serial);
  end

  // Receiving side: check each packet when its interrupt arrives.
  int  full_idx = -1;
  int  missing = 0;
  int  gaps = 0;
  longint last_irq_cyc = -1;
  bit  check_rate = 0;
  int  rate_checks = 0;

  always @(posedge clk) if (rst_n && irq) begin
    check(pkt_len == 32, $sformatf("packet length %0d", pkt_len));
    for (int i = 0; i < 32; i++) begin
      logic [31:0] w;
      logic [15:0] a, b;
      int step;
      w = dma.mem[(pkt_base + i) % 1024];
      a = w[15:0];
      b = w[31:16];
      step = (full_idx < 0) ? 1 + int'(a) : int'(16'(a - 16'(full_idx)));
      check(step >= 1, $sformatf("serial %0d after %0d", a, full_idx));
      if (step > 1) begin
        missing += step - 1;
        gaps++;
      end
      full_idx = full_idx + step;
      check(b == sine_code(full_idx),
            $sformatf("sample %0d ch_b %0d expected %0d", full_idx, $signed(b),
                      $signed(sine_code(full_idx))));
    end
    if (check_rate && last_irq_cyc >= 0) begin
      check(cyc - last_irq_cyc == 6400, $sformatf("packet interval %0d", cyc - last_irq_cyc));
      rate_checks++;
    end
    last_irq_cyc = cyc;
  end

  // Latency of the first word after enable: CS_n fall to TVALID.
  longint first_cs_fall = -1, first_tvalid = -1;
  always @(negedge cs_n) if (first_cs_fall < 0) first_cs_fall = cyc;
  always @(posedge clk) if (tvalid && first_tvalid < 0) first_tvalid = cyc;

  int stalls_seen = 0, restarts = 0;

  task automatic wait_packets(input int n);
    int target;
    target = packets + n;
    while (packets < target) @(posedge clk);
  endtask

  initial begin
    repeat (5) @(posedge clk);
    rst_n <= 1;
    repeat (10) @(posedge clk);
    check(tvalid == 0 && cs_n, "idle after reset");

    // Phase A: free-running sink.
    enable <= 1;
    wait_packets(1);
    check(first_tvalid - first_cs_fall == 130,
          $sformatf("CS fall to TVALID %0d clocks", first_tvalid - first_cs_fall));
    check_rate = 1;
    wait_packets(8);
    check_rate = 0;
    check(rate_checks >= 7, $sformatf("rate checked %0d times", rate_checks));
    check(!overflow && drop_count == 0, "no drops with a free sink");

    // Phase B: random short stalls (under one sample period).
    repeat (8 * 32) begin
      repeat ($urandom_range(20, 300)) @(posedge clk);
      stall <= 1;
      repeat ($urandom_range(1, 150)) @(posedge clk);
      stall <= 0;
    end
    wait_packets(1);
    check(stall_beats > 0, "sink stalls happened");
    if (stall_beats > 0) stalls_seen++;
    check(!overflow && drop_count == 0 && missing == 0, "short stalls lose nothing");

    // Phase C: one 650-clock stall, starting as a beat leaves: the next
    // sample fills the register and the two after it are dropped.
    @(posedge clk);
    while (!tvalid) @(posedge clk);
    stall <= 1;
    repeat (650) @(posedge clk);
    stall <= 0;
    wait_packets(2);
    check(overflow, "overflow flagged after long stall");
    check(drop_count == 2, $sformatf("drop_count %0d", drop_count));
    check(missing == int'(drop_count) && gaps == 1,
          $sformatf("missing %0d gaps %0d drop_count %0d", missing, gaps, drop_count));

    // Phase D: stop and restart acquisition.
    enable <= 0;
    repeat (5000) @(posedge clk);
    check(!busy && cs_n, "acquisition stopped");
    begin
      int f;
      f = frames;
      repeat (2000) @(posedge clk);
      check(frames == f, "no conversions while disabled");
    end
    enable <= 1;
    restarts++;
    wait_packets(3);
    check(missing == int'(drop_count), "restart loses nothing");

    // Mechanism coverage.
    check(packets >= 20, $sformatf("packets %0d", packets));
    check(bursts == 2 * packets, $sformatf("bursts %0d for %0d packets", bursts, packets));
    check(stalls_seen > 0, "stall mechanism exercised");
    check(drop_count > 0, "overflow mechanism exercised");
    check(restarts > 0, "restart exercised");
    $display("packets=%0d beats=%0d bursts=%0d stall_clocks=%0d drops=%0d restarts=%0d",
             packets, beats, bursts, stall_beats, drop_count, restarts);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
