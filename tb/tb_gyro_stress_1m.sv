// tb_gyro_stress_1m: full-load run of the gyro sensor interface over
// 1,000,000 consecutive samples at the default parameters (500 kSPS,
// 32-word packets), i.e. 2 s of acquisition and 31,250 packets.
//
// Channel A of every sample carries a 16-bit serial number (the ADC frame
// count) and channel B a pseudo-random code derived from it. The sink stalls
// at random for up to 150 clocks, less than one sample period. On every
// end-of-packet interrupt the packet is read back from the DMA buffer; the
// serial numbers must rise by exactly one from word to word across the
// whole run (zero loss) and channel B must match. At the end the packet,
// beat and burst counts must be 31,250, 1,000,000 and 62,500, and the
// interface must report no overflow. The measured acquisition time must be
// 200,000,000 clocks (2 s at 100 MHz) for 4,000,000 bytes: 2 MB/s.
// The run length and the loss criterion are those the acquisition system
// is qualified with; the channel-B pattern and the stall profile are this
// test's own.
module tb_gyro_stress_1m;
  import gyro_pkg::*;

  localparam int N_SAMPLES = 1_000_000;
  localparam int N_PACKETS = N_SAMPLES / 32;

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

  axi_dma_s2mm_model #(.BUF_WORDS(4096), .BURST_LEN(16)) dma (
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
      if (failures < 20) $display("FAIL @%0d: %s", cyc, what);
    end
  endtask

  // Channel B pattern: a fixed hash of the sample index.
  function automatic logic [15:0] pattern_b(input int n);
    logic [31:0] h;
    h = 32'(n) * 32'h9E3779B1;
    return h[31:16];
  endfunction

  int serial = 0;
  initial begin
    code_a = 0;
    code_b = pattern_b(0);
  end
  always @(posedge cs_n) if (rst_n) begin
    serial = serial + 1;
    code_a = 16'(serial);
    code_b = pattern_b(serial);
  end

  int next_idx = 0;
  int bad_words = 0;
  longint first_cs_fall = -1, last_irq_cyc = -1;
  always @(negedge cs_n) if (first_cs_fall < 0) first_cs_fall = cyc;

  always @(posedge clk) if (rst_n && irq) begin
    checks++;
    if (pkt_len != 32) begin
      failures++;
      $display("FAIL: packet length %0d", pkt_len);
    end
    for (int i = 0; i < 32; i++) begin
      logic [31:0] w;
      w = dma.mem[(pkt_base + i) % 4096];
      checks++;
      if (w[15:0] != 16'(next_idx) || w[31:16] != pattern_b(next_idx)) begin
        failures++;
        if (bad_words++ < 10)
          $display("FAIL: word for sample %0d is %h", next_idx, w);
      end
      next_idx++;
    end
    last_irq_cyc = cyc;
  end

  // Random stalls shorter than a sample period.
  always @(posedge clk) begin
    if (stall) begin
      if ($urandom_range(0, 49) == 0) stall <= 0;
    end else if (enable && $urandom_range(0, 999) == 0) begin
      stall <= 1;
    end
  end
  // Bound each stall to 150 clocks.
  int stall_len = 0;
  always @(posedge clk) begin
    stall_len <= stall ? stall_len + 1 : 0;
    if (stall_len >= 150) stall <= 0;
  end

  initial begin
    repeat (5) @(posedge clk);
    rst_n <= 1;
    repeat (10) @(posedge clk);
    enable <= 1;
    while (packets < N_PACKETS) @(posedge clk);
    enable <= 0;
    repeat (2) @(posedge clk);
    check(next_idx == N_SAMPLES, $sformatf("samples checked %0d", next_idx));
    check(beats == N_SAMPLES, $sformatf("beats %0d", beats));
    check(bursts == 2 * N_PACKETS, $sformatf("bursts %0d", bursts));
    check(!overflow && drop_count == 0, $sformatf("drops %0d", drop_count));
    check(stall_beats > 0, "sink stalls occurred");
    // First CS_n fall to last packet interrupt: 1e6 sample periods, minus
    // the one-clock CS_n delay, plus the 131-clock path of the last sample.
    check(last_irq_cyc - first_cs_fall == longint'(N_SAMPLES - 1) * 200 + 130 + 1,
          $sformatf("run took %0d clocks", last_irq_cyc - first_cs_fall));
    $display("samples=%0d packets=%0d stall_clocks=%0d clocks=%0d",
             next_idx, packets, stall_beats, last_irq_cyc - first_cs_fall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (N_SAMPLES * 200 + 100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
