// tb_ads8354_ctrl: self-checking test of the ADC sampling controller at its
// default timing (500 kSPS from 100 MHz, 32 SCLK periods at 25 MHz).
//
// A behavioural ADC returns random codes. The test checks every returned
// sample against the codes the ADC was given, the sample period (200
// clocks), the latency from frame start to sample (130 clocks), the frame
// shape (32 SCLK rising edges, CS_n low for 129 clocks), that no frame starts
// while `enable` is low, and that conversions resume after it rises again.
module tb_ads8354_ctrl;
  import gyro_pkg::*;

  localparam int N_SAMPLES = 60;

  logic clk = 0;
  logic rst_n = 0;
  logic enable = 0;
  logic cs_n, sclk, sdi, sdo_a, sdo_b;
  gyro_sample_t sample;
  logic sample_valid, busy;
  logic [15:0] code_a = 0, code_b = 0;
  int frames, last_sclks;
  int checks = 0, failures = 0;
  longint cyc = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  ads8354_ctrl dut (
    .clk(clk), .rst_n(rst_n), .enable(enable),
    .adc_cs_n(cs_n), .adc_sclk(sclk), .adc_sdi(sdi),
    .adc_sdo_a(sdo_a), .adc_sdo_b(sdo_b),
    .sample(sample), .sample_valid(sample_valid), .busy(busy)
  );

  ads8354_model adc (
    .cs_n(cs_n), .sclk(sclk), .sdi(sdi), .sdo_a(sdo_a), .sdo_b(sdo_b),
    .code_a(code_a), .code_b(code_b), .frames(frames), .last_frame_sclks(last_sclks)
  );

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL @%0d: %s", cyc, what);
    end
  endtask

  // Expected codes: those presented at each CS_n falling edge.
  logic [15:0] exp_a[$], exp_b[$];
  longint cs_fall_cyc[$];
  longint cs_low_start;

  always @(negedge cs_n) begin
    exp_a.push_back(code_a);
    exp_b.push_back(code_b);
    cs_fall_cyc.push_back(cyc);
    cs_low_start = cyc;
  end

  // New random codes once a frame has started.
  always @(posedge cs_n) begin
    code_a = 16'($urandom);
    code_b = 16'($urandom);
  end

  // CS_n low time and SCLK count per frame.
  always @(posedge cs_n) if (rst_n) begin
    #1;
    check(cyc - cs_low_start == 129, $sformatf("CS_n low for %0d clocks", cyc - cs_low_start));
    check(last_sclks == 32, $sformatf("frame had %0d SCLK edges", last_sclks));
  end

  int got = 0;
  longint last_valid_cyc = -1;
  bit expect_period = 0;

  always @(posedge clk) if (sample_valid) begin
    got++;
    if (exp_a.size() == 0) begin
      check(0, "sample without a frame");
    end else begin
      logic [15:0] ea, eb;
      longint fc;
      ea = exp_a.pop_front();
      eb = exp_b.pop_front();
      fc = cs_fall_cyc.pop_front();
      check(sample.ch_a == ea, $sformatf("ch_a %h expected %h", sample.ch_a, ea));
      check(sample.ch_b == eb, $sformatf("ch_b %h expected %h", sample.ch_b, eb));
      // CS_n falls one clock after the start clock; sample_valid is high
      // 130 clocks after the start clock.
      check(cyc - fc == 129, $sformatf("latency CS fall->valid %0d", cyc - fc));
    end
    if (expect_period)
      check(cyc - last_valid_cyc == 200, $sformatf("sample period %0d", cyc - last_valid_cyc));
    last_valid_cyc = cyc;
    expect_period = 1;
  end

  initial begin
    repeat (5) @(posedge clk);
    rst_n <= 1;
    repeat (20) @(posedge clk);
    check(frames == 0 && cs_n && !sclk, "idle while disabled");
    enable <= 1;
    wait (got == N_SAMPLES);
    @(posedge clk);
    enable <= 0;
    expect_period = 0;
    repeat (1000) @(posedge clk);
    check(!busy && cs_n, "stopped after enable low");
    begin
      int f;
      f = frames;
      repeat (1000) @(posedge clk);
      check(frames == f, "no frames while disabled");
    end
    enable <= 1;
    wait (got == N_SAMPLES + 20);
    @(posedge clk);
    check(exp_a.size() == 0, "every frame returned a sample");
    check(frames == N_SAMPLES + 20, $sformatf("frames %0d", frames));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200 * (N_SAMPLES + 40) + 5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
