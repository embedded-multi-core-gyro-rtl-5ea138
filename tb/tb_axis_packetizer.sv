// tb_axis_packetizer: self-checking test of the AXI4-Stream packetizer.
//
// Random samples are offered at random intervals while the sink pulls TREADY
// low at random. Phase 1 keeps every sample acceptable (a new sample is only
// offered when the register can take it) and checks each beat's data against
// a reference queue, TLAST on exactly every 32nd beat and TKEEP all ones.
// Phase 2 offers samples against a stalled sink and checks that each is
// dropped, counted and flagged, that the held beat is unchanged and that the
// packet boundary still falls on the 32nd accepted word.
module tb_axis_packetizer;
  import gyro_pkg::*;

  logic clk = 0;
  logic rst_n = 0;
  gyro_sample_t in_sample = '0;
  logic in_valid = 0;
  logic [31:0] tdata;
  logic [3:0] tkeep;
  logic tlast, tvalid, tready = 0;
  logic overflow;
  logic [15:0] drop_count;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  axis_packetizer dut (
    .clk(clk), .rst_n(rst_n), .in_sample(in_sample), .in_valid(in_valid),
    .m_axis_tdata(tdata), .m_axis_tkeep(tkeep), .m_axis_tlast(tlast),
    .m_axis_tvalid(tvalid), .m_axis_tready(tready),
    .overflow(overflow), .drop_count(drop_count)
  );

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  logic [31:0] ref_q[$];
  int beats = 0;
  int lasts = 0;
  bit random_ready = 1;

  // Sink: check every handshake beat.
  always @(posedge clk) if (rst_n && tvalid && tready) begin
    logic [31:0] e;
    beats++;
    if (ref_q.size() == 0) begin
      check(0, "beat without an accepted sample");
    end else begin
      e = ref_q.pop_front();
      check(tdata == e, $sformatf("beat %0d data %h expected %h", beats, tdata, e));
    end
    check(tlast == (beats % 32 == 0), $sformatf("beat %0d tlast %0b", beats, tlast));
    check(tkeep == 4'hF, "tkeep all ones");
    if (tlast) lasts++;
  end

  always @(posedge clk) if (random_ready) tready <= ($urandom_range(0, 3) != 0);

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    check(!tvalid && !overflow && drop_count == 0, "reset state");
    // Phase 1: 32*20 samples, each offered only when it can be accepted.
    for (int i = 0; i < 32 * 20; i++) begin
      repeat ($urandom_range(0, 3)) @(posedge clk);
      #1;
      while (tvalid && !tready) begin
        @(posedge clk);
        #1;
      end
      in_sample = '{ch_b: 16'($urandom), ch_a: 16'($urandom)};
      in_valid  = 1;
      ref_q.push_back(in_sample);
      @(posedge clk);
      #1;
      in_valid = 0;
    end
    wait (ref_q.size() == 0);
    @(posedge clk);
    check(beats == 640 && lasts == 20, $sformatf("beats %0d lasts %0d", beats, lasts));
    check(!overflow && drop_count == 0, "no drops in phase 1");

    // Phase 2: stall the sink, push 5 words of which 4 must be dropped.
    random_ready = 0;
    @(posedge clk);
    tready <= 0;
    @(posedge clk);
    #1;
    for (int i = 0; i < 5; i++) begin
      in_sample = '{ch_b: 16'(i), ch_a: 16'(16'hBEE0 + i)};
      in_valid  = 1;
      if (i == 0) ref_q.push_back(in_sample);
      @(posedge clk);
      #1;
      in_valid = 0;
      check(tvalid && tdata == {16'h0000, 16'hBEE0}, "held beat stable under stall");
    end
    check(overflow, "overflow flagged");
    check(drop_count == 4, $sformatf("drop_count %0d", drop_count));
    // Release the sink and finish one more packet: 31 further words.
    random_ready = 1;
    for (int i = 0; i < 31; i++) begin
      repeat ($urandom_range(0, 2)) @(posedge clk);
      #1;
      while (tvalid && !tready) begin
        @(posedge clk);
        #1;
      end
      in_sample = '{ch_b: 16'($urandom), ch_a: 16'($urandom)};
      in_valid  = 1;
      ref_q.push_back(in_sample);
      @(posedge clk);
      #1;
      in_valid = 0;
    end
    wait (ref_q.size() == 0);
    @(posedge clk);
    check(beats == 672 && lasts == 21, $sformatf("after drops: beats %0d lasts %0d", beats, lasts));
    check(overflow && drop_count == 4, "drop status kept");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
