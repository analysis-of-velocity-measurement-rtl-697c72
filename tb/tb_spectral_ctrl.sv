// tb_spectral_ctrl: self-checking test of the control unit.
//
// The capture domain, FFT, PSD and velocity units are replaced by simple
// responders with random delays: each arm_tgl flip is answered by a cap_tgl
// flip some clocks later (as the capture interface does), fft_start by an
// in_free pulse and later a done pulse, psd_start by psd_done and then
// vel_valid. The test checks the rules of the sequence: no FFT start before
// a frame is complete, never two frame requests outstanding, no new request
// before the FFT has released the buffer, PSD only after FFT, one
// result_valid per velocity, the frame counter, at least one capture
// overlapping processing, and a clean stop when run falls.
module tb_spectral_ctrl;
  import spa_pkg::*;

  logic clk = 0, rst_n = 0, run = 0;
  logic arm_tgl, cap_tgl = 0, arm_overlap, fft_start, fft_in_free = 0, fft_done = 0;
  logic psd_start, psd_done = 0, vel_valid = 0, result_valid;
  ctrl_state_e state;
  logic [15:0] frame_count;

  always #5 clk = ~clk;

  spectral_ctrl dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // responder bookkeeping
  int  arms = 0, caps = 0, ffts = 0, frees = 0, psds = 0, results = 0, overlaps = 0;
  int  rule_bad = 0;
  bit  buf_full = 0, buf_loaded = 0;   // model of the input buffer
  logic arm_d = 0;

  // capture domain: answer a request after 20..60 clocks
  always @(posedge clk) begin
    arm_d <= arm_tgl;
    if (rst_n && arm_tgl != arm_d) begin
      arms++;
      if (arms - frees > 1) rule_bad++;      // request before buffer released
      fork begin
        repeat ($urandom_range(60, 20)) @(posedge clk);
        cap_tgl <= ~cap_tgl;
        caps++;
        buf_full = 1;
      end join_none
    end
  end

  // FFT: in_free after 5..15 clocks, done after 30..80 more
  always @(posedge clk) if (rst_n) begin
    if (fft_start) begin
      ffts++;
      if (!buf_full) rule_bad++;             // FFT started on an incomplete frame
      buf_full = 0;
      fork begin
        repeat ($urandom_range(15, 5)) @(posedge clk);
        fft_in_free <= 1; @(posedge clk); fft_in_free <= 0;
        frees++;
        repeat ($urandom_range(80, 30)) @(posedge clk);
        fft_done <= 1; @(posedge clk); fft_done <= 0;
      end join_none
    end
    if (psd_start) begin
      psds++;
      if (psds != ffts) rule_bad++;
      fork begin
        repeat ($urandom_range(20, 5)) @(posedge clk);
        psd_done <= 1; @(posedge clk); psd_done <= 0;
        vel_valid <= 1; @(posedge clk); vel_valid <= 0;
      end join_none
    end
    if (result_valid) begin
      results++;
      if (frame_count != 16'(results)) rule_bad++;
    end
    if (arm_overlap) overlaps++;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (10) @(negedge clk);
    check(arms == 0 && state == ST_IDLE, "idle until run");
    run = 1;
    wait (results == 8);
    @(negedge clk);
    run = 0;
    repeat (400) @(negedge clk);
    check(rule_bad == 0, $sformatf("%0d sequencing rule violations", rule_bad));
    check(state == ST_IDLE, "stops when run falls");
    check(results == psds && psds == ffts, $sformatf("results %0d psd %0d fft %0d", results, psds, ffts));
    check(ffts == caps, $sformatf("every captured frame processed: %0d of %0d", ffts, caps));
    check(overlaps > 0, $sformatf("captures overlapping processing: %0d", overlaps));
    check(frame_count == 16'(results), "frame counter");
    $display("arms %0d caps %0d ffts %0d results %0d overlaps %0d", arms, caps, ffts, results, overlaps);
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
