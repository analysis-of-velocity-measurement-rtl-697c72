// tb_spectral_analyzer_top: end-to-end test of the spectral analyser with all
// parameters at their defaults (1024-point FFT, 12-bit samples, 500 MSPS).
//
// An ADC model feeds sine waves; the analyser runs continuously. The tone is
// changed at the end of each captured frame, and the tone a frame was taken
// with is queued, so every result can be matched to its own input. For every
// frame the test checks: the PSD stream carries bins 0..N-1 in order, the
// reported peak bin is the one nearest the tone, the reported peak power is
// the PSD value of that bin and the largest in 1..N/2-1, doppler_hz is
// k*FS/N, and the velocity is lambda*fd/2 computed here in floating point.
// The clocks run 100:1 (2 ns sample clock against a 200 ns processing
// clock). It counts each mechanism of the design: frames captured, samples
// dropped between frames, capture overlapping processing, FFT and PSD passes
// and results, and fails if one never occurred. It also checks the
// processing time per frame.
module tb_spectral_analyzer_top;
  import spa_pkg::*;

  localparam int N = N_POINTS;
  localparam int AW = $clog2(N);
  localparam int PWR_W = 2*(SAMPLE_W + AW + 1);
  localparam real FSR = 500.0e6;
  localparam int NFRAMES = 5;

  logic rst_n = 1, adc_clk = 0, clk = 0, run = 0;
  logic [11:0] adc_data;
  logic psd_valid, result_valid, capturing, arm_overlap, processing;
  logic [AW-1:0] psd_bin, peak_bin;
  logic [PWR_W-1:0] psd_power, peak_power;
  logic [39:0] doppler_hz;
  logic [47:0] velocity_mm_s;
  logic [15:0] frame_count;
  ctrl_state_e state;

  always #1   adc_clk = ~adc_clk;   // 2 ns
  always #100 clk     = ~clk;       // 200 ns

  real tone_hz, amp = 1800.0, offset = 0.0;
  ads5463_model #(.FS(FSR)) u_adc (.clk(adc_clk), .freq_hz(tone_hz), .amp, .offset, .data(adc_data));

  spectral_analyzer_top dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // tones: exact bin, between bins, near the 200 MHz top, near the bottom,
  // and a mid-band one
  real tones [NFRAMES] = '{100.09765625e6, 150.0e6, 199.9e6, 0.6e6, 61.3e6};
  real tone_q [$];
  int  tone_i = 0;

  // counters of mechanisms
  int n_capt = 0, n_drop = 0, n_overlap = 0, n_fft = 0, n_psd_frames = 0, n_results = 0;

  // change the tone at the end of every captured frame (adc domain)
  logic cap_d = 0;
  always @(posedge adc_clk) begin
    cap_d <= capturing;
    if (live && cap_d && !capturing) begin
      n_capt++;
      tone_i = tone_i + 1;
      tone_hz = tones[tone_i % NFRAMES];
      tone_q.push_back(tone_hz);
    end
    if (live && run && !capturing) n_drop++;
  end

  // PSD stream bookkeeping (processing domain)
  int nbins = 0, order_bad = 0;
  logic [PWR_W-1:0] pw [N];
  int t_start = 0, cyc = 0;
  ctrl_state_e st_d;
  bit live = 0;   // outputs are watched once the reset has been applied
  always @(posedge clk) begin
    cyc++;
    if (!live) begin
      // nothing to watch
    end else begin
    st_d <= state;
    if (state == ST_FFT && st_d != ST_FFT) begin n_fft++; t_start = cyc; end
    if (arm_overlap) n_overlap++;
    if (psd_valid) begin
      if (int'(psd_bin) != nbins) order_bad++;
      pw[psd_bin] = psd_power;
      nbins++;
    end
    if (result_valid) begin
      real f, v_exp;
      int  k_exp, k_lo;
      longint unsigned fd_exp;
      logic [PWR_W-1:0] mx;
      n_results++;
      if (nbins == N) n_psd_frames++;
      check(nbins == N && order_bad == 0, $sformatf("frame %0d: %0d PSD bins, %0d out of order", n_results, nbins, order_bad));
      check(cyc - t_start <= 12291 + N + 8, $sformatf("frame %0d: processing took %0d clocks", n_results, cyc - t_start));
      f = tone_q.pop_front();
      k_exp = $rtoi(f * N / FSR + 0.5);
      check(int'(peak_bin) == k_exp, $sformatf("frame %0d: tone %f Hz, peak bin %0d, expected %0d", n_results, f, peak_bin, k_exp));
      mx = 0; k_lo = 1;
      for (int k = 1; k < N/2; k++) if (pw[k] > mx) begin mx = pw[k]; k_lo = k; end
      check(peak_power == pw[peak_bin] && peak_power == mx, $sformatf("frame %0d: peak power %0d, psd max %0d at %0d", n_results, peak_power, mx, k_lo));
      fd_exp = (longint'(peak_bin) * 500_000_000) / longint'(N);
      check(doppler_hz == 40'(fd_exp), $sformatf("frame %0d: doppler %0d expected %0d", n_results, doppler_hz, fd_exp));
      v_exp = real'(fd_exp) * (real'(LAMBDA_UM) * 1.0e-6) / 2.0 * 1000.0;
      check(real'(velocity_mm_s) - v_exp <= 1.0 && v_exp - real'(velocity_mm_s) <= 1.0, $sformatf("frame %0d: velocity %0d mm/s expected %f", n_results, velocity_mm_s, v_exp));
      check(frame_count == 16'(n_results), $sformatf("frame counter %0d", frame_count));
      $display("frame %0d: tone %0.3f MHz -> bin %0d, fd %0d Hz, v %0d mm/s (%0d clocks)",
               n_results, f/1.0e6, peak_bin, doppler_hz, velocity_mm_s, cyc - t_start);
      nbins = 0; order_bad = 0;
    end
    end
  end

  initial begin
    tone_hz = tones[0];
    tone_q.push_back(tone_hz);
    #0.5 rst_n = 0;   // a falling edge applies the reset before the first clock
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (3) @(negedge clk);
    live = 1;
    run = 1;
    wait (n_results == NFRAMES);
    run = 0;
    // a frame already captured is still processed, then the sequencer stops
    repeat (2) @(negedge clk);
    for (int i = 0; i < 20000 && state != ST_IDLE; i++) @(negedge clk);
    repeat (20) @(negedge clk);
    check(state == ST_IDLE && !processing && !capturing, "sequencer stops when run is low");
    check(n_capt > 0,        $sformatf("mechanism: frames captured %0d", n_capt));
    check(n_drop > 0,        $sformatf("mechanism: samples dropped between frames %0d", n_drop));
    check(n_overlap > 0,     $sformatf("mechanism: capture overlapping processing %0d", n_overlap));
    check(n_fft >= NFRAMES,  $sformatf("mechanism: FFT passes %0d", n_fft));
    check(n_psd_frames == n_results, $sformatf("mechanism: full PSD sweeps %0d", n_psd_frames));
    check(n_results >= NFRAMES, $sformatf("mechanism: results %0d", n_results));
    $display("captures %0d, dropped samples %0d, overlapped captures %0d, FFT passes %0d, results %0d",
             n_capt, n_drop, n_overlap, n_fft, n_results);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat ((NFRAMES + 2) * 16000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
