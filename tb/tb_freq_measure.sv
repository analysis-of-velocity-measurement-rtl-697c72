// tb_freq_measure: self-checking test of the peak search at its default size
// (1024 bins, 500 MHz sampling). Random power spectra, each with a planted
// peak, are streamed in; the reported bin, power and frequency are compared
// with a search done here. Cases cover a larger value at DC and in the
// mirrored upper half (both must be ignored), a tie (lower bin wins), peaks
// at the band edges (bins 1 and 511), gaps in in_valid, and the
// one-clock result latency.
module tb_freq_measure;
  localparam int N = 1024, AW = 10, PWR_W = 54;

  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_last = 0;
  logic [AW-1:0] in_idx = '0;
  logic [PWR_W-1:0] in_pow = '0;
  logic result_valid;
  logic [AW-1:0] peak_bin;
  logic [PWR_W-1:0] peak_pow;
  logic [39:0] freq_hz;

  always #5 clk = ~clk;

  freq_measure dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic [PWR_W-1:0] p [N];

  task automatic stream(int kpk, bit dc_big, bit tie, bit gaps);
    int kexp;
    logic [PWR_W-1:0] best;
    for (int k = 0; k < N; k++) p[k] = PWR_W'({$urandom, $urandom}) >> 8;
    p[kpk] = {PWR_W{1'b1}} >> 1;
    if (tie) p[kpk + 7] = p[kpk];
    if (dc_big) begin p[0] = {PWR_W{1'b1}}; p[N - kpk] = {PWR_W{1'b1}}; p[N/2] = {PWR_W{1'b1}}; end
    // independent reference: first maximum in 1..N/2-1
    best = 0; kexp = 1;
    for (int k = 1; k < N/2; k++) if (p[k] > best) begin best = p[k]; kexp = k; end
    for (int k = 0; k < N; k++) begin
      @(negedge clk);
      if (gaps && ($urandom_range(3) == 0)) begin in_valid = 0; @(negedge clk); end
      in_valid = 1; in_idx = AW'(k); in_pow = p[k]; in_last = (k == N-1);
    end
    @(negedge clk); in_valid = 0; in_last = 0;
    check(result_valid, "result one clock after the last bin");
    check(int'(peak_bin) == kexp, $sformatf("peak bin %0d expected %0d", peak_bin, kexp));
    check(peak_pow == best, "peak power");
    check(freq_hz == 40'((longint'(kexp) * 500_000_000) / 1024), $sformatf("freq %0d for bin %0d", freq_hz, kexp));
    @(negedge clk);
    check(!result_valid, "result_valid is a single pulse");
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    stream(205, 0, 0, 0);
    stream(37, 1, 0, 1);
    stream(100, 0, 1, 0);
    stream(1, 1, 0, 0);
    stream(511, 1, 0, 1);
    for (int i = 0; i < 5; i++) stream($urandom_range(N/2 - 9, 1), i[0], i[1], i[2]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
