// tb_fft_r2dif: self-checking test of the radix-2 DIF FFT at its full size
// (1024 points, 16-bit input).
//
// Each case fills a behavioural input memory (one-clock read latency, like
// the input SRAM), starts the FFT, collects the natural-order output stream and
// compares it with a double-precision DFT computed here. Exact checks: the
// output order and count, X[0] equal to the integer sum of the samples
// (no scaling anywhere), an impulse giving a flat spectrum and a constant
// giving a single bin. All other bins must lie within an error bound derived
// from the twiddle quantisation. The start-to-done latency is checked against
// (N+2) + N*log2(N) + (N+1) clocks.
module tb_fft_r2dif;
  localparam int N = 1024, IW = 16, TW = 16;
  localparam int LOG2N = $clog2(N);
  localparam int OW = IW + LOG2N + 1;
  localparam real PI = 3.14159265358979323846;

  logic clk = 0, rst_n = 0, start = 0;
  logic busy, done, in_re, in_free, out_valid;
  logic [LOG2N-1:0] in_addr, out_idx;
  logic [IW-1:0] in_data;
  logic signed [OW-1:0] out_re, out_im;

  always #5 clk = ~clk;

  fft_r2dif #(.N(N), .IW(IW), .TW(TW)) dut (.*);

  logic signed [IW-1:0] xmem [N];
  always_ff @(posedge clk) if (in_re) in_data <= xmem[in_addr];

  longint got_re [N], got_im [N];
  int nout, order_err, free_seen;
  always @(posedge clk) begin
    if (out_valid) begin
      if (int'(out_idx) != nout) order_err++;
      got_re[out_idx] = longint'(out_re);
      got_im[out_idx] = longint'(out_im);
      nout++;
    end
    if (in_free) free_seen++;
  end

  int checks = 0, failures = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // mode: 0 random, 1 impulse, 2 constant, 3 two tones
  task automatic run_case(int mode, string name);
    real rr, ri, err, maxerr, tol, energy;
    longint sum;
    int t0, lat;
    sum = 0; energy = 0;
    for (int n = 0; n < N; n++) begin
      case (mode)
        0: xmem[n] = IW'($urandom);
        1: xmem[n] = (n == 0) ? 16'sd12345 : 16'sd0;
        2: xmem[n] = -16'sd1000;
        default: xmem[n] = IW'($rtoi(2047.0*$cos(2.0*PI*37*n/N) + 900.0*$sin(2.0*PI*200*n/N)));
      endcase
      sum += longint'(xmem[n]);
      energy += real'(xmem[n]) * real'(xmem[n]);
    end
    nout = 0; order_err = 0; free_seen = 0;
    @(negedge clk) start = 1;
    t0 = cyc;
    @(negedge clk) start = 0;
    while (!done) @(negedge clk);
    lat = cyc - t0;
    @(negedge clk); // last output word is taken on this edge
    check(lat == (N+2) + N*LOG2N + (N+1), $sformatf("%s latency %0d", name, lat));
    check(nout == N && order_err == 0, $sformatf("%s output count %0d order errors %0d", name, nout, order_err));
    check(free_seen == 1, $sformatf("%s in_free pulses %0d", name, free_seen));
    check(got_re[0] == sum && got_im[0] == 0, $sformatf("%s X[0]=%0d,%0d sum=%0d", name, got_re[0], got_im[0], sum));
    if (mode == 1) begin
      int bad = 0;
      for (int k = 0; k < N; k++) if (got_re[k] != 12345 || got_im[k] != 0) bad++;
      check(bad == 0, $sformatf("impulse: %0d bins not exactly 12345", bad));
    end
    if (mode == 2) begin
      int bad = 0;
      for (int k = 1; k < N; k++) if (got_re[k] != 0 || got_im[k] != 0) bad++;
      check(bad == 0, $sformatf("constant: %0d nonzero bins", bad));
    end
    // error bound: twiddle quantisation 2^-(TW-1) per component per stage on a
    // value of rms size sqrt(energy), plus a few LSBs of rounding per stage
    tol = 4.0 * LOG2N + $sqrt(energy) * (2.0 ** (1 - TW)) * LOG2N;
    maxerr = 0;
    for (int k = 0; k < N; k++) begin
      rr = 0; ri = 0;
      for (int n = 0; n < N; n++) begin
        rr += real'(xmem[n]) * $cos(2.0*PI*((k*n) % N)/N);
        ri -= real'(xmem[n]) * $sin(2.0*PI*((k*n) % N)/N);
      end
      err = $sqrt((rr - got_re[k])**2 + (ri - got_im[k])**2);
      if (err > maxerr) maxerr = err;
    end
    $display("%s: max |error| %f (bound %f)", name, maxerr, tol);
    check(maxerr <= tol, $sformatf("%s spectrum error %f > %f", name, maxerr, tol));
  endtask

  int cyc = 0;
  always @(posedge clk) cyc++;

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (2) @(negedge clk);
    run_case(1, "impulse");
    run_case(2, "constant");
    run_case(3, "two tones");
    run_case(0, "random");
    run_case(0, "random2");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
