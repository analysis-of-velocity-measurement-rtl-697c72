// tb_velocity_calc: self-checking test of V = lambda * fd / 2 with the default
// wavelength (1.498962 m). Doppler frequencies from 0 to 250 MHz, including
// the frequencies of bins of a 1024-point FFT at 500 MSPS, are applied and the
// velocity in mm/s is compared with the formula evaluated here in double
// precision (within 1 mm/s), together with the one-clock latency.
module tb_velocity_calc;
  logic clk = 0, rst_n = 0, fd_valid = 0;
  logic [39:0] fd_hz = '0;
  logic vel_valid;
  logic [47:0] vel_mm_s;

  always #5 clk = ~clk;

  velocity_calc dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic one(longint f);
    real v;
    @(negedge clk); fd_valid = 1; fd_hz = 40'(f);
    @(negedge clk); fd_valid = 0;
    v = 1.498962 * real'(f) / 2.0 * 1000.0;
    check(vel_valid, "vel_valid one clock after fd_valid");
    check(real'(vel_mm_s) - v <= 1.0 && v - real'(vel_mm_s) <= 1.0,
          $sformatf("fd %0d Hz: %0d mm/s, expected %f", f, vel_mm_s, v));
    @(negedge clk);
    check(!vel_valid, "vel_valid is a single pulse");
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    one(0);
    one(1);
    one(1000);
    one(488281);            // bin 1
    one(100097656);         // bin 205
    one(250000000);         // Nyquist
    for (int i = 0; i < 20; i++) one(longint'($urandom_range(250_000_000)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
