// tb_psd_calc: self-checking test of the power-spectrum unit at its default
// size (1024 bins of 27-bit Re/Im). A behavioural result SRAM (one-clock read
// latency) is filled with random and extreme values; the unit is started and
// every streamed power is compared with Re^2 + Im^2 computed here in 64-bit
// arithmetic. Also checked: bins in order, out_last on bin N-1 only, done one
// clock after it, bin k leaving k + 2 clocks after start, and a second sweep.
module tb_psd_calc;
  localparam int N = 1024, DW = 27, AW = 10;

  logic clk = 0, rst_n = 0, start = 0;
  logic busy, done, rd_en, out_valid, out_last;
  logic [AW-1:0] rd_addr, out_idx;
  logic [2*DW-1:0] rd_data, out_pow;

  always #5 clk = ~clk;

  psd_calc #(.N(N), .DW(DW)) dut (.*);

  logic signed [DW-1:0] mre [N], mim [N];
  always_ff @(posedge clk) if (rd_en) rd_data <= {mre[rd_addr], mim[rd_addr]};

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  int cyc = 0, t0, n, bad, order_bad, last_bad, lat_bad, done_cyc, last_cyc;
  always @(posedge clk) begin
    cyc++;
    if (out_valid) begin
      longint unsigned e;
      e = longint'(mre[out_idx]) * longint'(mre[out_idx]) + longint'(mim[out_idx]) * longint'(mim[out_idx]);
      if (64'(out_pow) != e) bad++;
      if (int'(out_idx) != n) order_bad++;
      if (out_last != (n == N-1)) last_bad++;
      // start is taken on edge t0+1; bin n is on the outputs after edge
      // t0+1+n+2 and is sampled here on the edge after that
      if (cyc - t0 != n + 4) lat_bad++;
      if (out_last) last_cyc = cyc;
      n++;
    end
    if (done) done_cyc = cyc;
  end

  task automatic sweep(string tag);
    n = 0; bad = 0; order_bad = 0; last_bad = 0; lat_bad = 0; done_cyc = -1;
    @(negedge clk); start = 1; t0 = cyc;
    @(negedge clk); start = 0;
    repeat (N + 10) @(negedge clk);
    check(n == N, $sformatf("%s: %0d bins", tag, n));
    check(bad == 0, $sformatf("%s: %0d wrong powers", tag, bad));
    check(order_bad == 0 && last_bad == 0, $sformatf("%s: order %0d last %0d", tag, order_bad, last_bad));
    check(lat_bad == 0, $sformatf("%s: %0d bins late or early", tag, lat_bad));
    check(done_cyc == last_cyc + 1, $sformatf("%s: done at %0d, last at %0d", tag, done_cyc, last_cyc));
    check(!busy, $sformatf("%s: still busy", tag));
  endtask

  initial begin
    for (int k = 0; k < N; k++) begin
      mre[k] = DW'($urandom); mim[k] = DW'($urandom);
    end
    mre[3] = {1'b1, {(DW-1){1'b0}}}; mim[3] = {1'b1, {(DW-1){1'b0}}};  // most negative
    mre[4] = {1'b0, {(DW-1){1'b1}}}; mim[4] = {1'b0, {(DW-1){1'b1}}};  // most positive
    mre[5] = 0; mim[5] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    sweep("sweep 1");
    for (int k = 0; k < N; k++) begin
      mre[k] = DW'($signed($urandom_range(2000)) - 1000); mim[k] = DW'($urandom);
    end
    sweep("sweep 2");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
