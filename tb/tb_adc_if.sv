// tb_adc_if: self-checking test of the ADC capture interface at its default
// size (12-bit samples, 16-bit words, 1024-sample frames).
//
// A counter-like pattern with random values is driven on the ADC bus; a
// model of the SRAM collects the writes. Checks: nothing is written before a
// frame is requested; after a request exactly N writes occur, to addresses
// 0..N-1 on consecutive clocks, each word being the sign-extended sample
// presented two clocks earlier; cap_tgl flips once, on the last write; the
// first write strobe is presented 4 clocks after the request (the write
// itself is the 5th edge); samples between frames are
// dropped. Two frames are taken, the second with offset-binary coding
// checked through a second instance.
module tb_adc_if;
  localparam int N = 1024, AW = 10;

  logic clk = 0, rst_n = 0, arm_tgl = 0;
  logic [11:0] adc_data = '0;
  logic we, cap_tgl, capturing, we2, cap2, capt2;
  logic [AW-1:0] waddr, waddr2;
  logic [15:0] wdata, wdata2;

  always #1 clk = ~clk;

  adc_if dut (.adc_clk(clk), .adc_rst_n(rst_n), .adc_data, .arm_tgl,
              .we, .waddr, .wdata, .cap_tgl, .capturing);
  adc_if #(.OFFSET_BINARY(1'b1)) dut_ob (.adc_clk(clk), .adc_rst_n(rst_n), .adc_data, .arm_tgl,
              .we(we2), .waddr(waddr2), .wdata(wdata2), .cap_tgl(cap2), .capturing(capt2));

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // history of bus values, by clock
  int cyc = 0;
  logic [11:0] hist [int];
  always @(posedge clk) begin
    hist[cyc] = adc_data;
    cyc++;
  end
  always @(negedge clk) adc_data = 12'($urandom);

  int nwr, addr_bad, data_bad, ob_bad, first_wr, last_wr, tgl_cnt;
  logic tgl_d;
  always @(posedge clk) begin
    if (we) begin
      logic [11:0] s;
      s = hist[cyc - 3];   // bus value two clocks before this write edge
      if (int'(waddr) != nwr) addr_bad++;
      if (wdata != {{4{s[11]}}, s}) data_bad++;
      if (!we2 || wdata2 != {{4{~s[11]}}, ~s[11], s[10:0]}) ob_bad++;
      if (nwr == 0) first_wr = cyc;
      last_wr = cyc;
      nwr++;
    end
    tgl_d <= cap_tgl;
    if (rst_n && cap_tgl != tgl_d) begin
      tgl_cnt++;
      check(cyc == last_wr + 1, "cap_tgl flips on the last write edge");
    end
  end

  task automatic frame(string tag);
    int t0;
    nwr = 0; addr_bad = 0; data_bad = 0; ob_bad = 0; tgl_cnt = 0;
    @(negedge clk); arm_tgl = ~arm_tgl; t0 = cyc;
    repeat (N + 50) @(negedge clk);
    check(nwr == N, $sformatf("%s: %0d writes", tag, nwr));
    check(addr_bad == 0, $sformatf("%s: %0d address errors", tag, addr_bad));
    check(data_bad == 0, $sformatf("%s: %0d data errors", tag, data_bad));
    check(ob_bad == 0, $sformatf("%s: %0d offset-binary errors", tag, ob_bad));
    check(last_wr - first_wr == N - 1, $sformatf("%s: writes not back to back", tag));
    check(first_wr - t0 == 5, $sformatf("%s: first write %0d clocks after request", tag, first_wr - t0));
    check(tgl_cnt == 1, $sformatf("%s: cap_tgl flipped %0d times", tag, tgl_cnt));
    check(!capturing, $sformatf("%s: still capturing", tag));
  endtask

  initial begin
    tgl_d = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    nwr = 0;
    repeat (40) @(negedge clk);
    check(nwr == 0, "no writes without a request");
    frame("frame 1");
    repeat (100) @(negedge clk);
    frame("frame 2");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #20000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
