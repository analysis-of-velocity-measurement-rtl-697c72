// tb_sram_dp: self-checking test of the two-clock dual-port SRAM at its
// default size (1024 x 16), with a 2 ns write clock and a 20 ns read clock.
// Phase 1 writes a full frame of random words at the fast clock and reads
// them all back at the slow clock, checking the one-clock read latency.
// Phase 2 rewrites a random subset of addresses and checks that exactly
// those changed. A read with re low must hold the previous output.
module tb_sram_dp;
  localparam int DEPTH = 1024, WIDTH = 16, AW = 10;

  logic wclk = 0, rclk = 0, we = 0, re = 0;
  logic [AW-1:0] waddr = '0, raddr = '0;
  logic [WIDTH-1:0] wdata = '0, rdata;

  always #1  wclk = ~wclk;
  always #10 rclk = ~rclk;

  sram_dp #(.DEPTH(DEPTH), .WIDTH(WIDTH)) dut (.*);

  logic [WIDTH-1:0] model [DEPTH];
  int checks = 0, failures = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic write_word(int a, logic [WIDTH-1:0] d);
    @(negedge wclk); we = 1; waddr = AW'(a); wdata = d;
    @(negedge wclk); we = 0;
    model[a] = d;
  endtask

  task automatic read_all(string tag);
    int bad = 0;
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge rclk); re = 1; raddr = AW'(a);
      @(negedge rclk); re = 0;
      if (rdata !== model[a]) bad++;
    end
    check(bad == 0, $sformatf("%s: %0d words read back wrong", tag, bad));
  endtask

  initial begin
    // full frame written at the fast clock, one word per clock
    @(negedge wclk);
    for (int a = 0; a < DEPTH; a++) begin
      model[a] = WIDTH'($urandom);
      we = 1; waddr = AW'(a); wdata = model[a];
      @(negedge wclk);
    end
    we = 0;
    read_all("frame");
    for (int i = 0; i < 100; i++) write_word($urandom_range(DEPTH-1), WIDTH'($urandom));
    read_all("partial rewrite");
    // output holds while re is low
    @(negedge rclk); re = 1; raddr = 10'd5;
    @(negedge rclk); re = 0; raddr = 10'd6;
    @(negedge rclk);
    check(rdata == model[5], "rdata held while re low");
    // read latency: data appears on the first rclk edge after re
    @(negedge rclk); re = 1; raddr = 10'd7;
    @(posedge rclk); #1;
    check(rdata == model[7], "one-clock read latency");
    re = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
