// adc_if: parallel ADC capture interface (sample-clock domain).
//
// The ADC delivers one ADC_W-bit sample per sample clock on a parallel bus
// (LVDS pairs already turned into single-ended signals by the input pads).
// The interface registers each sample in the input flip-flops, widens it to
// the SAMPLE_W-bit SRAM word by sign extension, and writes N consecutive
// samples to addresses 0..N-1 of the input SRAM, one per clock, with no gaps.
//
// Frames are taken on request. The processing domain flips arm_tgl to ask for
// a frame; the change is synchronised here, and the next N samples are
// written. When the last one is written, cap_tgl flips and is synchronised in
// the processing domain. Samples that arrive while no frame is requested are
// dropped, so the FFT may read the SRAM undisturbed.
//
// Timing: the write strobe for address 0 is presented 4 sample clocks after
// arm_tgl changes (2 synchroniser stages, the start flag, the write register),
// then one write per clock; cap_tgl flips on the edge that performs the last
// write, so the whole frame is in the SRAM when the other domain sees it.
//
// From the document: parallel (not serial) ADC interface, 12-bit samples
// stored in 16-bit SRAM words at the full sample rate, 1024-sample frames.
// This design's choices: the toggle handshake, sign extension, and the
// OFFSET_BINARY option (the ADC's output coding is not given; setting it
// inverts the MSB to turn offset binary into two's complement).
module adc_if #(
  parameter int unsigned ADC_W    = spa_pkg::ADC_BITS,
  parameter int unsigned SAMPLE_W = spa_pkg::SAMPLE_W,
  parameter int unsigned N        = spa_pkg::N_POINTS,
  parameter bit          OFFSET_BINARY = 1'b0,
  localparam int unsigned AW = $clog2(N)
) (
  input  logic                adc_clk,
  input  logic                adc_rst_n,
  input  logic [ADC_W-1:0]    adc_data,   // sample bus from the ADC
  input  logic                arm_tgl,    // frame request (processing domain)
  output logic                we,         // input SRAM write strobe
  output logic [AW-1:0]       waddr,
  output logic [SAMPLE_W-1:0] wdata,
  output logic                cap_tgl,    // frame complete (toggles)
  output logic                capturing
);

  logic arm_s, arm_seen;
  logic [ADC_W-1:0] sample_q;
  logic [AW-1:0]    cnt;

  cdc_sync u_arm_sync (.clk(adc_clk), .rst_n(adc_rst_n), .d(arm_tgl), .q(arm_s));

  // Input register (would sit in the I/O block)
  always_ff @(posedge adc_clk) begin
    sample_q <= adc_data ^ (ADC_W'(OFFSET_BINARY) << (ADC_W-1));
  end

  always_ff @(posedge adc_clk or negedge adc_rst_n) begin
    if (!adc_rst_n) begin
      arm_seen  <= 1'b0;
      capturing <= 1'b0;
      cnt       <= '0;
      we        <= 1'b0;
      waddr     <= '0;
      wdata     <= '0;
      cap_tgl   <= 1'b0;
    end else begin
      we <= 1'b0;
      if (arm_s != arm_seen) begin
        arm_seen  <= arm_s;
        capturing <= 1'b1;
        cnt       <= '0;
      end else if (capturing) begin
        we    <= 1'b1;
        waddr <= cnt;
        wdata <= SAMPLE_W'(signed'(sample_q));
        cnt   <= cnt + 1'b1;
        if (cnt == AW'(N-1)) capturing <= 1'b0;
      end
      // Flip on the edge that performs the last SRAM write
      if (we && waddr == AW'(N-1)) cap_tgl <= ~cap_tgl;
    end
  end

  // The processing side asks for a new frame only after the last one is in.
  a_no_rearm: assert property (@(posedge adc_clk) disable iff (!adc_rst_n)
    (arm_s != arm_seen) |-> !capturing)
    else $error("adc_if: frame requested while a frame is being captured");

endmodule
