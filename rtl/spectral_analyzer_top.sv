// spectral_analyzer_top: FFT spectral analyser that measures the Doppler
// shift of a radar echo and turns it into a radial velocity.
//
// Data path, following the block diagram of the design:
//   ADC bus -> adc_if (sample clock) -> input SRAM (1024 x 16, written at
//   the sample clock, read at the processing clock) -> fft_r2dif (1024-point
//   radix-2 DIF) -> result SRAM (1024 x {Re, Im}) -> psd_calc (|X|^2)
//   -> freq_measure (peak bin, Doppler frequency) -> velocity_calc
//   (V = lambda * fd / 2)
// with spectral_ctrl sequencing the steps. Two clocks: adc_clk, the ADC's
// sample clock (500 MHz in the target system, one sample every 2 ns), and
// clk, the processing clock, which may be much slower (the FFT side is
// meant to run at a 200 ns cycle). The only crossings are the input SRAM
// and two toggle handshakes.
//
// Outputs: the PSD stream (psd_valid/psd_bin/psd_power), which is what a
// display driver would draw, and per frame, with result_valid: peak_bin,
// peak_power, doppler_hz and velocity_mm_s. The LCD driver and the analog
// front end (ADC, LVDS pads) sit outside this module.
//
// Frame timing at N = 1024: 1024 sample clocks of capture; then
// 12 291 clocks of FFT, N + 2 of PSD and 3 of velocity and reporting, about
// 13 320 processing clocks per result. Capture of the next frame runs while
// the current one is processed.
module spectral_analyzer_top
  import spa_pkg::*;
#(
  parameter int unsigned     N         = N_POINTS,
  parameter int unsigned     ADC_W     = ADC_BITS,
  parameter int unsigned     IW        = SAMPLE_W,
  parameter int unsigned     TW        = TWIDDLE_W,
  parameter longint unsigned FS        = FS_HZ,
  parameter longint unsigned LAMBDA    = LAMBDA_UM,
  localparam int unsigned    AW        = $clog2(N),
  localparam int unsigned    OW        = IW + AW + 1,
  localparam int unsigned    PWR_W     = 2*OW,
  localparam int unsigned    FREQ_W    = 40,
  localparam int unsigned    VEL_W     = 48
) (
  input  logic              rst_n,        // asynchronous, both domains
  // ADC side
  input  logic              adc_clk,
  input  logic [ADC_W-1:0]  adc_data,
  // processing side
  input  logic              clk,
  input  logic              run,          // measure continuously while high
  output logic              psd_valid,
  output logic [AW-1:0]     psd_bin,
  output logic [PWR_W-1:0]  psd_power,
  output logic              result_valid,
  output logic [AW-1:0]     peak_bin,
  output logic [PWR_W-1:0]  peak_power,
  output logic [FREQ_W-1:0] doppler_hz,
  output logic [VEL_W-1:0]  velocity_mm_s,
  output logic [15:0]       frame_count,
  output ctrl_state_e       state,
  output logic              processing,   // FFT or PSD busy
  output logic              capturing,    // adc_clk domain
  output logic              arm_overlap   // capture requested during processing
);

  logic adc_rst_n, proc_rst_n;
  rst_sync u_rst_adc  (.clk(adc_clk), .rst_n_in(rst_n), .rst_n_out(adc_rst_n));
  rst_sync u_rst_proc (.clk(clk),     .rst_n_in(rst_n), .rst_n_out(proc_rst_n));

  // ---- capture ----
  logic          arm_tgl, cap_tgl;
  logic          in_we;
  logic [AW-1:0] in_waddr;
  logic [IW-1:0] in_wdata;

  adc_if #(.ADC_W(ADC_W), .SAMPLE_W(IW), .N(N)) u_adc_if (
    .adc_clk, .adc_rst_n, .adc_data, .arm_tgl,
    .we(in_we), .waddr(in_waddr), .wdata(in_wdata), .cap_tgl, .capturing
  );

  logic          in_re;
  logic [AW-1:0] in_raddr;
  logic [IW-1:0] in_rdata;

  sram_dp #(.DEPTH(N), .WIDTH(IW)) u_in_sram (
    .wclk(adc_clk), .we(in_we), .waddr(in_waddr), .wdata(in_wdata),
    .rclk(clk), .re(in_re), .raddr(in_raddr), .rdata(in_rdata)
  );

  // ---- FFT ----
  logic fft_start, fft_busy, fft_done, fft_in_free;
  logic fft_valid;
  logic [AW-1:0] fft_idx;
  logic signed [OW-1:0] fft_re, fft_im;

  fft_r2dif #(.N(N), .IW(IW), .TW(TW)) u_fft (
    .clk, .rst_n(proc_rst_n), .start(fft_start), .busy(fft_busy), .done(fft_done),
    .in_re, .in_addr(in_raddr), .in_data(in_rdata), .in_free(fft_in_free),
    .out_valid(fft_valid), .out_idx(fft_idx), .out_re(fft_re), .out_im(fft_im)
  );

  logic            res_re;
  logic [AW-1:0]   res_raddr;
  logic [2*OW-1:0] res_rdata;

  sram_dp #(.DEPTH(N), .WIDTH(2*OW)) u_res_sram (
    .wclk(clk), .we(fft_valid), .waddr(fft_idx), .wdata({fft_re, fft_im}),
    .rclk(clk), .re(res_re), .raddr(res_raddr), .rdata(res_rdata)
  );

  // ---- PSD, frequency, velocity ----
  logic psd_start, psd_busy, psd_done, psd_last;

  psd_calc #(.N(N), .DW(OW)) u_psd (
    .clk, .rst_n(proc_rst_n), .start(psd_start), .busy(psd_busy), .done(psd_done),
    .rd_en(res_re), .rd_addr(res_raddr), .rd_data(res_rdata),
    .out_valid(psd_valid), .out_last(psd_last), .out_idx(psd_bin), .out_pow(psd_power)
  );

  logic              fm_valid;
  logic [FREQ_W-1:0] fm_hz;

  freq_measure #(.N(N), .PWR_W(PWR_W), .FS_HZ(FS), .FREQ_W(FREQ_W)) u_freq (
    .clk, .rst_n(proc_rst_n), .in_valid(psd_valid), .in_last(psd_last),
    .in_idx(psd_bin), .in_pow(psd_power),
    .result_valid(fm_valid), .peak_bin, .peak_pow(peak_power), .freq_hz(fm_hz)
  );

  assign doppler_hz = fm_hz;
  assign processing = fft_busy | psd_busy;

  logic vel_valid;

  velocity_calc #(.FREQ_W(FREQ_W), .VEL_W(VEL_W), .LAMBDA_UM(LAMBDA)) u_vel (
    .clk, .rst_n(proc_rst_n), .fd_valid(fm_valid), .fd_hz(fm_hz),
    .vel_valid, .vel_mm_s(velocity_mm_s)
  );

  // ---- control ----
  spectral_ctrl #(.CNT_W(16)) u_ctrl (
    .clk, .rst_n(proc_rst_n), .run,
    .arm_tgl, .cap_tgl, .arm_overlap,
    .fft_start, .fft_in_free, .fft_done,
    .psd_start, .psd_done, .vel_valid,
    .result_valid, .state, .frame_count
  );

endmodule
