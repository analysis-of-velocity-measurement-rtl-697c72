// freq_measure: finds the dominant frequency in a power spectrum stream.
//
// Watches the PSD stream (in_valid, in_idx, in_pow, in_last) and keeps the
// bin of greatest power among bins K_MIN .. N/2-1. Bin 0 (DC, and with it any
// ADC offset) is skipped by default, and bins above N/2 are skipped because
// a real input's spectrum is mirrored there. On a tie the lower bin wins.
// One clock after in_last it presents, with result_valid high for one clock:
//   peak_bin   - the bin number k
//   peak_pow   - its power
//   freq_hz    - k * FS_HZ / N, rounded down (a bin is FS_HZ/N wide)
// The search restarts by itself with the next stream.
//
// From the document: the frequency of the received signal is measured from
// the power spectrum (500 MHz sampling, 1024 points, about 500 kHz per
// bin). The peak search, its bin range and tie rule are this design's own.
module freq_measure #(
  parameter int unsigned N       = spa_pkg::N_POINTS,
  parameter int unsigned PWR_W   = 2*(spa_pkg::SAMPLE_W + $clog2(spa_pkg::N_POINTS) + 1),
  parameter longint unsigned FS_HZ = spa_pkg::FS_HZ,
  parameter int unsigned K_MIN   = 1,
  parameter int unsigned FREQ_W  = 40,
  localparam int unsigned AW = $clog2(N)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid,
  input  logic              in_last,
  input  logic [AW-1:0]     in_idx,
  input  logic [PWR_W-1:0]  in_pow,
  output logic              result_valid,
  output logic [AW-1:0]     peak_bin,
  output logic [PWR_W-1:0]  peak_pow,
  output logic [FREQ_W-1:0] freq_hz
);

  logic [AW-1:0]    best_bin;
  logic [PWR_W-1:0] best_pow;
  logic             have;
  logic             in_range, better;

  assign in_range = (in_idx >= AW'(K_MIN)) && (in_idx < AW'(N/2));
  assign better   = in_valid && in_range && (!have || in_pow > best_pow);

  // the frequency of bin k: k * FS_HZ / N, N a power of two
  function automatic logic [FREQ_W-1:0] bin_to_hz(input logic [AW-1:0] k);
    logic [FREQ_W+AW-1:0] p;
    p = (FREQ_W+AW)'(k) * (FREQ_W+AW)'(FS_HZ);
    return FREQ_W'(p >> AW);
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      best_bin     <= '0;
      best_pow     <= '0;
      have         <= 1'b0;
      result_valid <= 1'b0;
      peak_bin     <= '0;
      peak_pow     <= '0;
      freq_hz      <= '0;
    end else begin
      result_valid <= 1'b0;
      if (better) begin
        best_bin <= in_idx;
        best_pow <= in_pow;
        have     <= 1'b1;
      end
      if (in_valid && in_last) begin
        result_valid <= 1'b1;
        peak_bin     <= better ? in_idx : best_bin;
        peak_pow     <= better ? in_pow : best_pow;
        freq_hz      <= bin_to_hz(better ? in_idx : best_bin);
        have         <= 1'b0;
      end
    end
  end

endmodule
