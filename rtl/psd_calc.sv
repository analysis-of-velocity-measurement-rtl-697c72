// psd_calc: power spectrum of a stored FFT result.
//
// On a start pulse it sweeps the result SRAM from bin 0 to bin N-1, one read
// per clock, and for every bin k delivers P[k] = Re{X[k]}^2 + Im{X[k]}^2 on
// an output stream (out_valid, out_idx, out_pow), with out_last on bin N-1.
// done pulses one clock after the last bin. The result word is {Re, Im},
// each DW bits signed.
//
// Timing: SRAM read (1 clock) + registered square-and-add (1 clock): bin k
// leaves k + 2 clocks after start; done follows N + 2 clocks after start.
//
// From the document: the PSD is computed from the stored Re/Im FFT values.
// This design's choices: P[k] is the plain squared magnitude, without
// normalisation by N or averaging, and the full 2*DW-bit result is kept.
module psd_calc #(
  parameter int unsigned N  = spa_pkg::N_POINTS,
  parameter int unsigned DW = spa_pkg::SAMPLE_W + $clog2(spa_pkg::N_POINTS) + 1,
  localparam int unsigned AW = $clog2(N),
  localparam int unsigned PWR_W = 2*DW
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               start,
  output logic               busy,
  output logic               done,
  // result SRAM read port
  output logic               rd_en,
  output logic [AW-1:0]      rd_addr,
  input  logic [2*DW-1:0]    rd_data,
  // power stream
  output logic               out_valid,
  output logic               out_last,
  output logic [AW-1:0]      out_idx,
  output logic [PWR_W-1:0]   out_pow
);

  logic [AW:0]   cnt;
  logic          run, rv;
  logic [AW-1:0] rk;
  logic signed [DW-1:0] re, im;
  logic signed [PWR_W-1:0] sq_re, sq_im;

  assign re      = signed'(rd_data[2*DW-1:DW]);
  assign im      = signed'(rd_data[DW-1:0]);
  assign sq_re   = re * re;
  assign sq_im   = im * im;
  assign rd_en   = run;
  assign rd_addr = cnt[AW-1:0];
  assign busy    = run | rv | out_valid;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt       <= '0;
      run       <= 1'b0;
      rv        <= 1'b0;
      rk        <= '0;
      out_valid <= 1'b0;
      out_last  <= 1'b0;
      out_idx   <= '0;
      out_pow   <= '0;
      done      <= 1'b0;
    end else begin
      rv        <= run;
      rk        <= cnt[AW-1:0];
      out_valid <= rv;
      out_idx   <= rk;
      out_last  <= rv && (rk == AW'(N-1));
      done      <= out_last;
      if (rv) out_pow <= unsigned'(sq_re) + unsigned'(sq_im);
      if (start && !run) begin
        run <= 1'b1;
        cnt <= '0;
      end else if (run) begin
        cnt <= cnt + 1'b1;
        if (cnt == (AW+1)'(N-1)) run <= 1'b0;
      end
    end
  end

endmodule
