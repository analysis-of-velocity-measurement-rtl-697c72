// fft_r2dif: N-point radix-2 decimation-in-frequency FFT, fixed point, in place.
//
// Operation, started by a one-cycle start pulse:
//  1. LOAD   - reads the N real samples x[0..N-1] (IW bits) from the input
//              SRAM through in_re/in_addr/in_data (one clock read latency)
//              and stores them, sign-extended to WW bits, as complex words
//              in the working RAM. in_free pulses once the last read is done:
//              the input SRAM may then be refilled.
//  2. STAGES - log2(N) stages of N/2 DIF butterflies. In stage s the
//              butterfly pairs are half = N/2^(s+1) apart and use twiddle
//              W_N^(p*2^s), p being the position inside the group. Each
//              butterfly takes two clocks on the true dual-port working RAM:
//              one reading both operands, one writing both results.
//  3. UNLOAD - the DIF result lies in bit-reversed order; it is read out as
//              a stream in natural order: out_valid with out_idx = k and
//              X[k] on out_re/out_im, one bin per clock.
// done pulses with the last output word.
//
// Latency from start to done: (N + 2) + N*log2(N) + (N + 1) clocks
// (12 291 at N = 1024).
//
// Numbers: there is no scaling anywhere (X[0] equals the plain sum of the
// samples). The working RAM carries GB = 3 guard fraction bits and the
// butterfly rounds its products to them; the outputs drop the guard bits by
// truncation (floor), which gives integer results with the fraction cut
// off, as in the document's comparison with a floating-point FFT. OW = IW + log2(N) + 1
// bits hold the full growth of a real input. From the document: radix-2 DIF, 1024 points,
// 16-bit fixed-point input, real input, unscaled truncated results, Re/Im
// outputs. This design's choices: the memory organisation, the two-clock
// butterfly schedule, Q2.14 twiddles and the output widths.
module fft_r2dif #(
  parameter int unsigned N  = spa_pkg::N_POINTS,
  parameter int unsigned IW = spa_pkg::SAMPLE_W,
  parameter int unsigned TW = spa_pkg::TWIDDLE_W,
  localparam int unsigned LOG2N = $clog2(N),
  localparam int unsigned OW = IW + LOG2N + 1,
  localparam int unsigned GB = 3,          // guard fraction bits inside
  localparam int unsigned WW = OW + GB,    // working word width
  localparam int unsigned AW = LOG2N
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start,
  output logic                 busy,
  output logic                 done,
  // input SRAM read port
  output logic                 in_re,
  output logic [AW-1:0]        in_addr,
  input  logic [IW-1:0]        in_data,
  output logic                 in_free,
  // spectrum stream, natural order
  output logic                 out_valid,
  output logic [AW-1:0]        out_idx,
  output logic signed [OW-1:0] out_re,
  output logic signed [OW-1:0] out_im
);

  typedef enum logic [2:0] {S_IDLE, S_LOAD, S_LTAIL, S_RD, S_WR, S_UNLOAD, S_FLUSH} fft_state_e;

  fft_state_e state;
  logic [AW:0]        cnt;        // LOAD / UNLOAD issue counter
  logic [AW-2:0]      j;          // butterfly counter within a stage
  logic [$clog2(LOG2N+1)-1:0] s;  // stage
  logic               ld_v, ul_v; // read issued last cycle
  logic [AW-1:0]      ld_a, ul_k;

  // working RAM
  logic               we_a, we_b;
  logic [AW-1:0]      addr_a, addr_b;
  logic [2*WW-1:0]    wd_a, wd_b, rd_a, rd_b;

  tdp_ram #(.DEPTH(N), .WIDTH(2*WW)) u_work (
    .clk, .we_a, .addr_a, .wdata_a(wd_a), .rdata_a(rd_a),
    .we_b, .addr_b, .wdata_b(wd_b), .rdata_b(rd_b)
  );

  // butterfly addressing
  logic [AW-1:0]   half, a_idx, pos;
  logic [AW-2:0]   tw_k;
  logic signed [TW-1:0] w_re, w_im;

  always_comb begin
    half  = AW'(1) << (LOG2N - 1 - 32'(s));
    pos   = AW'(j) & (half - 1'b1);
    a_idx = ((AW'(j) >> (LOG2N - 1 - 32'(s))) << (LOG2N - 32'(s))) | pos;
    tw_k  = (AW-1)'(pos << s);
  end

  twiddle_rom #(.N(N), .TW(TW)) u_tw (.clk, .k(tw_k), .w_re, .w_im);

  logic signed [WW-1:0] x_re, x_im, y_re, y_im;

  fft_bfly #(.OW(WW), .TW(TW)) u_bf (
    .a_re(rd_a[2*WW-1:WW]), .a_im(rd_a[WW-1:0]),
    .b_re(rd_b[2*WW-1:WW]), .b_im(rd_b[WW-1:0]),
    .w_re, .w_im, .x_re, .x_im, .y_re, .y_im
  );

  function automatic logic [AW-1:0] bitrev(input logic [AW-1:0] v);
    for (int i = 0; i < AW; i++) bitrev[i] = v[AW-1-i];
  endfunction

  // RAM port control
  always_comb begin
    we_a   = 1'b0;
    we_b   = 1'b0;
    addr_a = a_idx;
    addr_b = a_idx | half;
    wd_a   = {x_re, x_im};
    wd_b   = {y_re, y_im};
    if (ld_v) begin
      we_a   = 1'b1;
      addr_a = ld_a;
      wd_a   = {WW'(signed'(in_data)) <<< GB, WW'(0)};
    end else if (state == S_UNLOAD) begin
      addr_a = bitrev(cnt[AW-1:0]);
    end else if (state == S_WR) begin
      we_a = 1'b1;
      we_b = 1'b1;
    end
  end

  assign in_re   = (state == S_LOAD);
  assign in_addr = cnt[AW-1:0];
  assign busy    = (state != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      cnt       <= '0;
      j         <= '0;
      s         <= '0;
      ld_v      <= 1'b0;
      ld_a      <= '0;
      ul_v      <= 1'b0;
      ul_k      <= '0;
      in_free   <= 1'b0;
      done      <= 1'b0;
      out_valid <= 1'b0;
      out_idx   <= '0;
      out_re    <= '0;
      out_im    <= '0;
    end else begin
      ld_v      <= 1'b0;
      ul_v      <= 1'b0;
      in_free   <= 1'b0;
      done      <= 1'b0;
      out_valid <= ul_v;
      out_idx   <= ul_k;
      if (ul_v) begin
        out_re <= OW'(signed'(rd_a[2*WW-1:WW]) >>> GB);
        out_im <= OW'(signed'(rd_a[WW-1:0]) >>> GB);
      end
      unique case (state)
        S_IDLE: if (start) begin
          state <= S_LOAD;
          cnt   <= '0;
        end
        S_LOAD: begin
          ld_v <= 1'b1;
          ld_a <= cnt[AW-1:0];
          cnt  <= cnt + 1'b1;
          if (cnt == (AW+1)'(N-1)) begin
            state   <= S_LTAIL;
            in_free <= 1'b1;
            j       <= '0;
            s       <= '0;
          end
        end
        S_LTAIL: state <= S_RD; // last sample is written this cycle
        S_RD: state <= S_WR;
        S_WR: begin
          state <= S_RD;
          j     <= j + 1'b1;
          if (j == (AW-1)'(N/2-1)) begin
            s <= s + 1'b1;
            if (s == $bits(s)'(LOG2N-1)) begin
              state <= S_UNLOAD;
              cnt   <= '0;
            end
          end
        end
        S_UNLOAD: begin
          ul_v <= 1'b1;
          ul_k <= cnt[AW-1:0];
          cnt  <= cnt + 1'b1;
          if (cnt == (AW+1)'(N-1)) state <= S_FLUSH;
        end
        S_FLUSH: begin
          // last word leaves on this edge
          state <= S_IDLE;
          done  <= 1'b1;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // A new start is ignored while busy; flag it in simulation.
  a_no_start_busy: assert property (@(posedge clk) disable iff (!rst_n)
    start |-> state == S_IDLE || state == S_FLUSH)
    else $error("fft_r2dif: start while busy");

endmodule
