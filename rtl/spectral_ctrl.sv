// spectral_ctrl: control unit of the spectral analyser (processing clock).
//
// Runs the measurement sequence: capture a frame, FFT, power spectrum with
// peak search, velocity, report; and repeats it while run is high.
//
// Two pieces of state:
//  * The input buffer: EMPTY -> FILLING (frame requested from the capture
//    domain by flipping arm_tgl) -> FULL (cap_tgl seen through a
//    synchroniser) -> LOADING (FFT reading it) -> EMPTY (fft_in_free).
//    A new frame is requested as soon as the buffer is EMPTY and run is
//    high, so capture of frame n+1 overlaps the processing of frame n
//    (arm_overlap marks the requests that do).
//  * The sequencer (spa_pkg::ctrl_state_e): IDLE -> WAIT_CAP -> FFT -> PSD
//    -> VEL -> REPORT -> WAIT_CAP (or IDLE once run is low). fft_start is
//    pulsed when the buffer is FULL, psd_start when the FFT is done; the
//    sequencer leaves VEL on vel_valid, and result_valid pulses in REPORT.
//
// From the document: a control logic unit that coordinates the devices, the
// order of steps of its flowchart, and concurrent operation of the tasks.
// The handshakes, the overlap of capture with processing and the toggle
// clock-domain crossing are this design's own.
module spectral_ctrl
  import spa_pkg::*;
#(
  parameter int unsigned CNT_W = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             run,
  // capture domain
  output logic             arm_tgl,
  input  logic             cap_tgl,
  output logic             arm_overlap,
  // FFT
  output logic             fft_start,
  input  logic             fft_in_free,
  input  logic             fft_done,
  // PSD / frequency / velocity
  output logic             psd_start,
  input  logic             psd_done,
  input  logic             vel_valid,
  // status
  output logic             result_valid,
  output ctrl_state_e      state,
  output logic [CNT_W-1:0] frame_count
);

  typedef enum logic [1:0] {B_EMPTY, B_FILLING, B_FULL, B_LOADING} buf_state_e;

  buf_state_e buf_st;
  logic cap_s, cap_seen;

  cdc_sync u_cap_sync (.clk, .rst_n, .d(cap_tgl), .q(cap_s));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      buf_st       <= B_EMPTY;
      cap_seen     <= 1'b0;
      arm_tgl      <= 1'b0;
      arm_overlap  <= 1'b0;
      state        <= ST_IDLE;
      fft_start    <= 1'b0;
      psd_start    <= 1'b0;
      result_valid <= 1'b0;
      frame_count  <= '0;
    end else begin
      fft_start    <= 1'b0;
      psd_start    <= 1'b0;
      result_valid <= 1'b0;
      arm_overlap  <= 1'b0;

      // input buffer
      unique case (buf_st)
        B_EMPTY: if (run) begin
          arm_tgl     <= ~arm_tgl;
          buf_st      <= B_FILLING;
          arm_overlap <= (state != ST_IDLE) && (state != ST_WAIT_CAP);
        end
        B_FILLING: if (cap_s != cap_seen) begin
          cap_seen <= cap_s;
          buf_st   <= B_FULL;
        end
        B_FULL: if (state == ST_WAIT_CAP) begin
          buf_st    <= B_LOADING;
          fft_start <= 1'b1;
        end
        B_LOADING: if (fft_in_free) buf_st <= B_EMPTY;
        default: buf_st <= B_EMPTY;
      endcase

      // sequencer
      unique case (state)
        ST_IDLE:     if (run) state <= ST_WAIT_CAP;
        ST_WAIT_CAP: if (buf_st == B_FULL) state <= ST_FFT;
        ST_FFT: if (fft_done) begin
          state     <= ST_PSD;
          psd_start <= 1'b1;
        end
        ST_PSD:      if (psd_done) state <= ST_VEL;
        ST_VEL:      if (vel_valid) state <= ST_REPORT;
        ST_REPORT: begin
          result_valid <= 1'b1;
          frame_count  <= frame_count + 1'b1;
          state        <= run ? ST_WAIT_CAP : ST_IDLE;
        end
        default: state <= ST_IDLE;
      endcase
    end
  end

  // Handshake rules: the FFT and PSD report completion only while the
  // sequencer waits for them.
  a_fft_done_in_fft: assert property (@(posedge clk) disable iff (!rst_n)
    fft_done |-> state == ST_FFT)
    else $error("spectral_ctrl: fft_done outside the FFT step");
  a_psd_done_in_psd: assert property (@(posedge clk) disable iff (!rst_n)
    psd_done |-> state == ST_PSD)
    else $error("spectral_ctrl: psd_done outside the PSD step");

endmodule
