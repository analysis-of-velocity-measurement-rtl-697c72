// spa_pkg: constants and types shared by the spectral-analyser blocks.
//
// The numbers are the design's headline configuration: a 1024-point FFT on
// samples taken at 500 MSPS from a 12-bit ADC and held as 16-bit words, so one
// bin is 500e6/1024 = 488.28 kHz wide (quoted as "500 kHz resolution"). The
// Doppler wavelength is that of a 200 MHz carrier, c/200e6 = 1.498962 m; the
// carrier frequency is the only one the radar description mentions, and the
// wavelength is this design's reading of it.
package spa_pkg;

  localparam int unsigned N_POINTS  = 1024;        // FFT length
  localparam int unsigned ADC_BITS  = 12;          // ADC resolution
  localparam int unsigned SAMPLE_W  = 16;          // SRAM word / FFT input width
  localparam int unsigned TWIDDLE_W = 16;          // twiddle factor width (Q2.14)
  localparam longint unsigned FS_HZ = 500_000_000; // ADC sample rate
  localparam longint unsigned LAMBDA_UM = 1_498_962; // RF wavelength in micrometres

  // States of the measurement sequencer (one pass of the flowchart:
  // read samples, FFT, store Re/Im, PSD, frequency, velocity).
  typedef enum logic [2:0] {
    ST_IDLE,     // waiting for run
    ST_WAIT_CAP, // waiting for a full frame in the input SRAM
    ST_FFT,      // FFT running (load, butterflies, unload to result SRAM)
    ST_PSD,      // PSD sweep with peak search
    ST_VEL,      // velocity multiply
    ST_REPORT    // one-cycle result strobe
  } ctrl_state_e;

endpackage
