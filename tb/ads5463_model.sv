// ads5463_model: behavioural model of a 12-bit high-speed ADC (in the style of
// the ADS5463) sampling a sine wave, for simulation only.
//
// On every rising edge of clk the model presents the next sample
//   round(amp * sin(2*pi*freq_hz*n/FS) + offset) + small uniform noise
// clipped to the 12-bit two's-complement range. freq_hz and amp may be
// changed at any time; the phase is continuous. The differential (LVDS)
// outputs of the real part are shown as the single-ended bus seen after the
// input buffers, and the pipeline delay of the real converter is omitted.
module ads5463_model #(
  parameter real FS       = 500.0e6,
  parameter int  NOISE    = 3        // peak noise in LSB
) (
  input  logic        clk,
  input  real         freq_hz,
  input  real         amp,
  input  real         offset,
  output logic [11:0] data
);

  localparam real PI = 3.14159265358979323846;
  real phase = 0.0;

  always @(posedge clk) begin
    real v;
    int  q;
    v = amp * $sin(phase) + offset + real'(int'($urandom_range(2*NOISE, 0)) - NOISE);
    q = $rtoi(v < 0.0 ? v - 0.5 : v + 0.5);
    if (q > 2047)  q = 2047;
    if (q < -2048) q = -2048;
    data  <= 12'(q);
    phase = phase + 2.0 * PI * freq_hz / FS;
    if (phase > 2.0 * PI) phase = phase - 2.0 * PI;
  end

endmodule
