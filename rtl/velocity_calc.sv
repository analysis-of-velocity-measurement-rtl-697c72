// velocity_calc: Doppler velocity from the measured frequency shift.
//
//   V = lambda * fd / 2
//
// fd arrives in hertz (fd_hz with fd_valid); the result is the radial speed in
// millimetres per second. lambda/2 is folded into one constant at elaboration:
// K = round(LAMBDA_UM / 2000 * 2^32), so V_mm_s = (fd_hz * K) >> 32, rounded
// to nearest. One clock latency: vel_valid follows fd_valid by one clock.
// A real-valued input spectrum cannot tell approach from recession, so the
// result is a magnitude.
//
// From the document: the formula V = lambda*fd/2. This design's choices: the
// units (hertz in, mm/s out), the constant-multiplier form and the default
// wavelength, that of the 200 MHz radar carrier (1.498962 m).
module velocity_calc #(
  parameter int unsigned     FREQ_W    = 40,
  parameter int unsigned     VEL_W     = 48,
  parameter longint unsigned LAMBDA_UM = spa_pkg::LAMBDA_UM
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              fd_valid,
  input  logic [FREQ_W-1:0] fd_hz,
  output logic              vel_valid,
  output logic [VEL_W-1:0]  vel_mm_s
);

  // lambda[um] / 2 / 1000 (um -> mm), as a 32-bit-fraction fixed-point constant
  localparam longint unsigned K = (LAMBDA_UM * 64'd2147483648 + 64'd500) / 64'd1000;
  localparam int unsigned PW = FREQ_W + 64;

  logic [PW-1:0] prod;
  assign prod = PW'(fd_hz) * PW'(K) + (PW'(1) << 31);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      vel_valid <= 1'b0;
      vel_mm_s  <= '0;
    end else begin
      vel_valid <= fd_valid;
      if (fd_valid) vel_mm_s <= VEL_W'(prod >> 32);
    end
  end

endmodule
