// twiddle_rom: twiddle factors W_N^k = cos(2*pi*k/N) - j*sin(2*pi*k/N) for
// k = 0..N/2-1, as TW-bit signed numbers with TW-2 fraction bits (Q2.14 at
// TW = 16, so W^0 = 1.0 is exact). The table is computed when the design is
// elaborated: re = round(cos(2*pi*k/N) * 2^(TW-2)), im = -round(sin(...)).
// Read is synchronous, one clock of latency, like the block RAM it maps to.
module twiddle_rom #(
  parameter int unsigned N  = 1024,
  parameter int unsigned TW = 16,
  localparam int unsigned KW = $clog2(N/2)
) (
  input  logic                 clk,
  input  logic [KW-1:0]        k,
  output logic signed [TW-1:0] w_re,
  output logic signed [TW-1:0] w_im
);

  localparam real PI = 3.14159265358979323846;

  logic signed [TW-1:0] rom_re [N/2];
  logic signed [TW-1:0] rom_im [N/2];

  initial begin
    for (int i = 0; i < N/2; i++) begin
      rom_re[i] = TW'($rtoi($floor($cos(2.0*PI*i/N) * (2.0**(TW-2)) + 0.5)));
      rom_im[i] = TW'(-$rtoi($floor($sin(2.0*PI*i/N) * (2.0**(TW-2)) + 0.5)));
    end
  end

  always_ff @(posedge clk) begin
    w_re <= rom_re[k];
    w_im <= rom_im[k];
  end

endmodule
