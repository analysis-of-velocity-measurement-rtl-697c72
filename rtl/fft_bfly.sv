// fft_bfly: radix-2 decimation-in-frequency butterfly (combinational).
//
//   x = a + b
//   y = (a - b) * w
//
// a, b, x, y are complex OW-bit two's-complement numbers; w is a twiddle
// factor with TW-2 fraction bits. The product is rounded back to OW bits
// (add half an LSB, then arithmetic right shift by TW-2). Plain truncation
// would add a bias of half an LSB per stage that the following stages
// accumulate into every bin. No scaling is applied: the caller sizes OW so
// that N-point growth cannot overflow.
module fft_bfly #(
  parameter int unsigned OW = 27,
  parameter int unsigned TW = 16
) (
  input  logic signed [OW-1:0] a_re, a_im,
  input  logic signed [OW-1:0] b_re, b_im,
  input  logic signed [TW-1:0] w_re, w_im,
  output logic signed [OW-1:0] x_re, x_im,
  output logic signed [OW-1:0] y_re, y_im
);

  localparam int unsigned PW = OW + TW + 2;

  logic signed [OW:0]   d_re, d_im;
  logic signed [PW-1:0] p_re, p_im;

  always_comb begin
    x_re = a_re + b_re;
    x_im = a_im + b_im;
    d_re = (OW+1)'(a_re) - (OW+1)'(b_re);
    d_im = (OW+1)'(a_im) - (OW+1)'(b_im);
    p_re = PW'(d_re) * PW'(w_re) - PW'(d_im) * PW'(w_im);
    p_im = PW'(d_re) * PW'(w_im) + PW'(d_im) * PW'(w_re);
    y_re = OW'((p_re + (PW'(1) <<< (TW-3))) >>> (TW-2));
    y_im = OW'((p_im + (PW'(1) <<< (TW-3))) >>> (TW-2));
  end

endmodule
