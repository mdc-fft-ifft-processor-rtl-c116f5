// cmult: complex multiplier for twiddle factor multiplication.
//
// p = a * w, with a an integer sample and w a fixed-point twiddle factor with
// FRAC fraction bits. Four real products, one subtractor and one adder; the
// sums are rounded (add half an LSB, arithmetic shift right by FRAC). The
// result is one bit wider than the sample because |w| = 1 can still rotate a
// full-scale corner sample to sqrt(2) of full scale. Combinational.
// The document names complex multipliers for the twiddles; widths, format
// and rounding are this design's choices.
module cmult #(
  parameter int DW   = 16,  // sample width (real and imaginary part)
  parameter int TW   = 16,  // twiddle width
  parameter int FRAC = 14   // twiddle fraction bits
) (
  input  logic signed [DW-1:0] a_re,
  input  logic signed [DW-1:0] a_im,
  input  logic signed [TW-1:0] w_re,
  input  logic signed [TW-1:0] w_im,
  output logic signed [DW:0]   p_re,
  output logic signed [DW:0]   p_im
);

  localparam int PW = DW + TW + 1;
  localparam logic signed [PW-1:0] HALF = PW'(1) <<< (FRAC - 1);

  logic signed [PW-1:0] acc_re, acc_im;

  always_comb begin
    acc_re = PW'(a_re) * PW'(w_re) - PW'(a_im) * PW'(w_im) + HALF;
    acc_im = PW'(a_re) * PW'(w_im) + PW'(a_im) * PW'(w_re) + HALF;
    p_re   = (DW+1)'(acc_re >>> FRAC);
    p_im   = (DW+1)'(acc_im >>> FRAC);
  end

endmodule
