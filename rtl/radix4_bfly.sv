// radix4_bfly: combinational radix-4 butterfly (decimation in time).
//
// Computes X(p) = sum_l y(l) * W4^(l*p) for p = 0..3 with the two-step
// factorisation that needs 8 complex additions instead of 12:
//   t0 = y0 + y2   t1 = y0 - y2   t2 = y1 + y3   t3 = y1 - y3
//   X0 = t0 + t2   X1 = t1 - j*t3   X2 = t0 - t2   X3 = t1 + j*t3
// For the inverse transform (inverse = 1) the factor -j becomes +j, so X1 and
// X3 swap their j terms. Outputs are two bits wider than the inputs, so no
// result overflows. No clock: the caller registers the result.
// The two-step factorisation and the output formulas follow the document;
// the word growth of two bits is this design's choice.
module radix4_bfly #(
  parameter int W = 16  // input width of each real/imaginary part
) (
  input  logic                inverse,
  input  logic signed [W-1:0] in_re  [4],
  input  logic signed [W-1:0] in_im  [4],
  output logic signed [W+1:0] out_re [4],
  output logic signed [W+1:0] out_im [4]
);

  logic signed [W+1:0] t_re [4];
  logic signed [W+1:0] t_im [4];

  always_comb begin
    // first step
    t_re[0] = (W+2)'(in_re[0]) + (W+2)'(in_re[2]);
    t_im[0] = (W+2)'(in_im[0]) + (W+2)'(in_im[2]);
    t_re[1] = (W+2)'(in_re[0]) - (W+2)'(in_re[2]);
    t_im[1] = (W+2)'(in_im[0]) - (W+2)'(in_im[2]);
    t_re[2] = (W+2)'(in_re[1]) + (W+2)'(in_re[3]);
    t_im[2] = (W+2)'(in_im[1]) + (W+2)'(in_im[3]);
    t_re[3] = (W+2)'(in_re[1]) - (W+2)'(in_re[3]);
    t_im[3] = (W+2)'(in_im[1]) - (W+2)'(in_im[3]);
    // second step; -j*(a+jb) = b - ja, +j*(a+jb) = -b + ja
    out_re[0] = t_re[0] + t_re[2];
    out_im[0] = t_im[0] + t_im[2];
    out_re[2] = t_re[0] - t_re[2];
    out_im[2] = t_im[0] - t_im[2];
    if (!inverse) begin
      out_re[1] = t_re[1] + t_im[3];
      out_im[1] = t_im[1] - t_re[3];
      out_re[3] = t_re[1] - t_im[3];
      out_im[3] = t_im[1] + t_re[3];
    end else begin
      out_re[1] = t_re[1] - t_im[3];
      out_im[1] = t_im[1] + t_re[3];
      out_re[3] = t_re[1] + t_im[3];
      out_im[3] = t_im[1] - t_re[3];
    end
  end

endmodule
