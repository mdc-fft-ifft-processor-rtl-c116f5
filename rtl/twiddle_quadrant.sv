// twiddle_quadrant: quadrant conversion of externally supplied twiddle
// factors for the parallel 64-point FFT.
//
// The caller supplies the first quadrant W_64^k, k = 0..15, as a table. Any
// W_64^e, e = 0..63, follows from W^(16q+k) = (-j)^q * W^k: the two top bits
// of e count quarter turns, each of which maps (re, im) to (im, -re). The
// table format (signed, TW bits per part) is the caller's. Combinational.
module twiddle_quadrant #(
  parameter int TW = 8
) (
  input  logic signed [TW-1:0] tab_re [16],
  input  logic signed [TW-1:0] tab_im [16],
  input  logic        [5:0]    e,
  output logic signed [TW-1:0] w_re,
  output logic signed [TW-1:0] w_im
);

  logic signed [TW-1:0] r, i;

  always_comb begin
    r = tab_re[e[3:0]];
    i = tab_im[e[3:0]];
    unique case (e[5:4])
      2'd0: begin w_re =  r; w_im =  i; end
      2'd1: begin w_re =  i; w_im = -r; end
      2'd2: begin w_re = -r; w_im = -i; end
      default: begin w_re = -i; w_im =  r; end
    endcase
  end

endmodule
