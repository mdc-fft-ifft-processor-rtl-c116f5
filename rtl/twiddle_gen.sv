// twiddle_gen: twiddle factor generator with quadrant conversion.
//
// Returns W_64^e = cos(2*pi*e/64) - j*sin(2*pi*e/64) for e = 0..63, or its
// conjugate W_64^-e when inverse = 1 (IFFT). Only a quarter wave is stored:
// COS_Q[k] = round(16384 * cos(2*pi*k/64)) for k = 0..16. The two top bits of
// e select the quadrant and the four low bits k index the table; the sine is
// read as COS_Q[16-k], and the quadrant swaps and negates the two parts
// (symmetry W^(e+16) = -j*W^e, W^(e+32) = -W^e). Output format: signed, 14
// fraction bits. Combinational.
// The document names a twiddle generator with quadrant conversion; the
// table size and format are this design's choices.
module twiddle_gen (
  input  logic        [5:0]  e,
  input  logic               inverse,
  output logic signed [15:0] w_re,
  output logic signed [15:0] w_im
);

  localparam logic signed [15:0] COS_Q [17] = '{
    16'sd16384, 16'sd16305, 16'sd16069, 16'sd15679, 16'sd15137, 16'sd14449,
    16'sd13623, 16'sd12665, 16'sd11585, 16'sd10394, 16'sd9102,  16'sd7723,
    16'sd6270,  16'sd4756,  16'sd3196,  16'sd1606,  16'sd0
  };

  logic [4:0]         k, k_c;
  logic signed [15:0] c, s, im;

  always_comb begin
    k   = {1'b0, e[3:0]};
    k_c = 5'd16 - k;
    c   = COS_Q[k];
    s   = COS_Q[k_c];
    unique case (e[5:4])
      2'd0: begin w_re =  c; im = -s; end
      2'd1: begin w_re = -s; im = -c; end
      2'd2: begin w_re = -c; im =  s; end
      default: begin w_re = s; im = c; end
    endcase
    w_im = inverse ? -im : im;
  end

endmodule
