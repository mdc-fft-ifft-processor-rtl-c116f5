// topbutter16: 16-point radix-4 DIT FFT, one of the four equal blocks of the
// parallel 64-point transform.
//
// Data split and odd & even part: four radix-4 butterflies over the groups
// y(4m + l) followed by the twiddles W_16^(l*q) (odd_even_part). Commutator:
// wiring that hands the four values with the same q, one from each group, to
// the same second-rank butterfly. DFT four: four radix-4 butterflies give
// Y(4p + q) = sum_l [W_16^(l*q) G(l, q)] W_4^(l*p). Inputs and outputs in
// natural order. Outputs are IW+5 bits wide. Combinational.
module topbutter16 #(
  parameter int IW   = 4,
  parameter int TW   = 8,
  parameter int FRAC = 6
) (
  input  logic signed [IW-1:0] in_re  [16],
  input  logic signed [IW-1:0] in_im  [16],
  input  logic signed [TW-1:0] tab_re [16],
  input  logic signed [TW-1:0] tab_im [16],
  output logic signed [IW+4:0] out_re [16],
  output logic signed [IW+4:0] out_im [16]
);

  logic signed [IW+2:0] h_re [16], h_im [16];

  odd_even_part #(.IW(IW), .TW(TW), .FRAC(FRAC)) u_oe (
    .in_re(in_re), .in_im(in_im), .tab_re(tab_re), .tab_im(tab_im),
    .out_re(h_re), .out_im(h_im)
  );

  for (genvar q = 0; q < 4; q++) begin : g_dft4
    logic signed [IW+2:0] c_re [4], c_im [4];
    logic signed [IW+4:0] d_re [4], d_im [4];
    for (genvar l = 0; l < 4; l++) begin : g_comm
      assign c_re[l] = h_re[4*l + q];
      assign c_im[l] = h_im[4*l + q];
    end
    radix4_bfly #(.W(IW+3)) u_bfly (
      .inverse(1'b0), .in_re(c_re), .in_im(c_im), .out_re(d_re), .out_im(d_im)
    );
    for (genvar p = 0; p < 4; p++) begin : g_out
      assign out_re[4*p + q] = d_re[p];
      assign out_im[4*p + q] = d_im[p];
    end
  end

endmodule
