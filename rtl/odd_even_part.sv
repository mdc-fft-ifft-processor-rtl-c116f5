// odd_even_part: first rank of a 16-point radix-4 DIT transform.
//
// The 16 inputs are taken as four groups y(4m + l), m = 0..3, one group per
// l = 0..3. Each group goes through a radix-4 butterfly (adders and
// subtractors), giving G(l, q), and every output is then multiplied by the
// twiddle factor W_16^(l*q) = W_64^(4*l*q) (multipliers), ready for the second
// rank. Output index 4*l + q. Twiddles come from the caller's first-quadrant
// table through quadrant conversion. Combinational.
module odd_even_part #(
  parameter int IW   = 4,  // input width per part
  parameter int TW   = 8,  // twiddle width
  parameter int FRAC = 6   // twiddle fraction bits
) (
  input  logic signed [IW-1:0] in_re  [16],
  input  logic signed [IW-1:0] in_im  [16],
  input  logic signed [TW-1:0] tab_re [16],
  input  logic signed [TW-1:0] tab_im [16],
  output logic signed [IW+2:0] out_re [16],
  output logic signed [IW+2:0] out_im [16]
);

  for (genvar l = 0; l < 4; l++) begin : g_grp
    logic signed [IW-1:0] y_re [4], y_im [4];
    logic signed [IW+1:0] g_re [4], g_im [4];
    for (genvar m = 0; m < 4; m++) begin : g_in
      assign y_re[m] = in_re[4*m + l];
      assign y_im[m] = in_im[4*m + l];
    end
    radix4_bfly #(.W(IW)) u_bfly (
      .inverse(1'b0), .in_re(y_re), .in_im(y_im), .out_re(g_re), .out_im(g_im)
    );
    for (genvar q = 0; q < 4; q++) begin : g_tw
      logic signed [TW-1:0] w_re, w_im;
      twiddle_quadrant #(.TW(TW)) u_tq (
        .tab_re(tab_re), .tab_im(tab_im), .e(6'(4 * l * q)), .w_re(w_re), .w_im(w_im)
      );
      cmult #(.DW(IW+2), .TW(TW), .FRAC(FRAC)) u_mul (
        .a_re(g_re[q]), .a_im(g_im[q]), .w_re(w_re), .w_im(w_im),
        .p_re(out_re[4*l + q]), .p_im(out_im[4*l + q])
      );
    end
  end

endmodule
