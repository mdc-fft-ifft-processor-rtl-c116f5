// fft64_parallel: fully parallel 64-point radix-4 DIT FFT, all points at
// once, no clock.
//
// A carries 64 real samples of IW bits (x(n) in bits IW*n +: IW, 256 bits by
// default). W carries the first quadrant of twiddle factors, W_64^k for
// k = 0..15, entry k in bits 16k +: 16 as {re[15:8], im[7:0]}, signed with
// FRAC = 6 fraction bits (1.0 = 64). X carries the 64 complex results,
// X(k) in bits 2*OW*k +: 2*OW as {re, im}, each part saturated to OW bits.
// Structure: the data split routes x(4m + l) to block l (M2..M5), each a
// 16-point FFT (topbutter16) giving F(l, q); a last rank of 16 radix-4
// butterflies, each preceded by twiddles W_64^(l*q), combines them:
// X(16p + q) = sum_l [W_64^(l*q) F(l, q)] W_4^(l*p).
// The widths of A and W and the 8-bit output parts follow the document; the
// twiddle layout, the complex {re, im} output (1024 bits instead of the 512
// the document states) and saturation are this design's choices.
module fft64_parallel #(
  parameter int IW   = 4,  // input sample width
  parameter int OW   = 8,  // output width per part
  parameter int TW   = 8,  // twiddle width per part
  parameter int FRAC = 6   // twiddle fraction bits
) (
  input  logic [64*IW-1:0]   A,
  input  logic [16*2*TW-1:0] W,
  output logic [64*2*OW-1:0] X
);

  localparam int FW = IW + 5;  // width of the 16-point results
  localparam int XW = FW + 3;  // width of the final butterfly outputs

  logic signed [TW-1:0] tab_re [16], tab_im [16];
  for (genvar k = 0; k < 16; k++) begin : g_tab
    assign tab_re[k] = W[2*TW*k + TW +: TW];
    assign tab_im[k] = W[2*TW*k +: TW];
  end

  // data split and the four 16-point blocks
  logic signed [FW-1:0] f_re [4][16], f_im [4][16];
  for (genvar l = 0; l < 4; l++) begin : g_blk
    logic signed [IW-1:0] x_re [16], x_im [16];
    for (genvar m = 0; m < 16; m++) begin : g_split
      assign x_re[m] = A[IW*(4*m + l) +: IW];
      assign x_im[m] = '0;
    end
    topbutter16 #(.IW(IW), .TW(TW), .FRAC(FRAC)) u_tb (
      .in_re(x_re), .in_im(x_im), .tab_re(tab_re), .tab_im(tab_im),
      .out_re(f_re[l]), .out_im(f_im[l])
    );
  end

  function automatic logic signed [OW-1:0] sat(input logic signed [XW-1:0] v);
    if (v > XW'(2**(OW-1) - 1))   return OW'(2**(OW-1) - 1);
    else if (v < -XW'(2**(OW-1))) return OW'(-(2**(OW-1)));
    else                          return OW'(v);
  endfunction

  // last rank: twiddles W_64^(l*q) and DFT four
  for (genvar q = 0; q < 16; q++) begin : g_last
    logic signed [FW:0]   m_re [4], m_im [4];
    logic signed [XW-1:0] y_re [4], y_im [4];
    for (genvar l = 0; l < 4; l++) begin : g_tw
      logic signed [TW-1:0] w_re, w_im;
      twiddle_quadrant #(.TW(TW)) u_tq (
        .tab_re(tab_re), .tab_im(tab_im), .e(6'(l * q)), .w_re(w_re), .w_im(w_im)
      );
      cmult #(.DW(FW), .TW(TW), .FRAC(FRAC)) u_mul (
        .a_re(f_re[l][q]), .a_im(f_im[l][q]), .w_re(w_re), .w_im(w_im),
        .p_re(m_re[l]), .p_im(m_im[l])
      );
    end
    radix4_bfly #(.W(FW+1)) u_bfly (
      .inverse(1'b0), .in_re(m_re), .in_im(m_im), .out_re(y_re), .out_im(y_im)
    );
    for (genvar p = 0; p < 4; p++) begin : g_out
      assign X[2*OW*(16*p + q) + OW +: OW] = sat(y_re[p]);
      assign X[2*OW*(16*p + q) +: OW]      = sat(y_im[p]);
    end
  end

endmodule
