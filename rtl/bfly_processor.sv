// bfly_processor: radix-4 decimation-in-time butterfly processor.
//
// Ports follow the processor's black-box view: four 32-bit complex inputs
// read_data_a..d, a 9-bit control word bfpcontrol, clk, reset and four 32-bit
// complex outputs write_data_a..d. Word format {re[31:16], im[15:0]}.
// Operation (one set of four samples per clock, fully pipelined):
//   1. twiddle multiplication before the butterfly, as the DIT formula
//      X(p,q) = sum_l [W_N^(l*q) F(l,q)] W_4^(l*p) prescribes: input a is
//      taken as is (W^0 = 1), b, c, d are multiplied by W^e, W^2e, W^3e with
//      e = bfpcontrol[5:0] (three complex multipliers, three twiddle
//      generators with quadrant conversion);
//   2. radix-4 butterfly (8 complex additions), with +j in place of -j and
//      conjugated twiddles when bfpcontrol[6] = 1 (IFFT);
//   3. right shift by bfpcontrol[8:7] with rounding, saturation to 16 bits.
// The outputs are registered: latency one clock. reset (active high,
// synchronous) clears the outputs. The meaning of the control bits and the
// shift/saturation are this design's choices; the document names the port
// but not its encoding.
module bfly_processor
  import fft_pkg::*;
(
  input  logic        clk,
  input  logic        reset,
  input  logic [8:0]  bfpcontrol,
  input  logic [31:0] read_data_a,
  input  logic [31:0] read_data_b,
  input  logic [31:0] read_data_c,
  input  logic [31:0] read_data_d,
  output logic [31:0] write_data_a,
  output logic [31:0] write_data_b,
  output logic [31:0] write_data_c,
  output logic [31:0] write_data_d
);

  bfpctl_t ctl;
  assign ctl = bfpctl_t'(bfpcontrol);

  cplx_t in_w [4];
  assign in_w[0] = cplx_t'(read_data_a);
  assign in_w[1] = cplx_t'(read_data_b);
  assign in_w[2] = cplx_t'(read_data_c);
  assign in_w[3] = cplx_t'(read_data_d);

  // twiddled inputs, one bit wider than a sample
  logic signed [DW:0] m_re [4];
  logic signed [DW:0] m_im [4];

  assign m_re[0] = (DW+1)'(in_w[0].re);
  assign m_im[0] = (DW+1)'(in_w[0].im);

  for (genvar l = 1; l < 4; l++) begin : g_twiddle
    logic [5:0]         e_l;
    logic signed [15:0] w_re, w_im;
    assign e_l = 6'(ctl.exp * l);  // l*e mod 64 (periodicity of W)
    twiddle_gen u_tw (
      .e(e_l), .inverse(ctl.inverse), .w_re(w_re), .w_im(w_im)
    );
    cmult #(.DW(DW), .TW(TWW), .FRAC(TW_FRAC)) u_mul (
      .a_re(in_w[l].re), .a_im(in_w[l].im),
      .w_re(w_re), .w_im(w_im),
      .p_re(m_re[l]), .p_im(m_im[l])
    );
  end

  logic signed [DW+2:0] b_re [4];
  logic signed [DW+2:0] b_im [4];

  radix4_bfly #(.W(DW+1)) u_bfly (
    .inverse(ctl.inverse),
    .in_re(m_re), .in_im(m_im),
    .out_re(b_re), .out_im(b_im)
  );

  // round, shift, saturate
  function automatic logic signed [DW-1:0] scale_sat(input logic signed [DW+2:0] v,
                                                     input logic [1:0] sh);
    logic signed [DW+3:0] r;
    r = ((DW+4)'(v) + (sh == 2'd0 ? (DW+4)'(0) : ((DW+4)'(1) <<< (sh - 2'd1)))) >>> sh;
    if (r > (DW+4)'(2**(DW-1) - 1))
      return DW'(2**(DW-1) - 1);
    else if (r < -(DW+4)'(2**(DW-1)))
      return DW'(-(2**(DW-1)));
    else
      return DW'(r);
  endfunction

  cplx_t res [4];
  always_comb begin
    for (int p = 0; p < 4; p++) begin
      res[p].re = scale_sat(b_re[p], ctl.shift);
      res[p].im = scale_sat(b_im[p], ctl.shift);
    end
  end

  always_ff @(posedge clk) begin
    if (reset) begin
      write_data_a <= '0;
      write_data_b <= '0;
      write_data_c <= '0;
      write_data_d <= '0;
    end else begin
      write_data_a <= res[0];
      write_data_b <= res[1];
      write_data_c <= res[2];
      write_data_d <= res[3];
    end
  end

endmodule
