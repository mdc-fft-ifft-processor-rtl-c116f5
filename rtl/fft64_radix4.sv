// fft64_radix4: the three 64-point radix-4 decimation-in-time FFT datapaths,
// side by side, each with its own ports.
//
// mdc (fft64_mdc): streaming FFT/IFFT for four MIMO streams through one
// shared butterfly pipeline. Each stream takes one complex 16+16-bit sample
// per clock and returns one result per clock, natural order both ways;
// stream s gives X(0) 84 + 16*s clocks after its x(0); symbols back to back.
// par (fft64_parallel): combinational FFT of 64 real 4-bit samples at once,
// with the first-quadrant twiddles supplied on W and 8-bit output parts.
// rb (register_bank_fft): the same FFT/IFFT computed in place by one
// butterfly processor between two register banks; a symbol is loaded
// serially (rb_in_valid/rb_in_ready), transformed in 51 clocks and read out
// in natural order, X(0) 54 clocks after x(63).
// The three share only clk and reset; see the modules for their timing.
module fft64_radix4
  import fft_pkg::*;
(
  // streaming MDC FFT/IFFT
  input  logic          clk,
  input  logic          reset,
  input  logic          in_valid,
  input  cplx_t         in_data   [4],
  input  logic          inverse   [4],
  input  logic [5:0]    scale     [4],
  output logic          out_valid [4],
  output logic [5:0]    out_index [4],
  output cplx_t         out_data  [4],
  // register-bank FFT/IFFT
  input  logic          rb_in_valid,
  output logic          rb_in_ready,
  input  cplx_t         rb_in_data,
  input  logic          rb_inverse,
  input  logic [5:0]    rb_scale,
  output logic          rb_out_valid,
  output logic [5:0]    rb_out_index,
  output cplx_t         rb_out_data,
  // parallel FFT
  input  logic [255:0]  A,
  input  logic [255:0]  W,
  output logic [1023:0] X
);

  fft64_mdc #(.STREAMS(4)) u_mdc (
    .clk(clk), .reset(reset), .in_valid(in_valid), .in_data(in_data),
    .inverse(inverse), .scale(scale),
    .out_valid(out_valid), .out_index(out_index), .out_data(out_data)
  );

  register_bank_fft u_rb (
    .clk(clk), .reset(reset), .in_valid(rb_in_valid), .in_ready(rb_in_ready), .in_data(rb_in_data),
    .inverse(rb_inverse), .scale(rb_scale),
    .out_valid(rb_out_valid), .out_index(rb_out_index), .out_data(rb_out_data)
  );

  fft64_parallel u_par (.A(A), .W(W), .X(X));

endmodule
