// fft_pkg: types and constants shared by the 64-point radix-4 MDC FFT/IFFT
// and the register-bank FFT/IFFT.
//
// A sample is a complex number held in one 32-bit word, the width of the
// butterfly processor's data ports: real part in bits 31:16, imaginary part in
// bits 15:0, both two's complement integers. Twiddle factors are 16-bit signed
// fixed point with 14 fraction bits (1.0 = 16384). The 9-bit butterfly control
// word carries the twiddle exponent, the FFT/IFFT selector and a right shift
// applied to the butterfly outputs. A mode word (FFT/IFFT, scale schedule)
// belongs to each symbol; in the MDC pipeline a side word adds the number of
// the stream a burst belongs to. The split of real/imaginary bits, the
// twiddle format and the control word layout are this design's choices.
package fft_pkg;

  localparam int N        = 64;  // transform length
  localparam int DW       = 16;  // width of the real and of the imaginary part
  localparam int TWW      = 16;  // twiddle factor width
  localparam int TW_FRAC  = 14;  // twiddle factor fraction bits

  typedef struct packed {
    logic signed [DW-1:0] re;
    logic signed [DW-1:0] im;
  } cplx_t;

  // butterfly processor control word (bfpcontrol, 9 bits)
  typedef struct packed {
    logic [1:0] shift;    // right shift of the butterfly outputs, 0..3
    logic       inverse;  // 1: IFFT (conjugate twiddles, +j instead of -j)
    logic [5:0] exp;      // twiddle exponent e: inputs b, c, d get W^e, W^2e, W^3e
  } bfpctl_t;

  // per-symbol mode carried alongside the data
  typedef struct packed {
    logic       inverse;
    logic [5:0] scale;    // 2-bit right shift per stage: [1:0] stage 1, [3:2] stage 2, [5:4] stage 3
  } mode_t;

  // mode plus stream number, carried alongside a burst through the stages
  typedef struct packed {
    logic [1:0] sid;
    mode_t      mode;
  } side_t;

endpackage
