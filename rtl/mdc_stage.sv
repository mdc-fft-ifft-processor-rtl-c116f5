// mdc_stage: one radix-4 stage of the 64-point MDC pipeline.
//
// A bfly_processor plus the control that produces its bfpcontrol word. The
// stage receives bursts of 16 lane-groups on consecutive clocks and counts
// them (t = 0..15). With n = 16*n2 + 4*n1 + n0 and k = 16*k2 + 4*k1 + k0 the
// decimation-in-time pipeline is
//   stage 1: lanes n2, t = 4*n1 + n0, twiddle exponent e = 0
//   stage 2: lanes n1, t = 4*k0 + n0, e = 4*k0        = {t[3:2], 2'b00}
//   stage 3: lanes n0, t = 4*k0 + k1, e = 4*k1 + k0   = {t[1:0], t[3:2]}
// and lane l of the stage is multiplied by W_64^(l*e) before the butterfly.
// Output lane p carries butterfly output p, one clock after the input.
// inverse and shift are taken from the per-symbol mode and must be stable
// during the burst.
// One butterfly and three twiddle multipliers per stage follow the document;
// the exponent sequences are derived from its DIT equations.
module mdc_stage
  import fft_pkg::*;
#(
  parameter int STAGE = 1  // 1, 2 or 3
) (
  input  logic       clk,
  input  logic       reset,
  input  logic       inverse,
  input  logic [1:0] shift,
  input  logic       in_valid,
  input  cplx_t      in_data  [4],
  output logic       out_valid,
  output cplx_t      out_data [4]
);

  logic [3:0] t;
  logic [5:0] e;
  bfpctl_t    ctl;

  always_ff @(posedge clk) begin
    if (reset) begin
      t         <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) t <= t + 1'b1;
    end
  end

  always_comb begin
    unique case (STAGE)
      1:       e = 6'd0;
      2:       e = 6'({t[3:2], 2'b00});
      default: e = 6'({t[1:0], t[3:2]});
    endcase
    ctl = '{shift: shift, inverse: inverse, exp: e};
  end

  logic [31:0] wd [4];

  bfly_processor u_bfp (
    .clk(clk), .reset(reset), .bfpcontrol(ctl),
    .read_data_a(in_data[0]), .read_data_b(in_data[1]),
    .read_data_c(in_data[2]), .read_data_d(in_data[3]),
    .write_data_a(wd[0]), .write_data_b(wd[1]),
    .write_data_c(wd[2]), .write_data_d(wd[3])
  );

  always_comb for (int p = 0; p < 4; p++) out_data[p] = cplx_t'(wd[p]);

endmodule
