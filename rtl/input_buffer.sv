// input_buffer: input memory scheduling of the MDC pipeline.
//
// Takes one complex sample per clock in natural order x(0..63) and presents
// the four samples x(t), x(t+16), x(t+32), x(t+48) on lanes 0..3 at once, for
// t = 0..15, so the first radix-4 stage sees its four butterfly inputs (spaced
// N/4 apart) together. A 48-word tapped delay line advances on every accepted
// sample; while the last quarter of a symbol (samples 48..63) arrives, lane 3
// is the arriving sample and lanes 2, 1, 0 are the taps 16, 32 and 48 words
// back. Output is registered: the burst of 16 lane-groups starts one clock
// after sample 48 is accepted and lasts 16 clocks. A conventional MDC input
// stage uses separate delay lines of N/4, N/2 and 3N/4 words (96 in all); the
// shared tapped line is this design's choice and needs half as many.
// A per-symbol sideband word (mode) is sampled with the first sample of a
// symbol and emitted with its burst. Rule: the 16 samples of the last quarter
// of a symbol arrive on consecutive clocks (checked by an assertion); gaps
// between symbols and earlier in a symbol are allowed.
// The four-lane input scheduling follows the document's MDC structure; the
// tapped line, the sideband and the gap rule are this design's choices.
module input_buffer
  import fft_pkg::*;
#(
  parameter int NPT = 64,  // transform length
  parameter int MW  = 7    // sideband width
) (
  input  logic          clk,
  input  logic          reset,
  input  logic          in_valid,
  input  cplx_t         in_data,
  input  logic [MW-1:0] in_mode,
  output logic          out_valid,
  output cplx_t         out_data [4],
  output logic [MW-1:0] out_mode
);

  localparam int Q  = NPT / 4;
  localparam int CW = $clog2(NPT);

  cplx_t         line [3*Q];
  logic [CW-1:0] cnt;
  logic [MW-1:0] mode_pend;
  logic          last_q;

  assign last_q = (cnt[CW-1:CW-2] == 2'b11);

  always_ff @(posedge clk) begin
    if (in_valid) begin
      line[0] <= in_data;
      for (int i = 1; i < 3*Q; i++) line[i] <= line[i-1];
    end
  end

  always_ff @(posedge clk) begin
    if (reset) begin
      cnt       <= '0;
      mode_pend <= '0;
      out_valid <= 1'b0;
      out_mode  <= '0;
      for (int l = 0; l < 4; l++) out_data[l] <= '0;
    end else begin
      out_valid <= in_valid && last_q;
      if (in_valid) begin
        cnt <= cnt + 1'b1;
        if (cnt == '0) mode_pend <= in_mode;
        if (last_q) begin
          out_data[3] <= in_data;
          out_data[2] <= line[Q-1];
          out_data[1] <= line[2*Q-1];
          out_data[0] <= line[3*Q-1];
          if (cnt[CW-3:0] == '0) out_mode <= mode_pend;
        end
      end
    end
  end

  // the last quarter of a symbol must arrive without gaps
  a_last_quarter_contiguous : assert property (
    @(posedge clk) disable iff (reset)
      (in_valid && last_q && cnt[CW-3:0] != '1) |=> in_valid
  ) else $error("input_buffer: gap inside the last quarter of a symbol");

endmodule
