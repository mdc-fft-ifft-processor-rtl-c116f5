// fft64_mdc: 64-point radix-4 decimation-in-time FFT/IFFT processor in
// multi-path delay commutator (MDC) form, shared by up to four data streams.
//
// Data path: stream_scheduler (per stream a skew delay and an input_buffer,
// serial to four lanes, merged into one burst stream); then one shared
// chain: stage 1 -> commutator (L = 4) -> stage 2 -> commutator (L = 1) ->
// stage 3; then per stream an output_sorter (four lanes back to one serial,
// natural-order stream). Each stage is one radix-4
// butterfly with three twiddle multipliers (log4(64) = 3 stages).
//
// Memory scheduling for several streams: a single stream keeps the
// butterflies busy only during the 16-clock burst that its input buffer
// produces per 64-sample symbol (25 %). Stream s is therefore delayed by
// 16*s clocks before its input buffer, so the bursts of the STREAMS streams
// fall into different quarters of the symbol time and the shared stages
// work on every clock when STREAMS = 4. A side word (stream number and
// mode) follows each burst through the stages and steers stage 3's result
// to the stream's own output sorter.
//
// Interface: every clock with in_valid, each stream s presents one complex
// sample in_data[s]; a symbol is 64 consecutive samples x(0..63), and all
// streams start their symbols on the same clock. With STREAMS = 1, gaps are
// allowed except in the last 16 samples of a symbol; with more streams a
// symbol must arrive without gaps (an assertion flags colliding bursts).
// inverse[s] (1 = IFFT) and scale[s] (2-bit right shift per stage, [1:0]
// stage 1 ... [5:4] stage 3) are sampled with the first sample of stream s's
// symbol and apply to that symbol only. scale = 6'b101010 divides by 64, the
// 1/N of the inverse DFT. Stream s delivers X(0..63) in natural order on
// out_data[s] with out_valid[s] and out_index[s], one per clock, starting
// 84 + 16*s clocks after the symbol's first sample. Symbols may follow each
// other back to back. Word format {re[31:16], im[15:0]}, 16-bit parts;
// stage outputs are rounded and saturated to 16 bits. reset is synchronous
// and active high.
// The MDC structure, radix-4 DIT, three stages, four streams sharing one
// pipeline at full butterfly use follow the document; the skew delay as the
// scheduling method, widths, scaling, mode capture and latency are this
// design's.
module fft64_mdc
  import fft_pkg::*;
#(
  parameter int STREAMS = 4  // 1 to 4
) (
  input  logic       clk,
  input  logic       reset,
  input  logic       in_valid,
  input  cplx_t      in_data   [STREAMS],
  input  logic       inverse   [STREAMS],
  input  logic [5:0] scale     [STREAMS],
  output logic       out_valid [STREAMS],
  output logic [5:0] out_index [STREAMS],
  output cplx_t      out_data  [STREAMS]
);

  mode_t in_mode [STREAMS];
  for (genvar s = 0; s < STREAMS; s++) begin : g_mode
    assign in_mode[s] = '{inverse: inverse[s], scale: scale[s]};
  end

  logic  s1_in_valid;
  cplx_t s1_in_data [4];
  side_t side0;

  stream_scheduler #(.STREAMS(STREAMS)) u_sched (
    .clk(clk), .reset(reset), .in_valid(in_valid), .in_data(in_data), .in_mode(in_mode),
    .out_valid(s1_in_valid), .out_data(s1_in_data), .out_side(side0)
  );

  // the side word reaches stage 2 after 1 + 12 clocks, stage 3 after 4 more,
  // and the output of stage 3 one clock later
  side_t      side1, side2;
  logic [1:0] sid3;
  delay_line #(.W($bits(side_t)), .D(13)) u_side1 (.clk(clk), .din(side0), .dout(side1));
  delay_line #(.W($bits(side_t)), .D(4))  u_side2 (.clk(clk), .din(side1), .dout(side2));
  delay_line #(.W(2), .D(1)) u_side3 (.clk(clk), .din(side2.sid), .dout(sid3));

  logic  s1_valid, c1_valid, s2_valid, c2_valid, s3_valid;
  cplx_t s1_data [4];
  cplx_t c1_data [4];
  cplx_t s2_data [4];
  cplx_t c2_data [4];
  cplx_t s3_data [4];

  mdc_stage #(.STAGE(1)) u_s1 (
    .clk(clk), .reset(reset), .inverse(side0.mode.inverse), .shift(side0.mode.scale[1:0]),
    .in_valid(s1_in_valid), .in_data(s1_in_data), .out_valid(s1_valid), .out_data(s1_data)
  );

  delay_commutator #(.L(4)) u_c1 (
    .clk(clk), .reset(reset),
    .in_valid(s1_valid), .in_data(s1_data), .out_valid(c1_valid), .out_data(c1_data)
  );

  mdc_stage #(.STAGE(2)) u_s2 (
    .clk(clk), .reset(reset), .inverse(side1.mode.inverse), .shift(side1.mode.scale[3:2]),
    .in_valid(c1_valid), .in_data(c1_data), .out_valid(s2_valid), .out_data(s2_data)
  );

  delay_commutator #(.L(1)) u_c2 (
    .clk(clk), .reset(reset),
    .in_valid(s2_valid), .in_data(s2_data), .out_valid(c2_valid), .out_data(c2_data)
  );

  mdc_stage #(.STAGE(3)) u_s3 (
    .clk(clk), .reset(reset), .inverse(side2.mode.inverse), .shift(side2.mode.scale[5:4]),
    .in_valid(c2_valid), .in_data(c2_data), .out_valid(s3_valid), .out_data(s3_data)
  );

  for (genvar s = 0; s < STREAMS; s++) begin : g_out
    output_sorter u_out (
      .clk(clk), .reset(reset),
      .in_valid(s3_valid && sid3 == 2'(s)), .in_data(s3_data),
      .out_valid(out_valid[s]), .out_index(out_index[s]), .out_data(out_data[s])
    );
  end

endmodule
