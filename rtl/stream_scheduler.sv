// stream_scheduler: input memory scheduling for up to four data streams
// sharing one radix-4 MDC pipeline.
//
// Every clock with in_valid, each stream s presents one sample; all streams
// start their 64-sample symbols on the same clock. Stream s passes through a
// skew delay of 16*s clocks and then its own input_buffer, which turns the
// serial symbol into a 16-clock burst of four lanes (x(t), x(t+16), x(t+32),
// x(t+48), t = 0..15) starting one clock after sample 48. The skew places
// the bursts of the streams in different quarters of the symbol time, so
// with four streams back to back the merged output carries a burst on every
// clock. The merged output names the stream and its mode in a side word.
// Burst of stream s for a symbol whose first sample came on clock 0:
// clocks 49 + 16*s .. 64 + 16*s. Storage: 16*(0+1+..+(STREAMS-1)) skew
// words plus 48 words per stream (96 + 192 = 288 words for four streams).
// Rule: with more than one stream a symbol arrives without gaps; an
// assertion flags two bursts on the same clock.
// Spreading four streams over the quarters of a symbol time follows the
// document; the skew delay that does it is this design's choice.
module stream_scheduler
  import fft_pkg::*;
#(
  parameter int STREAMS = 4  // 1 to 4
) (
  input  logic       clk,
  input  logic       reset,
  input  logic       in_valid,
  input  cplx_t      in_data  [STREAMS],
  input  mode_t      in_mode  [STREAMS],
  output logic       out_valid,
  output cplx_t      out_data [4],
  output side_t      out_side
);

  localparam int SKW = 1 + $bits(cplx_t) + $bits(mode_t);

  logic  ib_valid [STREAMS];
  cplx_t ib_data  [STREAMS][4];
  mode_t ib_mode  [STREAMS];

  for (genvar s = 0; s < STREAMS; s++) begin : g_in
    logic [SKW-1:0] skew_in, skew_out;
    logic           v_s;
    cplx_t          d_s;
    mode_t          m_s;
    logic [6:0]     fill;
    assign skew_in = {in_valid, in_data[s], in_mode[s]};
    if (s == 0) begin : g_direct
      assign skew_out = skew_in;
    end else begin : g_skew
      delay_line #(.W(SKW), .D(16 * s)) u_skew (.clk(clk), .din(skew_in), .dout(skew_out));
    end
    // the skew line is not reset: its valid bit is ignored until it is filled
    always_ff @(posedge clk) begin
      if (reset)                   fill <= '0;
      else if (fill != 7'(16 * s)) fill <= fill + 1'b1;
    end
    assign {v_s, d_s, m_s} = skew_out;
    input_buffer #(.NPT(N), .MW($bits(mode_t))) u_in (
      .clk(clk), .reset(reset),
      .in_valid(v_s && fill == 7'(16 * s)), .in_data(d_s), .in_mode(m_s),
      .out_valid(ib_valid[s]), .out_data(ib_data[s]), .out_mode(ib_mode[s])
    );
  end

  always_comb begin
    out_valid = 1'b0;
    out_data  = ib_data[0];
    out_side  = '{sid: 2'd0, mode: ib_mode[0]};
    for (int s = 0; s < STREAMS; s++) begin
      if (ib_valid[s]) begin
        out_valid = 1'b1;
        out_data  = ib_data[s];
        out_side  = '{sid: 2'(s), mode: ib_mode[s]};
      end
    end
  end

  logic [STREAMS-1:0] ib_vec;
  always_comb for (int s = 0; s < STREAMS; s++) ib_vec[s] = ib_valid[s];
  a_no_collision : assert property (@(posedge clk) disable iff (reset) $onehot0(ib_vec))
    else $error("stream_scheduler: bursts of two streams collide");

endmodule
