// delay_commutator: switch-box between two radix-4 pipeline stages.
//
// It regroups four parallel lanes. Count time from the start of a burst as
// tau = 4L*a + L*j + r (j = 0..3, r = 0..L-1). The element E(i,j,r) that
// enters on lane i at time tau leaves on lane j at time tau - L*j + L*i + 3L:
// lane index and the digit j of time trade places, i.e. each 4x4 block of
// L-sample groups is transposed.
// Structure: lane i is first delayed by i*L, a 4x4 rotating switch then
// connects input lane (u - j) mod 4 to output lane j during slot
// u = floor(tau/L) mod 4, and output lane j is delayed by (3-j)*L.
// Memory: 12*L words (48 words for L = 4, 12 for L = 1). Latency 3L.
// The slot counter restarts at the first cycle of a burst that follows an
// idle cycle (rising edge of in_valid) and otherwise wraps every 4L cycles,
// so bursts may also follow each other without a gap; a burst must last a
// multiple of 4L cycles. Delay lines always advance, so a burst drains on
// its own after in_valid falls.
// The document calls for feed-forward switch-boxes of 3N/4^s words between
// stages; the delay/switch arrangement is the standard MDC one, chosen here.
module delay_commutator
  import fft_pkg::*;
#(
  parameter int L = 4
) (
  input  logic  clk,
  input  logic  reset,
  input  logic  in_valid,
  input  cplx_t in_data  [4],
  output logic  out_valid,
  output cplx_t out_data [4]
);

  localparam int CW = $clog2(4 * L);

  cplx_t pre [4];
  cplx_t sw  [4];

  assign pre[0] = in_data[0];
  for (genvar i = 1; i < 4; i++) begin : g_pre
    delay_line #(.W($bits(cplx_t)), .D(i * L)) u_dl (
      .clk(clk), .din(in_data[i]), .dout(pre[i])
    );
  end

  // slot counter, aligned to the start of each burst
  logic          valid_d;
  logic [CW-1:0] cnt, tau;
  logic [1:0]    slot;

  always_comb begin
    tau  = (in_valid && !valid_d) ? '0 : cnt;
    slot = 2'(tau / CW'(L));
  end

  always_ff @(posedge clk) begin
    if (reset) begin
      valid_d <= 1'b0;
      cnt     <= '0;
    end else begin
      valid_d <= in_valid;
      cnt     <= tau + 1'b1;
    end
  end

  always_comb begin
    for (int j = 0; j < 4; j++) sw[j] = pre[2'(slot - 2'(j))];
  end

  for (genvar j = 0; j < 3; j++) begin : g_post
    delay_line #(.W($bits(cplx_t)), .D((3 - j) * L)) u_dl (
      .clk(clk), .din(sw[j]), .dout(out_data[j])
    );
  end
  assign out_data[3] = sw[3];

  // valid flag, delayed by the 3L latency
  logic [3*L-1:0] vsr;
  always_ff @(posedge clk) begin
    if (reset) vsr <= '0;
    else       vsr <= {vsr[3*L-2:0], in_valid};
  end
  assign out_valid = vsr[3*L-1];

endmodule
