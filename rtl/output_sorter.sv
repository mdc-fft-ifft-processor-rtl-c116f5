// output_sorter: output sorting of the MDC pipeline.
//
// The last stage delivers X(16*k2 + 4*k1 + k0) on lane k2 at burst time
// t = 4*k0 + k1 (digit-reversed within the lane). Each lane writes into its
// own 2 x 16-word memory (one bank per symbol, double buffered) at address
// 4*k1 + k0 = {t[1:0], t[3:2]}; the four lane memories together hold one
// symbol in natural order, lane k2 holding X(16*k2 .. 16*k2+15). After the
// 16th write the bank is read out serially, X(0) .. X(63), one sample per
// clock, starting the clock after the last write; out_data is registered.
// The next burst writes the other bank. Rule: bursts start at least 64
// clocks apart, which the one-sample-per-clock input guarantees.
// Memory: 128 words. The double-buffered layout is this design's choice.
// The document calls for output sorting; the memory organisation is this
// design's choice.
module output_sorter
  import fft_pkg::*;
(
  input  logic       clk,
  input  logic       reset,
  input  logic       in_valid,
  input  cplx_t      in_data  [4],
  output logic       out_valid,
  output logic [5:0] out_index,
  output cplx_t      out_data
);

  cplx_t      mem [4][2][16];
  logic [3:0] wt;       // write time within the burst
  logic       wbank;    // bank being written
  logic       rbank;    // bank being read
  logic       rd_busy;
  logic [5:0] rcnt;
  logic [3:0] waddr;

  assign waddr = {wt[1:0], wt[3:2]};

  always_ff @(posedge clk) begin
    if (in_valid)
      for (int l = 0; l < 4; l++) mem[l][wbank][waddr] <= in_data[l];
  end

  always_ff @(posedge clk) begin
    if (reset) begin
      wt        <= '0;
      wbank     <= 1'b0;
      rbank     <= 1'b0;
      rd_busy   <= 1'b0;
      rcnt      <= '0;
      out_valid <= 1'b0;
      out_index <= '0;
      out_data  <= '0;
    end else begin
      if (in_valid) begin
        wt <= wt + 1'b1;
        if (wt == 4'd15) begin
          wbank   <= ~wbank;
          rbank   <= wbank;
          rd_busy <= 1'b1;
          rcnt    <= '0;
        end
      end
      out_valid <= rd_busy;
      if (rd_busy) begin
        out_index <= rcnt;
        out_data  <= mem[rcnt[5:4]][rbank][rcnt[3:0]];
        rcnt      <= rcnt + 1'b1;
        if (rcnt == 6'd63 && !(in_valid && wt == 4'd15)) rd_busy <= 1'b0;
      end
    end
  end

  a_no_overrun : assert property (
    @(posedge clk) disable iff (reset)
      (in_valid && wt == 4'd15 && rd_busy) |-> rcnt == 6'd63
  ) else $error("output_sorter: new symbol complete before the previous one was read out");

endmodule
