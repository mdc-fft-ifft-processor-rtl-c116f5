// tb_output_sorter: writes bursts in the last stage's order (lane k2, burst
// time t = 4*k0 + k1 carries X(16*k2 + 4*k1 + k0)), tagged with their index,
// and checks that each symbol comes out serially as X(0) .. X(63) with
// matching out_index, starting 17 clocks after its burst's first write.
// Bursts are sent 64 clocks apart (the fastest the pipeline produces them)
// and after longer gaps.
module tb_output_sorter;
  import fft_pkg::*;
  localparam int NB = 5;

  logic clk = 1'b0, reset;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic in_valid, out_valid;
  cplx_t in_data [4];
  logic [5:0] out_index;
  cplx_t out_data;

  output_sorter dut (.*);

  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;
  longint t_start [NB];

  int idx = 0, b = 0;
  always @(posedge clk) begin
    if (out_valid && !reset) begin
      checks++;
      if (out_index != 6'(idx) || int'(out_data.re) != b * 64 + idx || int'(out_data.im) != -idx) begin
        failures++;
        if (failures < 10) $display("FAIL burst %0d idx %0d: got index %0d value %0d", b, idx, out_index, out_data.re);
      end
      if (idx == 0) begin
        checks++;
        if (cyc - t_start[b] != 17) begin failures++; $display("FAIL latency %0d", cyc - t_start[b]); end
      end
      idx++;
      if (idx == 64) begin idx = 0; b++; end
    end
  end

  initial begin
    int k;
    reset = 1'b1;
    in_valid = 1'b0;
    for (int l = 0; l < 4; l++) in_data[l] = '0;
    repeat (3) @(posedge clk);
    reset <= 1'b0;
    for (int bb = 0; bb < NB; bb++) begin
      if (bb > 0) repeat ((bb == 3) ? 70 : 48) @(posedge clk);
      for (int t = 0; t < 16; t++) begin
        if (t == 0) t_start[bb] = cyc + 1;
        in_valid <= 1'b1;
        for (int l = 0; l < 4; l++) begin
          k = 16 * l + 4 * (t % 4) + t / 4;
          in_data[l] <= '{re: 16'(bb * 64 + k), im: 16'(-k)};
        end
        @(posedge clk);
      end
      in_valid <= 1'b0;
    end
    repeat (90) @(posedge clk);
    checks++;
    if (b != NB) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (900) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
