// tb_stream_scheduler: four streams of tagged samples (re = s*1000 +
// symbol*64 + n, im = -n), all starting their symbols on the same clock.
// Checks that each merged burst names its stream, carries x(t), x(t+16),
// x(t+32), x(t+48) of that stream's next symbol on lanes 0..3 for
// t = 0..15, starts 49 + 16*s clocks after that symbol's x(0), and carries
// the mode given with x(0). Also counts clocks on which the merged output
// is busy for a whole 64-clock window while symbols arrive back to back.
module tb_stream_scheduler;
  import fft_pkg::*;
  localparam int S  = 4;
  localparam int NS = 6;

  logic clk = 1'b0, reset;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic  in_valid, out_valid;
  cplx_t in_data [S];
  mode_t in_mode [S];
  cplx_t out_data [4];
  side_t out_side;

  stream_scheduler #(.STREAMS(S)) dut (.*);

  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;
  longint t0 [NS];

  function automatic mode_t mode_of(int s, int k);
    return '{inverse: 1'((s + k) % 2), scale: 6'(s * 7 + k)};
  endfunction

  int t [S] = '{default: 0};
  int sym [S] = '{default: 0};
  int busy_run = 0, full_windows = 0;
  always @(posedge clk) begin
    if (!reset) begin
      busy_run = out_valid ? busy_run + 1 : 0;
      if (busy_run == 64) begin full_windows++; busy_run = 0; end
    end
    if (out_valid && !reset) begin
      automatic int s = int'(out_side.sid);
      automatic int k = sym[s];
      for (int l = 0; l < 4; l++) begin
        checks++;
        if (int'(out_data[l].re) != s * 1000 + k * 64 + t[s] + 16 * l ||
            int'($signed(out_data[l].im)) != -(t[s] + 16 * l)) begin
          failures++;
          if (failures < 10) $display("FAIL stream %0d sym %0d t %0d lane %0d: got %0d", s, k, t[s], l, out_data[l].re);
        end
      end
      if (t[s] == 0) begin
        checks += 2;
        if (cyc - t0[k] != longint'(49 + 16 * s)) begin
          failures++; $display("FAIL timing stream %0d sym %0d: %0d", s, k, cyc - t0[k]);
        end
        if (out_side.mode != mode_of(s, k)) begin failures++; $display("FAIL mode stream %0d sym %0d", s, k); end
      end
      t[s]++;
      if (t[s] == 16) begin t[s] = 0; sym[s]++; end
    end
  end

  initial begin
    reset = 1'b1;
    in_valid = 1'b0;
    in_data = '{default: '0};
    in_mode = '{default: '0};
    repeat (3) @(posedge clk);
    reset <= 1'b0;
    for (int k = 0; k < NS; k++) begin
      // symbols 0..3 back to back, then an idle gap, then 4..5
      if (k == 4) begin in_valid <= 1'b0; repeat (11) @(posedge clk); end
      for (int n = 0; n < 64; n++) begin
        in_valid <= 1'b1;
        for (int s = 0; s < S; s++) begin
          in_data[s] <= '{re: 16'(s * 1000 + k * 64 + n), im: 16'(-n)};
          in_mode[s] <= (n == 0) ? mode_of(s, k) : mode_t'('1);
        end
        if (n == 0) t0[k] = cyc + 1;
        @(posedge clk);
      end
    end
    in_valid <= 1'b0;
    repeat (120) @(posedge clk);
    for (int s = 0; s < S; s++) begin
      checks++;
      if (sym[s] != NS) begin failures++; $display("FAIL stream %0d: %0d bursts", s, sym[s]); end
    end
    checks++;
    if (full_windows < 2) begin failures++; $display("FAIL only %0d fully busy windows", full_windows); end
    $display("fully busy 64-clock windows: %0d", full_windows);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
