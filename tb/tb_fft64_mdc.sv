// tb_fft64_mdc: end-to-end test of the MDC FFT/IFFT at its default size:
// four streams sharing one pipeline. Each stream receives a sequence of
// 64-sample symbols (random, impulse, single tone), all streams starting
// their symbols on the same clock. Every output X(k) of every stream is
// compared with a double-precision DFT of that stream's input, scaled by the
// symbol's shift schedule, within a small tolerance for fixed-point
// rounding. Covers: FFT and IFFT symbols, mode switches between symbols,
// different modes on different streams at once, three scale schedules,
// symbols back to back and separated by idle gaps. Checks the latency from
// a symbol's first sample to X(0) of stream s (84 + 16*s clocks), the output
// order, and that the shared butterflies are busy on every clock of at
// least one full symbol time (100 % use with four streams).
module tb_fft64_mdc;
  import fft_pkg::*;

  localparam int NS   = 4;   // streams
  localparam int NSYM = 8;   // symbols per stream
  localparam real PI  = 3.14159265358979323846;
  localparam int  TOL = 6;

  logic clk = 1'b0;
  logic reset;
  logic in_valid;
  cplx_t in_data [NS];
  logic inverse [NS];
  logic [5:0] scale [NS];
  logic out_valid [NS];
  logic [5:0] out_index [NS];
  cplx_t out_data [NS];

  always #5 clk = ~clk;

  fft64_mdc dut (.*);

  int checks = 0, failures = 0;
  int n_fwd = 0, n_inv = 0, n_switch = 0, n_b2b = 0, n_gap = 0, n_scaled = 0, n_unscaled = 0;
  int n_mixed = 0, n_full = 0;

  int xin_re [NS][NSYM][64];
  int xin_im [NS][NSYM][64];
  logic sym_inv [NS][NSYM];
  logic [5:0] sym_scale [NS][NSYM];
  longint t_first [NSYM];
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic make_symbol(int s, int k);
    int amp, sel;
    sel = (k + s) % 4;
    sym_inv[s][k]   = ((k + s) % 3 == 2);
    sym_scale[s][k] = (sel == 1) ? 6'b000000 : (sel == 3) ? 6'b010101 : 6'b101010;
    if (sym_inv[s][k]) sym_scale[s][k] = 6'b101010;
    amp = (sym_scale[s][k] == 6'b000000) ? 250 : (sym_scale[s][k] == 6'b010101) ? 2000 : 16000;
    for (int n = 0; n < 64; n++) begin
      if (k == 0 && s == 1) begin       // impulse
        xin_re[s][k][n] = (n == 0) ? amp : 0;
        xin_im[s][k][n] = 0;
      end else if (k == 2 && s == 2) begin  // complex tone at bin 5
        xin_re[s][k][n] = $rtoi(amp * 0.9 * $cos(2.0 * PI * 5 * n / 64.0));
        xin_im[s][k][n] = $rtoi(amp * 0.9 * $sin(2.0 * PI * 5 * n / 64.0));
      end else begin
        xin_re[s][k][n] = int'($urandom_range(2 * amp)) - amp;
        xin_im[s][k][n] = int'($urandom_range(2 * amp)) - amp;
      end
    end
  endtask

  // driver
  initial begin
    reset = 1'b1;
    in_valid = 1'b0;
    for (int s = 0; s < NS; s++) begin
      in_data[s] = '0;
      inverse[s] = 1'b0;
      scale[s] = '0;
      for (int k = 0; k < NSYM; k++) make_symbol(s, k);
    end
    repeat (3) @(posedge clk);
    reset <= 1'b0;
    @(posedge clk);
    for (int k = 0; k < NSYM; k++) begin
      if (k == 4) begin
        in_valid <= 1'b0;
        repeat (23) @(posedge clk);
        n_gap++;
      end else if (k > 0) n_b2b++;
      for (int s = 0; s < NS; s++) begin
        if (k > 0 && sym_inv[s][k] != sym_inv[s][k-1]) n_switch++;
        if (sym_inv[s][k]) n_inv++; else n_fwd++;
        if (sym_scale[s][k] == 0) n_unscaled++; else n_scaled++;
      end
      if (sym_inv[0][k] != sym_inv[1][k] || sym_inv[1][k] != sym_inv[2][k]) n_mixed++;
      for (int n = 0; n < 64; n++) begin
        in_valid <= 1'b1;
        for (int s = 0; s < NS; s++) begin
          in_data[s] <= '{re: 16'(xin_re[s][k][n]), im: 16'(xin_im[s][k][n])};
          inverse[s] <= (n == 0) ? sym_inv[s][k] : ~sym_inv[s][k];     // only sample 0 counts
          scale[s]   <= (n == 0) ? sym_scale[s][k] : ~sym_scale[s][k];
        end
        if (n == 0) t_first[k] = cyc;
        @(posedge clk);
      end
    end
    in_valid <= 1'b0;
  end

  // use of the shared stage-1 butterfly: count windows of 64 busy clocks
  int busy_run = 0;
  always @(posedge clk) begin
    if (!reset && dut.s1_in_valid) begin
      busy_run++;
      if (busy_run == 64) begin n_full++; busy_run = 0; end
    end else busy_run = 0;
  end

  // checkers, one per stream
  int out_sym [NS];
  int exp_idx [NS];
  int streams_done = 0;
  initial for (int s = 0; s < NS; s++) begin out_sym[s] = 0; exp_idx[s] = 0; end

  always @(posedge clk) begin
    real ar, ai, ang, div, er, ei, sgn;
    int  shift, k;
    if (!reset) begin
      for (int s = 0; s < NS; s++) begin
        if (out_valid[s] && out_sym[s] < NSYM) begin
          k = out_sym[s];
          if (exp_idx[s] == 0) begin
            checks++;
            if (cyc - t_first[k] != 84 + 16 * s + 1) begin
              failures++;
              $display("FAIL latency stream %0d sym %0d: %0d", s, k, cyc - t_first[k] - 1);
            end
          end
          checks++;
          if (out_index[s] != 6'(exp_idx[s])) begin
            failures++;
            if (failures < 20) $display("FAIL order stream %0d sym %0d: index %0d expected %0d", s, k, out_index[s], exp_idx[s]);
          end
          shift = sym_scale[s][k][1:0] + sym_scale[s][k][3:2] + sym_scale[s][k][5:4];
          div = real'(1 << shift);
          sgn = sym_inv[s][k] ? 1.0 : -1.0;
          ar = 0.0; ai = 0.0;
          for (int n = 0; n < 64; n++) begin
            ang = sgn * 2.0 * PI * real'((n * exp_idx[s]) % 64) / 64.0;
            ar += xin_re[s][k][n] * $cos(ang) - xin_im[s][k][n] * $sin(ang);
            ai += xin_re[s][k][n] * $sin(ang) + xin_im[s][k][n] * $cos(ang);
          end
          er = ar / div - real'(out_data[s].re);
          ei = ai / div - real'(out_data[s].im);
          checks++;
          if (er > TOL || er < -TOL || ei > TOL || ei < -TOL) begin
            failures++;
            if (failures < 20)
              $display("FAIL stream %0d sym %0d k %0d: got (%0d,%0d) expected (%f,%f)", s, k, exp_idx[s],
                       out_data[s].re, out_data[s].im, ar / div, ai / div);
          end
          exp_idx[s]++;
          if (exp_idx[s] == 64) begin
            exp_idx[s] = 0;
            out_sym[s]++;
            if (out_sym[s] == NSYM) streams_done++;
          end
        end
      end
      if (streams_done == NS) begin
        streams_done = 0;
        checks++;
        if (n_fwd == 0 || n_inv == 0 || n_switch == 0 || n_b2b == 0 || n_gap == 0 ||
            n_scaled == 0 || n_unscaled == 0 || n_mixed == 0 || n_full == 0) failures++;
        $display("mechanisms: fft=%0d ifft=%0d mode_switch=%0d mixed_modes=%0d back_to_back=%0d idle_gap=%0d scaled=%0d unscaled=%0d full_use_windows=%0d",
                 n_fwd, n_inv, n_switch, n_mixed, n_b2b, n_gap, n_scaled, n_unscaled, n_full);
        $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
        $finish;
      end
    end
  end

  // watchdog
  initial begin
    repeat (NSYM * 100 + 600) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
