// tb_fft64_mdc_single: the 64-point MDC FFT/IFFT configured for one stream.
// Feeds a sequence of symbols (random, impulse, single tone) and compares each output X(k) with a double-precision DFT of the same input,
// scaled by the symbol's shift schedule, within a small tolerance for the
// fixed-point rounding. Covers: forward and inverse mode, a mode switch
// between consecutive symbols, different scale schedules, symbols back to
// back and symbols separated by idle gaps, and a gap early in a symbol.
// Checks the latency from a symbol's first sample to its X(0) (84 clocks for
// a gap-free symbol) and the output order (out_index 0..63).
module tb_fft64_mdc_single;
  import fft_pkg::*;

  localparam int NSYM = 12;
  localparam real PI  = 3.14159265358979323846;
  localparam int  TOL = 6;

  logic clk = 1'b0;
  logic reset;
  logic in_valid;
  cplx_t in_data;
  logic inverse;
  logic [5:0] scale;
  logic out_valid;
  logic [5:0] out_index;
  cplx_t out_data;
  cplx_t in_data_a [1];
  logic inverse_a [1];
  logic [5:0] scale_a [1];
  logic out_valid_a [1];
  logic [5:0] out_index_a [1];
  cplx_t out_data_a [1];
  assign in_data_a[0] = in_data;
  assign inverse_a[0] = inverse;
  assign scale_a[0] = scale;
  assign out_valid = out_valid_a[0];
  assign out_index = out_index_a[0];
  assign out_data = out_data_a[0];

  always #5 clk = ~clk;

  fft64_mdc #(.STREAMS(1)) dut (
    .clk(clk), .reset(reset), .in_valid(in_valid), .in_data(in_data_a), .inverse(inverse_a),
    .scale(scale_a), .out_valid(out_valid_a), .out_index(out_index_a), .out_data(out_data_a)
  );

  int checks = 0, failures = 0;
  int n_fwd = 0, n_inv = 0, n_switch = 0, n_b2b = 0, n_gap = 0, n_scaled = 0, n_unscaled = 0;

  // stimulus memory
  int xin_re [NSYM][64];
  int xin_im [NSYM][64];
  logic sym_inv [NSYM];
  logic [5:0] sym_scale [NSYM];
  longint t_first [NSYM];
  logic sym_nogap [NSYM];
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic make_symbol(int s);
    int amp;
    sym_inv[s]   = (s % 3 == 2);
    sym_scale[s] = (s % 4 == 1) ? 6'b000000 : (s % 4 == 3) ? 6'b010101 : 6'b101010;
    if (sym_inv[s]) sym_scale[s] = 6'b101010;
    amp = (sym_scale[s] == 6'b000000) ? 250 : (sym_scale[s] == 6'b010101) ? 2000 : 16000;
    for (int n = 0; n < 64; n++) begin
      if (s == 0) begin           // impulse
        xin_re[s][n] = (n == 0) ? amp : 0;
        xin_im[s][n] = 0;
      end else if (s == 4) begin  // complex tone at bin 5
        xin_re[s][n] = $rtoi(amp * 0.9 * $cos(2.0 * PI * 5 * n / 64.0));
        xin_im[s][n] = $rtoi(amp * 0.9 * $sin(2.0 * PI * 5 * n / 64.0));
      end else begin
        xin_re[s][n] = int'($urandom_range(2 * amp)) - amp;
        xin_im[s][n] = int'($urandom_range(2 * amp)) - amp;
      end
    end
  endtask

  // driver
  initial begin
    reset = 1'b1;
    in_valid = 1'b0;
    in_data = '0;
    inverse = 1'b0;
    scale = '0;
    for (int s = 0; s < NSYM; s++) make_symbol(s);
    repeat (3) @(posedge clk);
    reset <= 1'b0;
    @(posedge clk);
    for (int s = 0; s < NSYM; s++) begin
      // idle gap before some symbols; others follow back to back
      if (s % 5 == 3) begin
        in_valid <= 1'b0;
        repeat (7 + s) @(posedge clk);
        n_gap++;
      end else if (s > 0) n_b2b++;
      if (s > 0 && sym_inv[s] != sym_inv[s-1]) n_switch++;
      if (sym_inv[s]) n_inv++; else n_fwd++;
      if (sym_scale[s] == 0) n_unscaled++; else n_scaled++;
      sym_nogap[s] = (s != 6);
      for (int n = 0; n < 64; n++) begin
        // symbol 6 pauses for 5 clocks in its first quarter
        if (s == 6 && n == 10) begin
          in_valid <= 1'b0;
          repeat (5) @(posedge clk);
        end
        in_valid <= 1'b1;
        in_data  <= '{re: 16'(xin_re[s][n]), im: 16'(xin_im[s][n])};
        inverse  <= sym_inv[s];
        scale    <= (n == 0) ? sym_scale[s] : ~sym_scale[s];  // only sample 0 counts
        if (n == 0) t_first[s] = cyc;
        @(posedge clk);
      end
    end
    in_valid <= 1'b0;
  end

  // checker
  int out_sym = 0;
  int exp_idx = 0;
  initial begin
    real ar, ai, ang, div, er, ei, sgn;
    int  shift;
    int  done_syms;
    done_syms = 0;
    forever begin
      @(posedge clk);
      if (out_valid && !reset) begin
        if (exp_idx == 0) begin
          checks++;
          if (sym_nogap[out_sym] && (cyc - t_first[out_sym] != 84 + 1)) begin
            failures++;
            $display("FAIL latency sym %0d: %0d", out_sym, cyc - t_first[out_sym] - 1);
          end
        end
        checks++;
        if (out_index != 6'(exp_idx)) begin
          failures++;
          $display("FAIL order sym %0d: index %0d expected %0d", out_sym, out_index, exp_idx);
        end
        shift = sym_scale[out_sym][1:0] + sym_scale[out_sym][3:2] + sym_scale[out_sym][5:4];
        div = real'(1 << shift);
        sgn = sym_inv[out_sym] ? 1.0 : -1.0;
        ar = 0.0; ai = 0.0;
        for (int n = 0; n < 64; n++) begin
          ang = sgn * 2.0 * PI * real'((n * exp_idx) % 64) / 64.0;
          ar += xin_re[out_sym][n] * $cos(ang) - xin_im[out_sym][n] * $sin(ang);
          ai += xin_re[out_sym][n] * $sin(ang) + xin_im[out_sym][n] * $cos(ang);
        end
        er = ar / div - real'(out_data.re);
        ei = ai / div - real'(out_data.im);
        checks++;
        if (er > TOL || er < -TOL || ei > TOL || ei < -TOL) begin
          failures++;
          if (failures < 20)
            $display("FAIL sym %0d k %0d: got (%0d,%0d) expected (%f,%f)", out_sym, exp_idx,
                     out_data.re, out_data.im, ar / div, ai / div);
        end
        exp_idx++;
        if (exp_idx == 64) begin
          exp_idx = 0;
          out_sym++;
          if (out_sym == NSYM) begin
            checks++;
            if (n_fwd == 0 || n_inv == 0 || n_switch == 0 || n_b2b == 0 || n_gap == 0 ||
                n_scaled == 0 || n_unscaled == 0) failures++;
            $display("mechanisms: fft=%0d ifft=%0d mode_switch=%0d back_to_back=%0d idle_gap=%0d scaled=%0d unscaled=%0d",
                     n_fwd, n_inv, n_switch, n_b2b, n_gap, n_scaled, n_unscaled);
            $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
            $finish;
          end
        end
      end
    end
  end

  // watchdog
  initial begin
    repeat (NSYM * 100 + 500) @(posedge clk);
    failures++;
    $display("FAIL watchdog: %0d symbols of %0d received", out_sym, NSYM);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
