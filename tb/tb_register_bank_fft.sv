// tb_register_bank_fft: sends 64-sample symbols (random, impulse, tone) to
// the two-bank in-place FFT/IFFT and compares every X(k) with a
// double-precision DFT of the input, scaled by the symbol's shift schedule,
// within a small tolerance for fixed-point rounding. Covers FFT and IFFT,
// three scale schedules, input gaps, stalls (in_valid while in_ready is
// low) and loading a symbol during the previous one's readout. Checks the
// output order and the 54-clock latency from x(63) to X(0).
module tb_register_bank_fft;
  import fft_pkg::*;

  localparam int  NSYM = 6;
  localparam real PI   = 3.14159265358979323846;
  localparam int  TOL  = 6;
  localparam int  LAT  = 54;

  logic clk = 1'b0;
  logic reset;
  logic in_valid, in_ready;
  cplx_t in_data;
  logic inverse;
  logic [5:0] scale;
  logic out_valid;
  logic [5:0] out_index;
  cplx_t out_data;

  always #5 clk = ~clk;

  register_bank_fft dut (.*);

  int checks = 0, failures = 0;
  int n_fwd = 0, n_inv = 0, n_gap = 0, n_stall = 0, n_overlap = 0, n_scaled = 0, n_unscaled = 0;

  int xin_re [NSYM][64];
  int xin_im [NSYM][64];
  logic sym_inv [NSYM];
  logic [5:0] sym_scale [NSYM];
  longint t_last [NSYM];
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic make_symbol(int k);
    int amp;
    sym_inv[k]   = (k % 3 == 1);
    sym_scale[k] = (k == 2) ? 6'b000000 : (k == 4) ? 6'b010101 : 6'b101010;
    amp = (sym_scale[k] == 6'b000000) ? 250 : (sym_scale[k] == 6'b010101) ? 2000 : 16000;
    for (int n = 0; n < 64; n++) begin
      if (k == 0) begin                  // impulse
        xin_re[k][n] = (n == 0) ? amp : 0;
        xin_im[k][n] = 0;
      end else if (k == 3) begin          // complex tone at bin 9
        xin_re[k][n] = $rtoi(amp * 0.9 * $cos(2.0 * PI * 9 * n / 64.0));
        xin_im[k][n] = $rtoi(amp * 0.9 * $sin(2.0 * PI * 9 * n / 64.0));
      end else begin
        xin_re[k][n] = int'($urandom_range(2 * amp)) - amp;
        xin_im[k][n] = int'($urandom_range(2 * amp)) - amp;
      end
    end
  endtask

  // driver: changes inputs on the falling edge; a sample is taken on the
  // next rising edge if in_ready is high (in_ready only changes on rising edges)
  initial begin
    reset = 1'b1;
    in_valid = 1'b0;
    in_data = '0;
    inverse = 1'b0;
    scale = '0;
    for (int k = 0; k < NSYM; k++) make_symbol(k);
    repeat (3) @(posedge clk);
    @(negedge clk);
    reset = 1'b0;
    for (int k = 0; k < NSYM; k++) begin
      if (sym_inv[k]) n_inv++; else n_fwd++;
      if (sym_scale[k] == 0) n_unscaled++; else n_scaled++;
      for (int n = 0; n < 64; n++) begin
        if (k == 1 && (n == 10 || n == 40)) begin
          in_valid = 1'b0;
          repeat (3) @(negedge clk);
          n_gap++;
        end
        in_valid = 1'b1;
        in_data  = '{re: 16'(xin_re[k][n]), im: 16'(xin_im[k][n])};
        inverse  = (n == 0) ? sym_inv[k] : ~sym_inv[k];      // only x(0) counts
        scale    = (n == 0) ? sym_scale[k] : ~sym_scale[k];
        while (!in_ready) begin
          n_stall++;
          @(negedge clk);
        end
        if (out_valid) n_overlap++;
        @(posedge clk);
        if (n == 63) t_last[k] = cyc;
        @(negedge clk);
      end
      in_valid = 1'b0;
      if (k == 3) repeat (130) @(negedge clk);   // let the pipeline run dry once
    end
  end

  // checker
  int out_sym = 0, exp_idx = 0;
  always @(posedge clk) begin
    real ar, ai, ang, div, er, ei, sgn;
    int  shift;
    if (!reset && out_valid && out_sym < NSYM) begin
      if (exp_idx == 0) begin
        checks++;
        if (cyc - t_last[out_sym] != longint'(LAT)) begin
          failures++;
          $display("FAIL latency sym %0d: %0d", out_sym, cyc - t_last[out_sym]);
        end
      end
      checks++;
      if (out_index != 6'(exp_idx)) begin
        failures++;
        if (failures < 20) $display("FAIL order sym %0d: index %0d expected %0d", out_sym, out_index, exp_idx);
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
          if (n_fwd == 0 || n_inv == 0 || n_gap == 0 || n_stall == 0 || n_overlap == 0 ||
              n_scaled == 0 || n_unscaled == 0) failures++;
          $display("mechanisms: fft=%0d ifft=%0d input_gaps=%0d stall_clocks=%0d load_during_readout=%0d scaled=%0d unscaled=%0d",
                   n_fwd, n_inv, n_gap, n_stall, n_overlap, n_scaled, n_unscaled);
          $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
          $finish;
        end
      end
    end
  end

  // watchdog
  initial begin
    repeat (NSYM * 200 + 500) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
