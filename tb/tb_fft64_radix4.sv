// tb_fft64_radix4: end-to-end test of both datapaths at their default sizes.
// Parallel FFT: random 4-bit vectors, compared with a double-precision DFT
// saturated to 8 bits (each point within 12 LSB, RMS below 2.5 LSB), with at
// least one saturating vector.
// MDC FFT/IFFT, four streams sharing one pipeline: each stream receives a
// sequence of 64-sample symbols (random, impulse, single tone), all streams
// starting their symbols on the same clock. Every output X(k) of every
// stream is compared with a double-precision DFT of that stream's input,
// scaled by the symbol's shift schedule, within a small tolerance for
// fixed-point rounding. Covers: FFT and IFFT symbols, mode switches between
// symbols, different modes on different streams at once, three scale
// schedules, symbols back to back and separated by idle gaps. Checks the
// latency from a symbol's first sample to X(0) of stream s (84 + 16*s
// clocks), the output order, and that the shared butterflies are busy on
// every clock of at least one full symbol time (100 % use).
// Register-bank FFT/IFFT: four symbols of random data, FFT and IFFT, sent as
// fast as in_ready allows; every X(k) compared with a double-precision DFT;
// output order, the 54-clock latency, stalls and loading during readout.
module tb_fft64_radix4;
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
  int checks = 0, failures = 0;

  fft64_radix4 dut (.*);

  logic [255:0]  A;
  logic [255:0]  W;
  logic [1023:0] X;
  int par_done = 0, par_sat = 0;


  function automatic real rabs(real v); return v < 0.0 ? -v : v; endfunction
  function automatic real sat8(real v);
    if (v > 127.0) return 127.0;
    if (v < -128.0) return -128.0;
    return v;
  endfunction

  // parallel datapath: one vector per clock while the stream runs
  initial begin
    int x [64];
    real er, ei, ang, dr, di, sq;
    logic signed [7:0] gr, gi;
    for (int k = 0; k < 16; k++) begin
      W[16*k + 8 +: 8] = 8'($rtoi($floor(64.0 * $cos(2.0 * PI * k / 64.0) + 0.5)));
      W[16*k +: 8]     = 8'($rtoi($floor(-64.0 * $sin(2.0 * PI * k / 64.0) + 0.5)));
    end
    A = '0;
    for (int v = 0; v < 20; v++) begin
      @(negedge clk);
      for (int n = 0; n < 64; n++) begin
        x[n] = (v == 0) ? 7 : int'($urandom_range(15)) - 8;
        A[4*n +: 4] = 4'(x[n]);
      end
      #1;
      sq = 0.0;
      for (int k = 0; k < 64; k++) begin
        er = 0.0; ei = 0.0;
        for (int n = 0; n < 64; n++) begin
          ang = -2.0 * PI * real'((n * k) % 64) / 64.0;
          er += x[n] * $cos(ang);
          ei += x[n] * $sin(ang);
        end
        if (er > 127.0 || er < -128.0 || ei > 127.0 || ei < -128.0) par_sat++;
        gr = X[16*k + 8 +: 8];
        gi = X[16*k +: 8];
        dr = sat8(er) - real'(gr);
        di = sat8(ei) - real'(gi);
        sq += dr * dr + di * di;
        checks++;
        if (rabs(dr) > 12.0 || rabs(di) > 12.0) begin
          failures++;
          if (failures < 20) $display("FAIL parallel v %0d k %0d got (%0d,%0d) expected (%f,%f)", v, k, gr, gi, er, ei);
        end
      end
      checks++;
      if ($sqrt(sq / 128.0) > 2.5) begin
        failures++;
        $display("FAIL parallel v %0d rms error %f", v, $sqrt(sq / 128.0));
      end
    end
    par_done = 1;
  end

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


  // register-bank datapath: 4 symbols sent as fast as rb_in_ready allows,
  // compared with a double-precision DFT; counts stalls and loads that
  // overlap the previous readout, checks order and the 54-clock latency
  localparam int RB_NSYM = 4;
  logic rb_in_valid, rb_in_ready, rb_inverse, rb_out_valid;
  cplx_t rb_in_data, rb_out_data;
  logic [5:0] rb_scale, rb_out_index;
  int rb_re [RB_NSYM][64];
  int rb_im [RB_NSYM][64];
  logic rb_inv [RB_NSYM];
  longint rb_t_last [RB_NSYM];
  int rb_stall = 0, rb_overlap = 0, rb_done = 0;

  initial begin
    rb_in_valid = 1'b0;
    rb_in_data = '0;
    rb_inverse = 1'b0;
    rb_scale = '0;
    for (int k = 0; k < RB_NSYM; k++) begin
      rb_inv[k] = (k % 2 == 1);
      for (int n = 0; n < 64; n++) begin
        rb_re[k][n] = int'($urandom_range(32000)) - 16000;
        rb_im[k][n] = int'($urandom_range(32000)) - 16000;
      end
    end
    @(negedge reset);
    @(negedge clk);
    for (int k = 0; k < RB_NSYM; k++) begin
      for (int n = 0; n < 64; n++) begin
        rb_in_valid = 1'b1;
        rb_in_data  = '{re: 16'(rb_re[k][n]), im: 16'(rb_im[k][n])};
        rb_inverse  = rb_inv[k];
        rb_scale    = 6'b101010;
        while (!rb_in_ready) begin
          rb_stall++;
          @(negedge clk);
        end
        if (rb_out_valid) rb_overlap++;
        @(posedge clk);
        if (n == 63) rb_t_last[k] = cyc;
        @(negedge clk);
      end
    end
    rb_in_valid = 1'b0;
  end

  int rb_sym = 0, rb_idx = 0;
  always @(posedge clk) begin
    real ar, ai, ang, sgn;
    if (!reset && rb_out_valid && rb_sym < RB_NSYM) begin
      if (rb_idx == 0) begin
        checks++;
        if (cyc - rb_t_last[rb_sym] != 54) begin
          failures++;
          $display("FAIL register-bank latency sym %0d: %0d", rb_sym, cyc - rb_t_last[rb_sym]);
        end
      end
      checks += 2;
      if (rb_out_index != 6'(rb_idx)) failures++;
      sgn = rb_inv[rb_sym] ? 1.0 : -1.0;
      ar = 0.0; ai = 0.0;
      for (int n = 0; n < 64; n++) begin
        ang = sgn * 2.0 * PI * real'((n * rb_idx) % 64) / 64.0;
        ar += rb_re[rb_sym][n] * $cos(ang) - rb_im[rb_sym][n] * $sin(ang);
        ai += rb_re[rb_sym][n] * $sin(ang) + rb_im[rb_sym][n] * $cos(ang);
      end
      if (rabs(ar / 64.0 - real'(rb_out_data.re)) > TOL || rabs(ai / 64.0 - real'(rb_out_data.im)) > TOL) begin
        failures++;
        if (failures < 20) $display("FAIL register-bank sym %0d k %0d: got (%0d,%0d) expected (%f,%f)",
                                    rb_sym, rb_idx, rb_out_data.re, rb_out_data.im, ar / 64.0, ai / 64.0);
      end
      rb_idx++;
      if (rb_idx == 64) begin
        rb_idx = 0;
        rb_sym++;
        if (rb_sym == RB_NSYM) rb_done = 1;
      end
    end
  end

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
    if (!reset && dut.u_mdc.s1_in_valid) begin
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
            n_scaled == 0 || n_unscaled == 0 || n_mixed == 0 || n_full == 0 || par_sat == 0 || par_done == 0 ||
            rb_done == 0 || rb_stall == 0 || rb_overlap == 0) failures++;
        $display("parallel: vectors done=%0d saturated points=%0d", par_done * 20, par_sat);
        $display("register bank: symbols done=%0d stall_clocks=%0d load_during_readout=%0d", rb_done * RB_NSYM, rb_stall, rb_overlap);
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
