// tb_fft64_parallel: end-to-end test of the parallel 64-point FFT at its
// default widths (4-bit real inputs, 8-bit twiddles, 8-bit output parts).
// Vectors: random inputs, an impulse, a cosine at bin 3 and full-scale DC.
// Each X(k) is compared with a double-precision DFT saturated to 8 bits:
// every point within 12 LSB and the RMS error of a vector below 2.5 LSB
// (rounding and 8-bit twiddle error). Counts saturated outputs and requires
// at least one.
module tb_fft64_parallel;
  localparam real PI = 3.14159265358979323846;
  localparam int NV = 60;
  logic [255:0]  A;
  logic [255:0]  W;
  logic [1023:0] X;
  int checks = 0, failures = 0, n_sat = 0;
  function automatic real rabs(real v); return v < 0.0 ? -v : v; endfunction
  function automatic real sat(real v);
    if (v > 127.0) return 127.0;
    if (v < -128.0) return -128.0;
    return v;
  endfunction

  fft64_parallel dut (.*);

  initial begin
    int x [64];
    real er, ei, ang, dr, di, sq;
    logic signed [7:0] gr, gi;
    for (int k = 0; k < 16; k++) begin
      W[16*k + 8 +: 8] = 8'($rtoi($floor(64.0 * $cos(2.0 * PI * k / 64.0) + 0.5)));
      W[16*k +: 8]     = 8'($rtoi($floor(-64.0 * $sin(2.0 * PI * k / 64.0) + 0.5)));
    end
    for (int v = 0; v < NV; v++) begin
      for (int n = 0; n < 64; n++) begin
        case (v)
          0: x[n] = (n == 0) ? 7 : 0;
          1: x[n] = $rtoi($floor(7.0 * $cos(2.0 * PI * 3 * n / 64.0) + 0.5));
          2: x[n] = 7;
          default: x[n] = int'($urandom_range(15)) - 8;
        endcase
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
        if (er > 127.0 || er < -128.0 || ei > 127.0 || ei < -128.0) n_sat++;
        gr = X[16*k + 8 +: 8];
        gi = X[16*k +: 8];
        dr = sat(er) - real'(gr);
        di = sat(ei) - real'(gi);
        sq += dr * dr + di * di;
        checks++;
        if (rabs(dr) > 12.0 || rabs(di) > 12.0) begin
          failures++;
          if (failures < 10) $display("FAIL v %0d k %0d got (%0d,%0d) expected (%f,%f)", v, k, gr, gi, er, ei);
        end
      end
      checks++;
      if ($sqrt(sq / 128.0) > 2.5) begin
        failures++;
        $display("FAIL v %0d rms error %f", v, $sqrt(sq / 128.0));
      end
    end
    checks++;
    if (n_sat == 0) failures++;
    $display("saturated outputs: %0d", n_sat);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
