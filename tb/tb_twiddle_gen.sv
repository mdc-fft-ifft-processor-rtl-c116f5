// tb_twiddle_gen: checks every twiddle factor W_64^e (and its conjugate in
// inverse mode) against 16384*cos / 16384*sin computed in double precision,
// allowing one LSB for rounding.
module tb_twiddle_gen;
  localparam real PI = 3.14159265358979323846;
  logic [5:0] e;
  logic inverse;
  logic signed [15:0] w_re, w_im;
  int checks = 0, failures = 0;
  function automatic real rabs(real v); return v < 0.0 ? -v : v; endfunction

  twiddle_gen dut (.*);

  initial begin
    real cr, ci;
    for (int m = 0; m < 2; m++) begin
      for (int k = 0; k < 64; k++) begin
        e = 6'(k);
        inverse = m[0];
        #1;
        cr = 16384.0 * $cos(2.0 * PI * k / 64.0);
        ci = (m == 1 ? 1.0 : -1.0) * 16384.0 * $sin(2.0 * PI * k / 64.0);
        checks++;
        if (rabs(real'(w_re) - cr) > 1.0 || rabs(real'(w_im) - ci) > 1.0) begin
          failures++;
          $display("FAIL e=%0d inv=%0d got (%0d,%0d) expected (%f,%f)", k, m, w_re, w_im, cr, ci);
        end
      end
    end
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
