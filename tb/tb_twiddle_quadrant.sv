// tb_twiddle_quadrant: loads a first-quadrant table of 8-bit twiddles
// (64*cos, -64*sin of 2*pi*k/64, rounded) and checks all 64 exponents against
// 64*cos(2*pi*e/64) and -64*sin(2*pi*e/64) within one LSB.
module tb_twiddle_quadrant;
  localparam real PI = 3.14159265358979323846;
  logic signed [7:0] tab_re [16], tab_im [16];
  logic [5:0] e;
  logic signed [7:0] w_re, w_im;
  int checks = 0, failures = 0;
  function automatic real rabs(real v); return v < 0.0 ? -v : v; endfunction

  twiddle_quadrant #(.TW(8)) dut (.*);

  initial begin
    real cr, ci;
    for (int k = 0; k < 16; k++) begin
      tab_re[k] = 8'($rtoi($floor(64.0 * $cos(2.0 * PI * k / 64.0) + 0.5)));
      tab_im[k] = 8'($rtoi($floor(-64.0 * $sin(2.0 * PI * k / 64.0) + 0.5)));
    end
    for (int k = 0; k < 64; k++) begin
      e = 6'(k);
      #1;
      cr = 64.0 * $cos(2.0 * PI * k / 64.0);
      ci = -64.0 * $sin(2.0 * PI * k / 64.0);
      checks++;
      if (rabs(real'(w_re) - cr) > 1.0 || rabs(real'(w_im) - ci) > 1.0) begin
        failures++;
        $display("FAIL e=%0d got (%0d,%0d) expected (%f,%f)", k, w_re, w_im, cr, ci);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
