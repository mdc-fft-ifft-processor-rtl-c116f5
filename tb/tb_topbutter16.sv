// tb_topbutter16: random complex 4-bit inputs; checks the 16 outputs against
// a double-precision 16-point DFT within 4.5 LSB (rounding of the twiddled
// first-rank values, summed over four, plus the 8-bit twiddle error).
module tb_topbutter16;
  localparam real PI = 3.14159265358979323846;
  logic signed [3:0] in_re [16], in_im [16];
  logic signed [7:0] tab_re [16], tab_im [16];
  logic signed [8:0] out_re [16], out_im [16];
  int checks = 0, failures = 0;
  function automatic real rabs(real v); return v < 0.0 ? -v : v; endfunction

  topbutter16 #(.IW(4), .TW(8), .FRAC(6)) dut (.*);

  initial begin
    real er, ei, ang;
    for (int k = 0; k < 16; k++) begin
      tab_re[k] = 8'($rtoi($floor(64.0 * $cos(2.0 * PI * k / 64.0) + 0.5)));
      tab_im[k] = 8'($rtoi($floor(-64.0 * $sin(2.0 * PI * k / 64.0) + 0.5)));
    end
    for (int it = 0; it < 300; it++) begin
      for (int n = 0; n < 16; n++) begin
        in_re[n] = 4'($urandom);
        in_im[n] = 4'($urandom);
        if (it == 0) begin in_re[n] = -4'sd8; in_im[n] = 4'sd7; end
      end
      #1;
      for (int k = 0; k < 16; k++) begin
        er = 0.0; ei = 0.0;
        for (int n = 0; n < 16; n++) begin
          ang = -2.0 * PI * real'((n * k) % 16) / 16.0;
          er += in_re[n] * $cos(ang) - in_im[n] * $sin(ang);
          ei += in_re[n] * $sin(ang) + in_im[n] * $cos(ang);
        end
        checks++;
        if (rabs(er - out_re[k]) > 4.5 || rabs(ei - out_im[k]) > 4.5) begin
          failures++;
          if (failures < 10) $display("FAIL it %0d k %0d got (%0d,%0d) expected (%f,%f)",
                                      it, k, out_re[k], out_im[k], er, ei);
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
