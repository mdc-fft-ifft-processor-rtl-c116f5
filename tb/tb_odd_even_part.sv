// tb_odd_even_part: random complex 4-bit inputs; checks output 4*l + q
// against sum_m y(4m + l) W_4^(m*q) * W_16^(l*q) computed in double
// precision with exact twiddles, within 1.5 LSB (rounding plus the error of
// the 8-bit twiddles).
module tb_odd_even_part;
  localparam real PI = 3.14159265358979323846;
  logic signed [3:0] in_re [16], in_im [16];
  logic signed [7:0] tab_re [16], tab_im [16];
  logic signed [6:0] out_re [16], out_im [16];
  int checks = 0, failures = 0;
  function automatic real rabs(real v); return v < 0.0 ? -v : v; endfunction

  odd_even_part #(.IW(4), .TW(8), .FRAC(6)) dut (.*);

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
        if (it == 0) begin in_re[n] = -4'sd8; in_im[n] = -4'sd8; end
      end
      #1;
      for (int l = 0; l < 4; l++)
        for (int q = 0; q < 4; q++) begin
          er = 0.0; ei = 0.0;
          for (int m = 0; m < 4; m++) begin
            ang = -2.0 * PI * (real'(m * q) / 4.0 + real'(l * q) / 16.0);
            er += in_re[4*m + l] * $cos(ang) - in_im[4*m + l] * $sin(ang);
            ei += in_re[4*m + l] * $sin(ang) + in_im[4*m + l] * $cos(ang);
          end
          checks++;
          if (rabs(er - out_re[4*l + q]) > 1.5 || rabs(ei - out_im[4*l + q]) > 1.5) begin
            failures++;
            if (failures < 10) $display("FAIL it %0d l %0d q %0d got (%0d,%0d) expected (%f,%f)",
                                        it, l, q, out_re[4*l + q], out_im[4*l + q], er, ei);
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
