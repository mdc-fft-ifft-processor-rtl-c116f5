// tb_cmult: checks the complex multiplier against a real-valued product
// rounded half up: p = floor(a*w / 2^14 + 1/2), with random samples and
// twiddles, including full-scale samples.
module tb_cmult;
  logic signed [15:0] a_re, a_im, w_re, w_im;
  logic signed [16:0] p_re, p_im;
  int checks = 0, failures = 0;

  cmult #(.DW(16), .TW(16), .FRAC(14)) dut (.*);

  initial begin
    real rr, ri;
    longint er, ei;
    for (int it = 0; it < 2000; it++) begin
      a_re = 16'($urandom);
      a_im = 16'($urandom);
      if (it < 4) begin a_re = (it[0]) ? -16'sd32768 : 16'sd32767; a_im = a_re; end
      w_re = 16'(int'($urandom_range(32768)) - 16384);
      w_im = 16'(int'($urandom_range(32768)) - 16384);
      #1;
      rr = (real'(a_re) * real'(w_re) - real'(a_im) * real'(w_im)) / 16384.0;
      ri = (real'(a_re) * real'(w_im) + real'(a_im) * real'(w_re)) / 16384.0;
      er = longint'($floor(rr + 0.5));
      ei = longint'($floor(ri + 0.5));
      checks++;
      if (p_re != er || p_im != ei) begin
        failures++;
        if (failures < 10) $display("FAIL a=(%0d,%0d) w=(%0d,%0d) got (%0d,%0d) expected (%0d,%0d)",
                                    a_re, a_im, w_re, w_im, p_re, p_im, er, ei);
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
