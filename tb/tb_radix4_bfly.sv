// tb_radix4_bfly: checks the radix-4 butterfly against a direct 4-point DFT,
// X(p) = sum_l y(l) * (-j)^(l*p) (forward) or (+j)^(l*p) (inverse), for
// random and full-scale corner inputs.
module tb_radix4_bfly;
  localparam int W = 16;
  logic inverse;
  logic signed [W-1:0] in_re [4], in_im [4];
  logic signed [W+1:0] out_re [4], out_im [4];
  int checks = 0, failures = 0;

  radix4_bfly #(.W(W)) dut (.*);

  task automatic check_once();
    int er, ei, yr, yi, k, t;
    for (int p = 0; p < 4; p++) begin
      er = 0; ei = 0;
      for (int l = 0; l < 4; l++) begin
        yr = in_re[l]; yi = in_im[l];
        k = (l * p) % 4;
        if (inverse && k != 0) k = 4 - k;   // (+j)^m = (-j)^(4-m)
        // multiply by (-j)^k
        for (int m = 0; m < k; m++) begin t = yr; yr = yi; yi = -t; end
        er += yr; ei += yi;
      end
      checks++;
      if (out_re[p] != er || out_im[p] != ei) begin
        failures++;
        $display("FAIL inv=%0d p=%0d got (%0d,%0d) expected (%0d,%0d)", inverse, p,
                 out_re[p], out_im[p], er, ei);
      end
    end
  endtask

  initial begin
    for (int it = 0; it < 400; it++) begin
      inverse = it[0];
      for (int l = 0; l < 4; l++) begin
        if (it < 8) begin
          in_re[l] = (it[1] ^ l[0]) ? -16'sd32768 : 16'sd32767;
          in_im[l] = (it[2] ^ l[1]) ? -16'sd32768 : 16'sd32767;
        end else begin
          in_re[l] = W'($urandom);
          in_im[l] = W'($urandom);
        end
      end
      #1 check_once();
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
