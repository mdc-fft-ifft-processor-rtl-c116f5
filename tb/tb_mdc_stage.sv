// tb_mdc_stage: runs the same bursts of 16 random lane-groups through stages
// 1, 2 and 3 and checks every output against a double-precision radix-4 DIT
// butterfly with the twiddle exponent each stage must use for burst time t:
// stage 1: e = 0, stage 2: e = 4*floor(t/4), stage 3: e = 4*(t mod 4) +
// floor(t/4); lane l is multiplied by W_64^(l*e). Mode (FFT/IFFT, shift)
// changes per burst. Also checks the one-clock latency of out_valid.
module tb_mdc_stage;
  import fft_pkg::*;
  localparam real PI = 3.14159265358979323846;
  localparam int NB = 6;

  logic clk = 1'b0, reset;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  function automatic real rabs(real v); return v < 0.0 ? -v : v; endfunction

  logic inverse;
  logic [1:0] shift;
  logic in_valid;
  cplx_t in_data [4];
  logic ov [3];
  cplx_t od [3][4];

  mdc_stage #(.STAGE(1)) dut1 (.clk, .reset, .inverse, .shift, .in_valid, .in_data, .out_valid(ov[0]), .out_data(od[0]));
  mdc_stage #(.STAGE(2)) dut2 (.clk, .reset, .inverse, .shift, .in_valid, .in_data, .out_valid(ov[1]), .out_data(od[1]));
  mdc_stage #(.STAGE(3)) dut3 (.clk, .reset, .inverse, .shift, .in_valid, .in_data, .out_valid(ov[2]), .out_data(od[2]));

  cplx_t vin [NB][16][4];
  logic  binv [NB];
  logic [1:0] bsh [NB];

  int t = 0, b = 0;
  logic in_valid_d = 1'b0;
  always @(posedge clk) begin
    real xr, xi, er, ei, ang, sgn, div;
    int e;
    in_valid_d <= in_valid;
    for (int s = 0; s < 3; s++) begin
      checks++;
      if (!reset && ov[s] != in_valid_d) begin failures++; $display("FAIL valid stage %0d", s + 1); end
    end
    if (ov[0] && !reset) begin
      sgn = binv[b] ? 1.0 : -1.0;
      div = real'(1 << bsh[b]);
      for (int s = 1; s <= 3; s++) begin
        e = (s == 1) ? 0 : (s == 2) ? 4 * (t / 4) : 4 * (t % 4) + t / 4;
        for (int p = 0; p < 4; p++) begin
          er = 0.0; ei = 0.0;
          for (int l = 0; l < 4; l++) begin
            ang = sgn * 2.0 * PI * (real'(l * e) / 64.0 + real'(l * p) / 4.0);
            xr = vin[b][t][l].re; xi = vin[b][t][l].im;
            er += xr * $cos(ang) - xi * $sin(ang);
            ei += xr * $sin(ang) + xi * $cos(ang);
          end
          checks++;
          if (rabs(er / div - real'(od[s-1][p].re)) > 3.0 || rabs(ei / div - real'(od[s-1][p].im)) > 3.0) begin
            failures++;
            if (failures < 10) $display("FAIL stage %0d burst %0d t %0d p %0d", s, b, t, p);
          end
        end
      end
      t++;
      if (t == 16) begin t = 0; b++; end
    end
  end

  initial begin
    for (int k = 0; k < NB; k++) begin
      binv[k] = k[0];
      bsh[k]  = 2'(k + 1);
      for (int i = 0; i < 16; i++)
        for (int l = 0; l < 4; l++) begin
          vin[k][i][l].re = 16'(int'($urandom_range(16000)) - 8000);
          vin[k][i][l].im = 16'(int'($urandom_range(16000)) - 8000);
        end
    end
    reset = 1'b1;
    in_valid = 1'b0;
    inverse = 1'b0;
    shift = '0;
    for (int l = 0; l < 4; l++) in_data[l] = '0;
    repeat (3) @(posedge clk);
    reset <= 1'b0;
    for (int k = 0; k < NB; k++) begin
      repeat (5 + k) @(posedge clk);
      for (int i = 0; i < 16; i++) begin
        in_valid <= 1'b1;
        inverse  <= binv[k];
        shift    <= bsh[k];
        for (int l = 0; l < 4; l++) in_data[l] <= vin[k][i][l];
        @(posedge clk);
      end
      in_valid <= 1'b0;
    end
    repeat (5) @(posedge clk);
    checks++;
    if (b != NB) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
