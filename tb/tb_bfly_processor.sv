// tb_bfly_processor: drives random samples and random control words
// (exponent, FFT/IFFT, shift) into the butterfly processor every clock and
// compares each output, one clock later, with a double-precision model:
// X(p) = sum_l x(l) W^(l*e) W4^(l*p) / 2^shift (conjugated for IFFT),
// saturated to 16 bits, within 3 LSB. Also checks the one-clock latency and
// that reset clears the outputs.
module tb_bfly_processor;
  import fft_pkg::*;
  localparam real PI = 3.14159265358979323846;
  localparam int NV = 600;

  logic clk = 1'b0, reset;
  logic [8:0] bfpcontrol;
  logic [31:0] read_data_a, read_data_b, read_data_c, read_data_d;
  logic [31:0] write_data_a, write_data_b, write_data_c, write_data_d;
  int checks = 0, failures = 0;
  function automatic real rabs(real v); return v < 0.0 ? -v : v; endfunction
  always #5 clk = ~clk;

  bfly_processor dut (.*);

  cplx_t   vin [NV][4];
  bfpctl_t vctl [NV];
  int n_sat = 0;

  function automatic real sat(real v);
    if (v > 32767.0) return 32767.0;
    if (v < -32768.0) return -32768.0;
    return v;
  endfunction

  task automatic check(int v);
    real xr, xi, ang, sgn, er, ei, div;
    cplx_t got [4];
    got[0] = write_data_a; got[1] = write_data_b; got[2] = write_data_c; got[3] = write_data_d;
    sgn = vctl[v].inverse ? 1.0 : -1.0;
    div = real'(1 << vctl[v].shift);
    for (int p = 0; p < 4; p++) begin
      er = 0.0; ei = 0.0;
      for (int l = 0; l < 4; l++) begin
        ang = sgn * 2.0 * PI * (real'(l * vctl[v].exp) / 64.0 + real'(l * p) / 4.0);
        xr = vin[v][l].re; xi = vin[v][l].im;
        er += xr * $cos(ang) - xi * $sin(ang);
        ei += xr * $sin(ang) + xi * $cos(ang);
      end
      if (rabs(er / div) > 32767.0 || rabs(ei / div) > 32767.0) n_sat++;
      er = sat(er / div); ei = sat(ei / div);
      checks++;
      if (rabs(er - real'(got[p].re)) > 3.0 || rabs(ei - real'(got[p].im)) > 3.0) begin
        failures++;
        if (failures < 10) $display("FAIL v=%0d p=%0d got (%0d,%0d) expected (%f,%f)",
                                    v, p, int'(got[p].re), int'(got[p].im), er, ei);
      end
    end
  endtask

  initial begin
    for (int v = 0; v < NV; v++) begin
      vctl[v] = bfpctl_t'(9'($urandom));
      for (int l = 0; l < 4; l++) begin
        vin[v][l].re = 16'($urandom);
        vin[v][l].im = 16'($urandom);
        if (v % 3 != 0) begin  // mostly in range, some saturating
          vin[v][l].re = vin[v][l].re >>> 2;
          vin[v][l].im = vin[v][l].im >>> 2;
        end
      end
    end
    reset = 1'b1;
    bfpcontrol = '0;
    {read_data_a, read_data_b, read_data_c, read_data_d} = '1;
    @(posedge clk); @(posedge clk);
    #1;
    checks++;
    if ({write_data_a, write_data_b, write_data_c, write_data_d} != '0) failures++;
    reset = 1'b0;
    for (int v = 0; v < NV; v++) begin
      bfpcontrol  = vctl[v];
      read_data_a = vin[v][0]; read_data_b = vin[v][1];
      read_data_c = vin[v][2]; read_data_d = vin[v][3];
      @(posedge clk);
      #1 check(v);  // result of v must be present right after this edge
    end
    checks++;
    if (n_sat == 0) failures++;
    $display("saturated outputs: %0d", n_sat);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NV + 100) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
