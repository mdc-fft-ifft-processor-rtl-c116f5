// tb_input_buffer: sends symbols of tagged samples (re = symbol*100 + n) and
// checks that each burst presents x(t), x(t+16), x(t+32), x(t+48) on lanes
// 0..3 for t = 0..15 on consecutive clocks, starting one clock after sample
// 48 was accepted, with the mode word given with sample 0. Symbols arrive
// back to back, after idle gaps and with a gap in their first quarter.
module tb_input_buffer;
  import fft_pkg::*;
  localparam int NS = 5;

  logic clk = 1'b0, reset;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic in_valid, out_valid;
  cplx_t in_data;
  logic [6:0] in_mode, out_mode;
  cplx_t out_data [4];

  input_buffer #(.NPT(64), .MW(7)) dut (.*);

  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;
  longint t48 [NS];

  int t = 0, s = 0;
  always @(posedge clk) begin
    if (out_valid && !reset) begin
      for (int l = 0; l < 4; l++) begin
        checks++;
        if (int'(out_data[l].re) != s * 100 + t + 16 * l || int'(out_data[l].im) != -(t + 16 * l)) begin
          failures++;
          if (failures < 10) $display("FAIL sym %0d t %0d lane %0d: got %0d", s, t, l, out_data[l].re);
        end
      end
      if (t == 0) begin
        checks += 2;
        if (cyc - t48[s] != 1) begin failures++; $display("FAIL timing sym %0d", s); end
        if (out_mode != 7'(s * 9 + 3)) begin failures++; $display("FAIL mode sym %0d", s); end
      end
      t++;
      if (t == 16) begin t = 0; s++; end
    end
  end

  initial begin
    reset = 1'b1;
    in_valid = 1'b0;
    in_data = '0;
    in_mode = '0;
    repeat (3) @(posedge clk);
    reset <= 1'b0;
    for (int k = 0; k < NS; k++) begin
      if (k == 2) begin in_valid <= 1'b0; repeat (9) @(posedge clk); end
      for (int n = 0; n < 64; n++) begin
        if (k == 3 && n == 5) begin in_valid <= 1'b0; repeat (4) @(posedge clk); end
        in_valid <= 1'b1;
        in_data  <= '{re: 16'(k * 100 + n), im: 16'(-n)};
        in_mode  <= (n == 0) ? 7'(k * 9 + 3) : 7'h7f;
        if (n == 48) t48[k] = cyc + 1;
        @(posedge clk);
      end
    end
    in_valid <= 1'b0;
    repeat (5) @(posedge clk);
    checks++;
    if (s != NS) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (500) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
