// tb_delay_commutator: checks both commutator sizes used in the pipeline
// (L = 4 and L = 1). Each sample is tagged with its burst, input lane and
// input time. With burst time tau = 4L*a + L*j + r on input lane i, the
// sample must leave on lane j at time 4L*a + L*i + r + 3L. Checks every
// output sample and the 3L latency of the valid flag.
module tb_delay_commutator;
  import fft_pkg::*;
  localparam int NB = 4;

  logic clk = 1'b0, reset;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic  in_valid;
  cplx_t in_data [4];
  logic  v4, v1;
  cplx_t d4 [4];
  cplx_t d1 [4];

  delay_commutator #(.L(4)) dut4 (.clk, .reset, .in_valid, .in_data, .out_valid(v4), .out_data(d4));
  delay_commutator #(.L(1)) dut1 (.clk, .reset, .in_valid, .in_data, .out_valid(v1), .out_data(d1));

  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;
  longint t_start [NB];

  // checker for one instance
  task automatic chk(int L, int u, int b, cplx_t d [4], longint now);
    int a, i, r, tau;
    a = u / (4 * L); i = (u / L) % 4; r = u % L;
    for (int j = 0; j < 4; j++) begin
      tau = 4 * L * a + L * j + r;
      checks++;
      if (int'(d[j].re) != b * 1000 + i * 100 + tau) begin
        failures++;
        if (failures < 10) $display("FAIL L=%0d burst %0d u=%0d lane %0d: got %0d expected %0d",
                                    L, b, u, j, d[j].re, b * 1000 + i * 100 + tau);
      end
    end
    if (u == 0) begin
      checks++;
      if (now - t_start[b] != 3 * L) begin
        failures++;
        $display("FAIL L=%0d latency %0d", L, now - t_start[b]);
      end
    end
  endtask

  int u4 = 0, b4 = 0, u1 = 0, b1 = 0;
  always @(posedge clk) begin
    if (v4 && !reset) begin chk(4, u4, b4, d4, cyc); u4++; if (u4 == 16) begin u4 = 0; b4++; end end
    if (v1 && !reset) begin chk(1, u1, b1, d1, cyc); u1++; if (u1 == 16) begin u1 = 0; b1++; end end
  end

  initial begin
    reset = 1'b1;
    in_valid = 1'b0;
    for (int l = 0; l < 4; l++) in_data[l] = '0;
    repeat (3) @(posedge clk);
    reset <= 1'b0;
    for (int b = 0; b < NB; b++) begin
      repeat (20 + 13 * b) @(posedge clk);
      for (int tau = 0; tau < 16; tau++) begin
        if (tau == 0) t_start[b] = cyc + 1;
        in_valid <= 1'b1;
        for (int l = 0; l < 4; l++) in_data[l] <= '{re: 16'(b * 1000 + l * 100 + tau), im: 16'(l)};
        @(posedge clk);
      end
      in_valid <= 1'b0;
    end
    repeat (30) @(posedge clk);
    checks++;
    if (b4 != NB || b1 != NB) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (600) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
