// delay_line: fixed delay of D >= 1 clock cycles for a W-bit word, built as
// a shift register that advances every clock. Used for
// the delay branches of the delay commutators. The contents are not reset:
// they are only read once filled with valid data.
module delay_line #(
  parameter int W = 32,
  parameter int D = 4   // at least 1
) (
  input  logic         clk,
  input  logic [W-1:0] din,
  output logic [W-1:0] dout
);

  logic [W-1:0] sr [D];
  always_ff @(posedge clk) begin
    sr[0] <= din;
    for (int i = 1; i < D; i++) sr[i] <= sr[i-1];
  end
  assign dout = sr[D-1];

endmodule
