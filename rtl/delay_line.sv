// delay_line: W-bit shift register of LAT stages (LAT >= 1), used to carry
// side information (row index, 1/a_ii) alongside a pipelined arithmetic unit
// so that it arrives in the same cycle as the unit's result. No reset: the
// valid bit travels in the unit itself.
module delay_line #(
  parameter int unsigned W   = 64,
  parameter int unsigned LAT = 14
) (
  input  logic         clk,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);

  logic [W-1:0] sr [LAT];

  always_ff @(posedge clk) begin
    sr[0] <= d;
    for (int s = 1; s < int'(LAT); s++) sr[s] <= sr[s-1];
  end

  assign q = sr[LAT-1];

endmodule
