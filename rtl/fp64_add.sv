// fp64_add: pipelined IEEE-754 binary64 adder, y = a + b (a subtracter is
// this unit with the sign bit of b inverted).
//
// The combinational core is fp64_pkg::fadd (round to nearest even, subnormals
// flushed to zero). Its result is registered and then carried through a
// shift register so that the unit has exactly LAT cycles of latency and
// accepts a new operand set every clock, like the fully pipelined units of
// the datapath. The registers after the core are meant to be retimed into it
// by synthesis; how the arithmetic is split across stages is not specified,
// only the latency.
//
// Interface: in_valid with the operands in cycle t gives out_valid with y in
// cycle t+LAT. There is no stall input: the pipeline always advances.
// Timing: LAT = 14 by default.
module fp64_add
  import fp64_pkg::*;
#(
  parameter int unsigned LAT = 14
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  fp64_t a,
  input  fp64_t b,
  output logic  out_valid,
  output fp64_t y
);

  logic  v_q [LAT];
  fp64_t y_q [LAT];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < int'(LAT); s++) v_q[s] <= 1'b0;
    end else begin
      v_q[0] <= in_valid;
      for (int s = 1; s < int'(LAT); s++) v_q[s] <= v_q[s-1];
    end
  end

  always_ff @(posedge clk) begin
    y_q[0] <= fadd(a, b);
    for (int s = 1; s < int'(LAT); s++) y_q[s] <= y_q[s-1];
  end

  assign out_valid = v_q[LAT-1];
  assign y         = y_q[LAT-1];

  initial assert (LAT >= 1) else $fatal(1, "LAT must be at least 1");

endmodule
