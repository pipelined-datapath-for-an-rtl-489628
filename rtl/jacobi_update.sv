// jacobi_update: the last stage of a Jacobi sweep,
//   x_i(new) = (b_i - sum_{j != i} a_ij x_j) * (1/a_ii).
//
// Reciprocals 1/a_ii arrive from the divider early, in row order, and wait in
// a FIFO. When the reduce circuit delivers the row sum of row i (rows come in
// order, counted by this stage's own copy of the row counter), b_i is read
// from the b store (one clock), the subtracter forms b_i - sum (an adder with
// the sign of the sum inverted), and the output multiplier multiplies the
// difference by 1/a_ii, which travels beside the subtracter in a delay line.
// Interface: recip_valid/recip from the divider; sum_valid/sum from reduce;
// b_rd_en/b_rd_addr/b_rd_data to the b store (synchronous read); x_valid,
// x_idx, x_val give each new element with its index. restart clears the row
// counter at the start of a sweep.
// Timing: x_valid follows sum_valid by 1 + ADD_LAT + MUL_LAT = 25 cycles;
// one row per clock is accepted. RFIFO_DEPTH must cover the rows between the
// divider and the reduce output.
module jacobi_update
  import fp64_pkg::*;
#(
  parameter int unsigned N_MAX       = 1024,
  parameter int unsigned ADD_LAT     = 14,
  parameter int unsigned MUL_LAT     = 10,
  parameter int unsigned RFIFO_DEPTH = 128
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     restart,
  input  logic                     recip_valid,
  input  fp64_t                    recip,
  input  logic                     sum_valid,
  input  fp64_t                    sum,
  output logic                     b_rd_en,
  output logic [$clog2(N_MAX)-1:0] b_rd_addr,
  input  fp64_t                    b_rd_data,
  output logic                     x_valid,
  output logic [$clog2(N_MAX)-1:0] x_idx,
  output fp64_t                    x_val
);

  localparam int unsigned IW = $clog2(N_MAX);

  // reciprocal FIFO
  fp64_t rf_dout;
  logic  rf_empty, rf_full, rf_pop;
  logic [$clog2(RFIFO_DEPTH+1)-1:0] rf_count;

  sync_fifo #(.W(64), .DEPTH(RFIFO_DEPTH)) u_rfifo (
    .clk, .rst_n, .push(recip_valid), .din(recip), .pop(rf_pop),
    .dout(rf_dout), .empty(rf_empty), .full(rf_full), .count(rf_count)
  );

  // row counter of the output side
  logic [IW-1:0] i_out;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        i_out <= '0;
    else if (restart)  i_out <= '0;
    else if (sum_valid) i_out <= i_out + 1'b1;
  end

  assign b_rd_en   = sum_valid;
  assign b_rd_addr = i_out;
  assign rf_pop    = sum_valid;

  // align sum, 1/a_ii and the index with b_i (one clock of b store read)
  logic          s1_v;
  fp64_t         s1_sum, s1_rcp;
  logic [IW-1:0] s1_idx;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) s1_v <= 1'b0;
    else        s1_v <= sum_valid;
  end
  always_ff @(posedge clk) begin
    s1_sum <= sum;
    s1_rcp <= rf_dout;
    s1_idx <= i_out;
  end

  // subtracter: b_i + (-sum)
  logic  d_v;
  fp64_t d_val, d_rcp;
  logic [IW-1:0] d_idx;
  fp64_add #(.LAT(ADD_LAT)) u_sub (
    .clk, .rst_n, .in_valid(s1_v), .a(b_rd_data), .b({~s1_sum[63], s1_sum[62:0]}),
    .out_valid(d_v), .y(d_val)
  );
  delay_line #(.W(64 + IW), .LAT(ADD_LAT)) u_dl_sub (
    .clk, .d({s1_rcp, s1_idx}), .q({d_rcp, d_idx})
  );

  // output multiplier
  fp64_mul #(.LAT(MUL_LAT)) u_mul (
    .clk, .rst_n, .in_valid(d_v), .a(d_val), .b(d_rcp), .out_valid(x_valid), .y(x_val)
  );
  delay_line #(.W(IW), .LAT(MUL_LAT)) u_dl_mul (.clk, .d(d_idx), .q(x_idx));

  a_recip_ready: assert property (@(posedge clk) disable iff (!rst_n) sum_valid |-> !rf_empty);

endmodule
