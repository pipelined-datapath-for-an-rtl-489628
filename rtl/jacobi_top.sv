// jacobi_top: one Jacobi sweep  x(new)_i = (b_i - sum_{j != i} a_ij x_j) / a_ii
// built around the binary tree datapath.
//
// Blocks and flow:
//   x_store, b_store  hold x(delta) and b, loaded one element per clock
//                     through the x_wr_* / b_wr_* ports before a sweep;
//   jacobi_ctrl       counters i (row) and j (sub-row): accepts the matrix
//                     as a stream of K-element sub-rows on a_subrow, row by
//                     row, reads x_jK..x_jK+K-1 from the x store and marks the
//                     diagonal lane;
//   tree_datapath     K multipliers and a K-1 adder tree: one partial sum per
//                     sub-row per clock, diagonal product forced to zero;
//   reduce_row        adds the n/K partial sums of each row;
//   diag_select,      take a_ii from its sub-row and form 1/a_ii;
//   fp64_recip
//   jacobi_update     subtracter b_i - sum and output multiplier by 1/a_ii.
// The sub-row is registered for one clock while the x store is read, so both
// reach the multipliers together.
//
// Use: with busy low, pulse start with n (a multiple of K, K <= n <= N_MAX);
// then offer the n*n/K sub-rows of A in row-major order on a_subrow with
// a_valid (lane l holds column jK+l). A sub-row is taken in each cycle with
// a_valid && a_ready; a_ready drops when the reduce circuit falls behind
// (short rows). The new vector comes out in index order on x_valid/x_idx/
// x_data; done pulses with the last element and busy then falls. The stores
// must not be written while busy. To iterate, write x(new) back into the x
// store and start again.
// Timing: an element leaves 1 + 52 (tree) + reduce time + 25 cycles after the
// last sub-row of its row is accepted; with n >> K the datapath takes one
// sub-row per clock, 2K-1 = 15 floating-point operations per clock at K = 8.
module jacobi_top
  import fp64_pkg::*;
#(
  parameter int unsigned K           = 8,
  parameter int unsigned N_MAX       = 1024,
  parameter int unsigned MUL_LAT     = 10,
  parameter int unsigned ADD_LAT     = 14,
  parameter int unsigned RECIP_LAT   = 20,
  parameter int unsigned RED_FIFO    = 64,
  parameter int unsigned RFIFO_DEPTH = 128
) (
  input  logic                       clk,
  input  logic                       rst_n,
  // initialization of the stores
  input  logic                       x_wr_en,
  input  logic [$clog2(N_MAX)-1:0]   x_wr_addr,
  input  fp64_t                      x_wr_data,
  input  logic                       b_wr_en,
  input  logic [$clog2(N_MAX)-1:0]   b_wr_addr,
  input  fp64_t                      b_wr_data,
  // sweep control
  input  logic                       start,
  input  logic [$clog2(N_MAX+1)-1:0] n,
  output logic                       busy,
  output logic                       done,
  // matrix stream, one sub-row per clock
  input  logic                       a_valid,
  output logic                       a_ready,
  input  fp64_t [K-1:0]              a_subrow,
  // new iterate
  output logic                       x_valid,
  output logic [$clog2(N_MAX)-1:0]   x_idx,
  output fp64_t                      x_data
);

  localparam int unsigned IW = $clog2(N_MAX);
  localparam int unsigned NW = $clog2(N_MAX+1);

  // sweep bookkeeping
  logic          sweep, go;
  logic [NW-1:0] n_q, out_cnt;
  assign go   = start && !sweep;
  assign busy = sweep;
  assign done = x_valid && (NW'(out_cnt + 1'b1) == n_q);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sweep   <= 1'b0;
      n_q     <= '0;
      out_cnt <= '0;
    end else if (go) begin
      sweep   <= 1'b1;
      n_q     <= n;
      out_cnt <= '0;
    end else if (x_valid) begin
      out_cnt <= out_cnt + 1'b1;
      if (done) sweep <= 1'b0;
    end
  end

  // counters i and j
  logic                        issue, diag_valid, red_pop, ctrl_busy;
  logic [$clog2(N_MAX/K)-1:0]  x_word;
  logic [K-1:0]                zero_mask;
  logic [$clog2(K)-1:0]        diag_lane;
  logic [IW-1:0]               row;
  logic [$clog2(N_MAX/K+1)-1:0] row_len;

  jacobi_ctrl #(.K(K), .N_MAX(N_MAX), .CREDITS(RED_FIFO)) u_ctrl (
    .clk, .rst_n, .start(go), .n, .a_valid, .a_ready, .red_pop, .busy(ctrl_busy),
    .issue, .x_word, .zero_mask, .diag_valid, .diag_lane, .row, .row_len
  );

  // x store, read with counter j
  fp64_t [K-1:0] x_sub;
  x_store #(.K(K), .N_MAX(N_MAX)) u_xs (
    .clk, .wr_en(x_wr_en), .wr_addr(x_wr_addr), .wr_data(x_wr_data),
    .rd_en(issue), .rd_word(x_word), .rd_data(x_sub)
  );

  // sub-row held at the multiplier inputs while x is read
  logic          t_valid;
  fp64_t [K-1:0] t_row;
  logic [K-1:0]  t_zero;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) t_valid <= 1'b0;
    else        t_valid <= issue;
  end
  always_ff @(posedge clk) begin
    t_row  <= a_subrow;
    t_zero <= zero_mask;
  end

  // binary tree datapath
  logic  p_valid;
  fp64_t p_sum;
  tree_datapath #(.K(K), .MUL_LAT(MUL_LAT), .ADD_LAT(ADD_LAT)) u_tree (
    .clk_ip(clk), .rst_ip(!rst_n), .valid_ip(t_valid), .fp_ipr(t_row), .fp_ipx(x_sub),
    .zero_ip(t_zero), .valid_op(p_valid), .tree_opv(p_sum)
  );

  // reduce
  logic  s_valid;
  fp64_t s_sum;
  reduce_row #(.ADD_LAT(ADD_LAT), .FIFO_DEPTH(RED_FIFO), .LEN_W(16)) u_reduce (
    .clk, .rst_n, .in_valid(p_valid), .in_value(p_sum), .row_len(16'(row_len)),
    .in_pop(red_pop), .out_valid(s_valid), .out_sum(s_sum)
  );

  // a_ii into the divider
  logic  aii_valid, rcp_valid;
  fp64_t aii, rcp;
  diag_select #(.K(K)) u_diag (
    .clk, .rst_n, .sel_valid(diag_valid), .sel_lane(diag_lane), .subrow(a_subrow),
    .aii_valid, .aii
  );
  fp64_recip #(.LAT(RECIP_LAT)) u_recip (
    .clk, .rst_n, .in_valid(aii_valid), .a(aii), .out_valid(rcp_valid), .y(rcp)
  );

  // b store, subtracter and output multiplier
  logic          b_rd_en;
  logic [IW-1:0] b_rd_addr;
  fp64_t         b_rd_data;
  b_store #(.N_MAX(N_MAX)) u_bs (
    .clk, .wr_en(b_wr_en), .wr_addr(b_wr_addr), .wr_data(b_wr_data),
    .rd_en(b_rd_en), .rd_addr(b_rd_addr), .rd_data(b_rd_data)
  );

  jacobi_update #(.N_MAX(N_MAX), .ADD_LAT(ADD_LAT), .MUL_LAT(MUL_LAT),
                  .RFIFO_DEPTH(RFIFO_DEPTH)) u_upd (
    .clk, .rst_n, .restart(go), .recip_valid(rcp_valid), .recip(rcp),
    .sum_valid(s_valid), .sum(s_sum), .b_rd_en, .b_rd_addr, .b_rd_data,
    .x_valid, .x_idx, .x_val(x_data)
  );

  initial assert (RECIP_LAT < MUL_LAT + $clog2(K) * ADD_LAT)
    else $fatal(1, "the divider must be faster than the tree datapath");

endmodule
