// jacobi_ctrl: the row counter i and sub-row counter j of the Jacobi solver.
//
// After start, with the vector length n (a multiple of K, K <= n <= N_MAX)
// the controller dispatches the matrix row by row, each row as m = n/K
// sub-rows of K elements, one sub-row per clock when one is offered on the
// A input (a_valid) and the reduce FIFO has room. For every dispatched
// sub-row it gives:
//   - x_word = j, the x store word holding x_jK .. x_jK+K-1;
//   - zero_mask, with bit (i mod K) set in the sub-row j = i/K that holds the
//     diagonal element, so that a_ii*x_i is left out of the row sum;
//   - diag_valid/diag_lane, so the a_ii value can be taken for the divider.
// j runs 0..m-1 and then i advances; after the last sub-row of row n-1 the
// controller returns to idle.
//
// Flow control (this design's own): the reduce circuit may fall behind the
// tree when rows are short, so the controller counts the sub-rows dispatched
// whose partial sum has not yet left the reduce FIFO (red_pop) and stops
// dispatching (a_ready low) when CREDITS are out. CREDITS must not exceed
// the reduce FIFO depth.
// Timing: issue is combinational from a_valid in the cycle the sub-row is
// accepted (a_valid && a_ready).
module jacobi_ctrl #(
  parameter int unsigned K       = 8,
  parameter int unsigned N_MAX   = 1024,
  parameter int unsigned CREDITS = 64
) (
  input  logic                           clk,
  input  logic                           rst_n,
  input  logic                           start,
  input  logic [$clog2(N_MAX+1)-1:0]     n,
  input  logic                           a_valid,
  output logic                           a_ready,
  input  logic                           red_pop,
  output logic                           busy,
  output logic                           issue,
  output logic [$clog2(N_MAX/K)-1:0]     x_word,
  output logic [K-1:0]                   zero_mask,
  output logic                           diag_valid,
  output logic [$clog2(K)-1:0]           diag_lane,
  output logic [$clog2(N_MAX)-1:0]       row,
  output logic [$clog2(N_MAX/K+1)-1:0]   row_len
);

  localparam int unsigned LW = $clog2(K);
  localparam int unsigned JW = $clog2(N_MAX/K);
  localparam int unsigned IW = $clog2(N_MAX);

  logic [IW-1:0] i_q;
  logic [JW-1:0] j_q;
  logic [$clog2(N_MAX/K+1)-1:0] m_q;
  logic [IW-1:0] last_row;
  logic [$clog2(CREDITS+1)-1:0] outstanding;
  logic run;

  assign a_ready    = run && (outstanding < ($clog2(CREDITS+1))'(CREDITS));
  assign issue      = a_valid && a_ready;
  assign x_word     = j_q;
  assign row        = i_q;
  assign row_len    = m_q;
  assign busy       = run;
  assign diag_lane  = i_q[LW-1:0];
  assign diag_valid = issue && (j_q == i_q[IW-1:LW]);

  always_comb begin
    zero_mask = '0;
    if (j_q == i_q[IW-1:LW]) zero_mask[i_q[LW-1:0]] = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      run         <= 1'b0;
      i_q         <= '0;
      j_q         <= '0;
      m_q         <= ($clog2(N_MAX/K+1))'(1);
      last_row    <= '0;
      outstanding <= '0;
    end else begin
      outstanding <= outstanding + (issue ? 1'b1 : 1'b0) - (red_pop ? 1'b1 : 1'b0);
      if (start && !run) begin
        run      <= 1'b1;
        i_q      <= '0;
        j_q      <= '0;
        m_q      <= ($clog2(N_MAX/K+1))'(n >> LW);
        last_row <= IW'(n - 1'b1);
      end else if (issue) begin
        if (JW'(j_q + 1'b1) == JW'(m_q) || m_q == ($clog2(N_MAX/K+1))'(1)) begin
          j_q <= '0;
          i_q <= i_q + 1'b1;
          if (i_q == last_row) run <= 1'b0;
        end else begin
          j_q <= j_q + 1'b1;
        end
      end
    end
  end

  a_n_ok: assert property (@(posedge clk) disable iff (!rst_n)
    (start && !run) |-> (n >= ($clog2(N_MAX+1))'(K) && n <= ($clog2(N_MAX+1))'(N_MAX)
                         && n[LW-1:0] == '0));
  a_credit: assert property (@(posedge clk) disable iff (!rst_n)
    outstanding <= ($clog2(CREDITS+1))'(CREDITS));

endmodule
