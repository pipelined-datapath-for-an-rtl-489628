// tb_jacobi_ctrl: self-checking testbench for the row/sub-row counters
// (K = 8, N_MAX = 64, CREDITS = 4).
//
// For n = 8, 32 and 64 it offers sub-rows with random gaps and returns
// credits (red_pop) from a slow model of the reduce FIFO. Each accepted
// sub-row must carry the next (i, j) in row-major order: x word j, the zero
// mask with bit i mod 8 only in sub-row j = i/8, and diag_valid/diag_lane for
// that sub-row. No more than CREDITS sub-rows may be outstanding, a_ready must
// drop when they are (stall, counted), and busy must fall after n*n/8
// sub-rows.
module tb_jacobi_ctrl;
  localparam int K = 8, N = 64, CR = 4;
  logic clk = 1'b0, rst_n = 1'b0;
  logic start, a_valid, a_ready, red_pop, busy, issue, diag_valid;
  logic [6:0] n;
  logic [2:0] x_word, diag_lane;
  logic [7:0] zero_mask;
  logic [5:0] row;
  logic [3:0] row_len;
  int checks = 0, failures = 0, stalls = 0, outstanding = 0;
  int pop_q[$];
  int cycle = 0;

  jacobi_ctrl #(.K(K), .N_MAX(N), .CREDITS(CR)) dut (.clk, .rst_n, .start, .n, .a_valid,
    .a_ready, .red_pop, .busy, .issue, .x_word, .zero_mask, .diag_valid, .diag_lane, .row,
    .row_len);

  always #5 clk = ~clk;
  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reduce FIFO model: each issued sub-row is popped 3..12 cycles later
  always @(posedge clk) cycle <= cycle + 1;
  always_comb red_pop = (pop_q.size() != 0) && (pop_q[0] <= cycle);
  always @(posedge clk) if (rst_n) begin
    if (red_pop) void'(pop_q.pop_front());
    if (issue) pop_q.push_back(cycle + 3 + $urandom_range(9));
    outstanding <= outstanding + (issue ? 1 : 0) - (red_pop ? 1 : 0);
    if (a_valid && !a_ready && busy) stalls++;
    if (outstanding > CR) begin failures++; $display("credit overrun"); end
  end

  task automatic sweep(input int nn);
    int m = nn / K;
    int cnt = 0;
    start = 1'b1; n = 7'(nn);
    @(posedge clk); #1 start = 1'b0;
    checks++;
    if (!busy || row_len != 4'(m)) begin failures++; $display("start not taken"); end
    for (int i = 0; i < nn; i++) begin
      for (int j = 0; j < m; j++) begin
        logic [7:0] zm;
        a_valid = 1'b1;
        @(negedge clk);
        while (!issue) begin @(posedge clk); #1; @(negedge clk); end
        zm = (j == i / K) ? 8'(1 << (i % K)) : 8'h0;
        checks++;
        if (row != 6'(i) || x_word != 3'(j) || zero_mask != zm ||
            diag_valid != (j == i / K) || (diag_valid && diag_lane != 3'(i % K))) begin
          failures++;
          $display("i=%0d j=%0d: row %0d word %0d mask %b diag %b/%0d", i, j, row, x_word,
                   zero_mask, diag_valid, diag_lane);
        end
        @(posedge clk); #1;
        a_valid = 1'b0;
        cnt++;
        if ($urandom_range(4) == 0) begin @(posedge clk); #1; end
      end
    end
    checks++;
    if (busy) begin failures++; $display("busy after %0d sub-rows", cnt); end
    repeat (20) @(posedge clk);
    #1;
  endtask

  initial begin
    start = 0; n = 0; a_valid = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    sweep(8);
    sweep(32);
    sweep(64);
    checks++;
    if (stalls == 0) begin failures++; $display("no stall happened"); end
    $display("stalls=%0d", stalls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
