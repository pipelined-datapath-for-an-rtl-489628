// tb_jacobi_top: end-to-end testbench of the Jacobi sweep engine at K = 8
// with a reduced store size (N_MAX = 64).
//
// 1. Exact sweeps (integer data, power-of-two diagonal) for n = 8, 16, 32
//    and 64, with and without gaps in the matrix stream: every element of
//    x(new) must equal the reference bit for bit, in index order, with done on
//    the last one.
// 2. Jacobi iteration on a diagonally dominant 64x64 system whose solution
//    x* is known (b = A x*): 25 sweeps, each result written back into the x
//    store, each checked against a sequential reference; at the end x must be
//    within 1e-9 of x*.
// Mechanisms counted and required: stalls of the matrix stream by the
// reduce credit limit, gaps from the host, diagonal lanes zeroed, rows
// reduced from several partial sums.
module tb_jacobi_top;
  import fp64_pkg::*;
  localparam int K = 8, NMAX = 64;

  logic clk = 1'b0, rst_n = 1'b0;
  logic x_wr_en, b_wr_en, start, busy, done, a_valid, a_ready, x_valid;
  logic [5:0] x_wr_addr, b_wr_addr, x_idx;
  fp64_t x_wr_data, b_wr_data, x_data;
  logic [6:0] n;
  fp64_t [K-1:0] a_subrow;
  int checks = 0, failures = 0;

  jacobi_top #(.K(K), .N_MAX(NMAX)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  `include "tb/jacobi_host.svh"

  initial begin
    real xs [NMAX];
    real err;
    x_wr_en = 0; b_wr_en = 0; start = 0; a_valid = 0; n = 0;
    x_wr_addr = 0; b_wr_addr = 0; x_wr_data = 0; b_wr_data = 0; a_subrow = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;

    foreach (xs[e]) xs[e] = 0.0;
    for (int r = 0; r < 2; r++)
      for (int nn = 8; nn <= NMAX; nn *= 2) begin
        init_exact(nn);
        sweep(0, nn, 32'(nn + 17 * r), r == 1, 0.0);
      end

    // Jacobi iteration towards a known solution
    for (int e = 0; e < NMAX; e++) xs[e] = real'(int'($urandom_range(2000)) - 1000) / 100.0;
    for (int i = 0; i < NMAX; i++) begin
      b_vec[i] = 0.0;
      for (int j = 0; j < NMAX; j++) b_vec[i] += a_elem(1, i, j, NMAX, 99) * xs[j];
      x_cur[i] = 0.0;
    end
    for (int it = 0; it < 25; it++) sweep(1, NMAX, 99, 1'b1, 1e-12);
    err = 0.0;
    for (int e = 0; e < NMAX; e++) begin
      real d;
      d = x_cur[e] - xs[e];
      if (d < 0.0) d = -d;
      if (d > err) err = d;
    end
    checks++;
    if (err > 1e-9) begin failures++; $display("iteration did not converge: max error %g", err); end

    $display("sweeps=%0d stalls=%0d gaps=%0d zeroed=%0d multi_rows=%0d max_error=%g",
             sweeps, stalls, gaps, zeroed, multi_rows, err);
    checks++;
    if (stalls == 0 || gaps == 0 || zeroed == 0 || multi_rows == 0) begin
      failures++;
      $display("a mechanism never happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
