// tb_jacobi_top_full: one complete Jacobi sweep at the default sizes
// (K = 8, N_MAX = 1024): a 1024x1024 exact-integer system (see
// jacobi_host.svh), every element of x(new) checked bit for bit, plus the
// sustained rate: with 128 sub-rows per row the matrix stream must be
// accepted on at least 90% of the cycles of the sweep.
module tb_jacobi_top_full;
  import fp64_pkg::*;
  localparam int K = 8, NMAX = 1024;

  logic clk = 1'b0, rst_n = 1'b0;
  logic x_wr_en, b_wr_en, start, busy, done, a_valid, a_ready, x_valid;
  logic [9:0] x_wr_addr, b_wr_addr, x_idx;
  fp64_t x_wr_data, b_wr_data, x_data;
  logic [10:0] n;
  fp64_t [K-1:0] a_subrow;
  int checks = 0, failures = 0;

  jacobi_top dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (1000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  `include "tb/jacobi_host.svh"

  int cyc = 0, accepted = 0;
  always @(posedge clk) begin
    if (busy) cyc++;
    if (a_valid && a_ready) accepted++;
  end

  initial begin
    x_wr_en = 0; b_wr_en = 0; start = 0; a_valid = 0; n = 0;
    x_wr_addr = 0; b_wr_addr = 0; x_wr_data = 0; b_wr_data = 0; a_subrow = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    init_exact(NMAX);
    sweep(0, NMAX, 7, 1'b0, 0.0);
    $display("sub-rows=%0d busy cycles=%0d stalls=%0d", accepted, cyc, stalls);
    checks++;
    if (accepted != NMAX * NMAX / K || accepted * 10 < cyc * 9) begin
      failures++;
      $display("sustained rate too low");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
