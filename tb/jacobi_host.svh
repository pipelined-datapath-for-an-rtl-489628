// jacobi_host.svh: test-bench host side shared by the jacobi_top testbenches.
// Included inside a testbench module that declares the DUT signals (clk,
// rst_n, x_wr_*, b_wr_*, start, n, busy, done, a_valid, a_ready, a_subrow,
// x_valid, x_idx, x_data), the localparams K and NMAX and the counters
// checks/failures.
//
// Test matrices are produced by a_elem() from a hash of (i, j, seed), so no
// matrix is stored. Mode 0 ("exact"): off-diagonal entries are integers in
// -3..3, diagonal entries are +-1, 2, 4 or 8, x and b are integers, so every
// product, sum, and the final scaling by 1/a_ii is exact in binary64 whatever
// the order of additions; results must match bit for bit. Mode 1
// ("iterative"): real-valued, strictly diagonally dominant matrix, checked
// against a sequential reference within a rounding tolerance.

int stalls = 0, gaps = 0, zeroed = 0, multi_rows = 0, sweeps = 0;

function automatic int unsigned hash3(input int unsigned i, input int unsigned j,
                                      input int unsigned s);
  int unsigned h;
  h = i * 32'h9E37_79B1 ^ j * 32'h85EB_CA77 ^ s * 32'hC2B2_AE3D;
  h ^= h >> 15; h *= 32'h2C1B_3C6D; h ^= h >> 12; h *= 32'h297A_2D39; h ^= h >> 15;
  return h;
endfunction

function automatic real a_elem(input int mode, input int i, input int j, input int nn,
                               input int unsigned seed);
  int unsigned h;
  h = hash3(i, j, seed);
  if (mode == 0) begin
    if (i == j) return ((h & 1) != 0 ? -1.0 : 1.0) * real'(1 << ((h >> 1) % 4));
    return real'(int'(h % 7) - 3);
  end
  if (i == j) return 0.6 * real'(nn) + real'(h % 100) / 100.0;
  return (real'(h % 1000) - 500.0) / 1000.0;
endfunction

real x_cur [NMAX];
real b_vec [NMAX];
real x_ref [NMAX];

task automatic load_vectors(input int nn);
  for (int e = 0; e < nn; e++) begin
    @(negedge clk);
    x_wr_en = 1'b1; x_wr_addr = ($clog2(NMAX))'(e); x_wr_data = $realtobits(x_cur[e]);
    b_wr_en = 1'b1; b_wr_addr = ($clog2(NMAX))'(e); b_wr_data = $realtobits(b_vec[e]);
  end
  @(negedge clk);
  x_wr_en = 1'b0; b_wr_en = 1'b0;
endtask

// one sweep; returns the new vector in x_cur. tol = 0 asks for exact results.
task automatic sweep(input int mode, input int nn, input int unsigned seed, input bit gappy,
                     input real tol);
  int m, got;
  real bound [NMAX];
  m = nn / K;
  for (int i = 0; i < nn; i++) begin
    real s, sa;
    s = 0.0; sa = 0.0;
    for (int j = 0; j < nn; j++) if (j != i) begin
      s  += a_elem(mode, i, j, nn, seed) * x_cur[j];
      sa += (a_elem(mode, i, j, nn, seed) * x_cur[j] < 0.0) ? -a_elem(mode, i, j, nn, seed) * x_cur[j]
                                                            :  a_elem(mode, i, j, nn, seed) * x_cur[j];
    end
    x_ref[i] = (b_vec[i] - s) / a_elem(mode, i, i, nn, seed);
    bound[i] = tol * (sa + (b_vec[i] < 0.0 ? -b_vec[i] : b_vec[i])) /
               (a_elem(mode, i, i, nn, seed) < 0.0 ? -a_elem(mode, i, i, nn, seed) : a_elem(mode, i, i, nn, seed));
  end
  load_vectors(nn);
  @(negedge clk);
  start = 1'b1; n = ($clog2(NMAX+1))'(nn);
  @(negedge clk);
  start = 1'b0;
  if (m > 1) multi_rows += nn;
  got = 0;
  fork
    begin : feed
      for (int i = 0; i < nn; i++)
        for (int j = 0; j < m; j++) begin
          if (gappy && $urandom_range(9) == 0) begin
            a_valid = 1'b0; gaps++;
            @(negedge clk);
          end
          for (int l = 0; l < K; l++) a_subrow[l] = $realtobits(a_elem(mode, i, j * K + l, nn, seed));
          a_valid = 1'b1;
          @(posedge clk);
          while (!a_ready) begin stalls++; @(posedge clk); end
          if (j == i / K) zeroed++;
          @(negedge clk);
          a_valid = 1'b0;
        end
    end
    begin : collect
      while (got < nn) begin
        @(posedge clk);
        if (x_valid) begin
          real v, d;
          checks++;
          v = $bitstoreal(x_data);
          d = v - x_ref[got];
          if (d < 0.0) d = -d;
          if (int'(x_idx) != got || (tol == 0.0 ? (v != x_ref[got]) : (d > bound[got]))) begin
            failures++;
            if (failures < 10)
              $display("sweep n=%0d: element %0d (idx %0d) = %g, expected %g", nn, got,
                       x_idx, v, x_ref[got]);
          end
          if (done != (got == nn - 1)) begin
            failures++;
            $display("done flag wrong at element %0d", got);
          end
          x_cur[got] = v;
          got++;
        end
      end
    end
  join
  @(negedge clk);
  checks++;
  if (busy) begin failures++; $display("still busy after sweep"); end
  sweeps++;
endtask

task automatic init_exact(input int nn);
  for (int e = 0; e < nn; e++) begin
    x_cur[e] = real'(int'($urandom_range(16)) - 8);
    b_vec[e] = real'(int'($urandom_range(200)) - 100);
  end
endtask
