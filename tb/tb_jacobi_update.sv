// tb_jacobi_update: self-checking testbench for the subtracter / output
// multiplier stage (N_MAX = 64).
//
// A sweep of 64 rows: reciprocals are pushed first (some early, the rest
// interleaved), then row sums arrive with random gaps. The b store is modelled
// here with a one-clock read. Each output must be x_i = (b_i - sum_i) * r_i
// computed with the simulator's binary64 arithmetic (bit exact), carry index
// i in order, and appear 1 + 14 + 10 = 25 cycles after its row sum.
module tb_jacobi_update;
  import fp64_pkg::*;
  localparam int N = 64, LAT = 25;
  logic clk = 1'b0, rst_n = 1'b0;
  logic restart, recip_valid, sum_valid, b_rd_en, x_valid;
  fp64_t recip, sum, b_rd_data, x_val;
  logic [5:0] b_rd_addr, x_idx;
  fp64_t bmem [N];
  fp64_t rmem [N];
  int checks = 0, failures = 0, cycle = 0;
  fp64_t exp_q[$];
  int cyc_q[$];
  int idx_q[$];

  jacobi_update #(.N_MAX(N)) dut (.clk, .rst_n, .restart, .recip_valid, .recip, .sum_valid,
    .sum, .b_rd_en, .b_rd_addr, .b_rd_data, .x_valid, .x_idx, .x_val);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;
  always @(posedge clk) if (b_rd_en) b_rd_data <= bmem[b_rd_addr];

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic fp64_t rnd_fp();
    return {1'($urandom()), 11'(950 + $urandom_range(150)), 20'($urandom()), 32'($urandom())};
  endfunction

  always @(posedge clk) if (rst_n && x_valid) begin
    checks++;
    if (exp_q.size() == 0) begin failures++; $display("unexpected output"); end
    else begin
      fp64_t e;
      int c, i;
      e = exp_q.pop_front();
      c = cyc_q.pop_front();
      i = idx_q.pop_front();
      if (x_val !== e || x_idx != 6'(i) || cycle - c != LAT) begin
        failures++;
        $display("row %0d: got %h idx %0d after %0d, expected %h after %0d", i, x_val, x_idx,
                 cycle - c, e, LAT);
      end
    end
  end

  initial begin
    int rp = 0;
    restart = 0; recip_valid = 0; sum_valid = 0; recip = 0; sum = 0;
    for (int i = 0; i < N; i++) begin
      bmem[i] = rnd_fp();
      rmem[i] = rnd_fp();
    end
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int pass = 0; pass < 2; pass++) begin
      restart = 1'b1;
      @(posedge clk); #1 restart = 1'b0;
      rp = 0;
      for (int k = 0; k < 10; k++) begin
        recip_valid = 1'b1; recip = rmem[rp++];
        @(posedge clk); #1;
      end
      recip_valid = 1'b0;
      for (int i = 0; i < N; i++) begin
        real d;
        sum = rnd_fp();
        sum_valid = 1'b1;
        if (rp < N) begin recip_valid = 1'b1; recip = rmem[rp++]; end
        d = $bitstoreal(bmem[i]) - $bitstoreal(sum);
        exp_q.push_back($realtobits(d * $bitstoreal(rmem[i])));
        cyc_q.push_back(cycle);
        idx_q.push_back(i);
        @(posedge clk); #1;
        sum_valid = 1'b0; recip_valid = 1'b0;
        if ($urandom_range(3) == 0) begin @(posedge clk); #1; end
      end
      repeat (LAT + 5) @(posedge clk);
      #1;
    end
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("outputs missing"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
