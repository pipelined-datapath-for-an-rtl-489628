// tb_tree_datapath: self-checking testbench for the binary tree datapath at
// k = 8.
//
// Feeds random sub-rows (one per clock, with occasional gaps) and random
// zeroed lanes. The expected partial sum is formed with the simulator's
// binary64 arithmetic in the same pairwise order as the hardware tree
// (lanes 0+1, 2+3, ... then pairs of those), so results must match bit for
// bit. Each result must appear exactly 10 + 3*14 = 52 cycles after its
// sub-row, and a new one may follow every clock.
module tb_tree_datapath;
  import fp64_pkg::*;

  localparam int unsigned K = 8;
  localparam int unsigned LATENCY = 52;
  localparam int NVEC = 1500;

  logic clk = 1'b0, rst = 1'b1;
  logic valid_ip;
  fp64_t [K-1:0] fp_ipr, fp_ipx;
  logic  [K-1:0] zero_ip;
  logic valid_op;
  fp64_t tree_opv;
  int checks = 0, failures = 0, cycle = 0, back_to_back = 0, zeroed = 0;

  tree_datapath #(.K(K)) dut (.clk_ip(clk), .rst_ip(rst), .valid_ip, .fp_ipr, .fp_ipx,
                              .zero_ip, .valid_op, .tree_opv);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  fp64_t exp_q[$];
  int    cyc_q[$];

  function automatic fp64_t rnd_fp();
    return {1'($urandom()), 11'(900 + $urandom_range(250)), 20'($urandom()), 32'($urandom())};
  endfunction

  function automatic fp64_t model(input fp64_t [K-1:0] r, input fp64_t [K-1:0] x,
                                  input logic [K-1:0] z);
    real v [2*K];
    for (int l = 0; l < int'(K); l++)
      v[K+l] = z[l] ? 0.0 : $bitstoreal(r[l]) * $bitstoreal(x[l]);
    for (int n = int'(K) - 1; n >= 1; n--) v[n] = v[2*n] + v[2*n+1];
    return $realtobits(v[1]);
  endfunction

  always @(posedge clk) begin
    if (!rst && valid_op) begin
      fp64_t e;
      int c;
      checks++;
      if (exp_q.size() == 0) begin
        failures++;
        $display("unexpected output");
      end else begin
        e = exp_q.pop_front();
        c = cyc_q.pop_front();
        if (tree_opv !== e) begin
          failures++;
          if (failures < 10) $display("mismatch: got %h expected %h", tree_opv, e);
        end
        if (cycle - c != int'(LATENCY)) begin
          failures++;
          if (failures < 10) $display("latency %0d expected %0d", cycle - c, LATENCY);
        end
      end
    end
  end

  initial begin
    int last = -10;
    valid_ip = 1'b0; fp_ipr = '0; fp_ipx = '0; zero_ip = '0;
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    @(posedge clk); #1;
    for (int n = 0; n < NVEC; n++) begin
      for (int l = 0; l < int'(K); l++) begin
        fp_ipr[l] = rnd_fp();
        fp_ipx[l] = rnd_fp();
      end
      zero_ip = '0;
      if ($urandom_range(3) == 0) begin
        zero_ip[$urandom_range(K - 1)] = 1'b1;
        fp_ipx[$urandom_range(K - 1)] = 64'h7FF0_0000_0000_0000; // may hit the zeroed lane
        zeroed++;
      end
      valid_ip = 1'b1;
      if (cycle == last + 1) back_to_back++;
      last = cycle;
      exp_q.push_back(model(fp_ipr, fp_ipx, zero_ip));
      cyc_q.push_back(cycle);
      @(posedge clk); #1;
      valid_ip = 1'b0;
      if ($urandom_range(7) == 0) begin @(posedge clk); #1; end
    end
    repeat (LATENCY + 5) @(posedge clk);
    if (exp_q.size() != 0) begin
      failures++;
      $display("%0d results missing", exp_q.size());
    end
    if (back_to_back == 0 || zeroed == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
