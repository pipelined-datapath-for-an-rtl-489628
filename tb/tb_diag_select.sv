// tb_diag_select: self-checking testbench for the a_ii multiplexer (K = 8).
// Presents random sub-rows with a random selected lane and checks that the
// chosen element appears, valid, one clock later, and that nothing is valid
// when no lane is selected.
module tb_diag_select;
  import fp64_pkg::*;
  localparam int K = 8;
  logic clk = 1'b0, rst_n = 1'b0;
  logic sel_valid, aii_valid;
  logic [2:0] sel_lane;
  fp64_t [K-1:0] subrow;
  fp64_t aii, expect_v;
  logic expect_valid;
  int checks = 0, failures = 0;

  diag_select #(.K(K)) dut (.clk, .rst_n, .sel_valid, .sel_lane, .subrow, .aii_valid, .aii);

  always #5 clk = ~clk;
  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    sel_valid = 0; sel_lane = 0; subrow = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int t = 0; t < 500; t++) begin
      for (int l = 0; l < K; l++) subrow[l] = {$urandom(), $urandom()};
      sel_valid = 1'($urandom_range(1));
      sel_lane  = 3'($urandom_range(K - 1));
      expect_valid = sel_valid;
      expect_v = subrow[sel_lane];
      @(posedge clk); #1;
      checks++;
      if (aii_valid !== expect_valid || (expect_valid && aii !== expect_v)) begin
        failures++;
        $display("t=%0d valid %b value %h, expected %b %h", t, aii_valid, aii, expect_valid, expect_v);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
