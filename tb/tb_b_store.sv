// tb_b_store: self-checking testbench for the b store (N_MAX = 64). Writes
// random values, reads each address in random order and checks the value
// one clock after the request.
module tb_b_store;
  import fp64_pkg::*;
  localparam int N = 64;
  logic clk = 1'b0;
  logic wr_en, rd_en;
  logic [5:0] wr_addr, rd_addr;
  fp64_t wr_data, rd_data;
  fp64_t model [N];
  int checks = 0, failures = 0;

  b_store #(.N_MAX(N)) dut (.clk, .wr_en, .wr_addr, .wr_data, .rd_en, .rd_addr, .rd_data);

  always #5 clk = ~clk;
  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wr_en = 0; rd_en = 0; wr_addr = 0; rd_addr = 0; wr_data = 0;
    @(posedge clk); #1;
    for (int pass = 0; pass < 3; pass++) begin
      for (int a = 0; a < N; a++) begin
        wr_en = 1'b1; wr_addr = 6'(a); wr_data = {$urandom(), $urandom()}; model[a] = wr_data;
        @(posedge clk); #1;
      end
      wr_en = 1'b0;
      for (int r = 0; r < 2 * N; r++) begin
        int a;
        a = $urandom_range(N - 1);
        rd_en = 1'b1; rd_addr = 6'(a);
        @(posedge clk); #1 rd_en = 1'b0;
        checks++;
        if (rd_data !== model[a]) begin
          failures++;
          $display("addr %0d: %h expected %h", a, rd_data, model[a]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
