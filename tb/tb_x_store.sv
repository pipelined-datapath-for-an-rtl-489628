// tb_x_store: self-checking testbench for the banked x store (K = 8,
// N_MAX = 64). Writes every element with a value derived from its index,
// reads every word and checks that lane l of word w is element 8w+l and that
// the data appears one clock after the read request; then overwrites random
// elements and rereads.
module tb_x_store;
  import fp64_pkg::*;
  localparam int K = 8, N = 64;
  logic clk = 1'b0;
  logic wr_en, rd_en;
  logic [5:0] wr_addr;
  logic [2:0] rd_word;
  fp64_t wr_data;
  fp64_t [K-1:0] rd_data;
  fp64_t model [N];
  int checks = 0, failures = 0;

  x_store #(.K(K), .N_MAX(N)) dut (.clk, .wr_en, .wr_addr, .wr_data, .rd_en, .rd_word, .rd_data);

  always #5 clk = ~clk;
  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic wr(input int a, input fp64_t d);
    wr_en = 1'b1; wr_addr = 6'(a); wr_data = d; model[a] = d;
    @(posedge clk); #1 wr_en = 1'b0;
  endtask

  task automatic check_word(input int w);
    rd_en = 1'b1; rd_word = 3'(w);
    @(posedge clk); #1 rd_en = 1'b0;
    for (int l = 0; l < K; l++) begin
      checks++;
      if (rd_data[l] !== model[w*K+l]) begin
        failures++;
        $display("word %0d lane %0d: %h expected %h", w, l, rd_data[l], model[w*K+l]);
      end
    end
  endtask

  initial begin
    wr_en = 0; rd_en = 0; wr_addr = 0; rd_word = 0; wr_data = 0;
    @(posedge clk); #1;
    for (int a = 0; a < N; a++) wr(a, {32'hC0DE_0000 | 32'(a), $urandom()});
    for (int w = 0; w < N / K; w++) check_word(w);
    for (int r = 0; r < 40; r++) wr($urandom_range(N - 1), {$urandom(), $urandom()});
    for (int w = N / K - 1; w >= 0; w--) check_word(w);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
