// b_store: on-chip store for the right-hand side b.
//
// N_MAX binary64 words, written one element at a time during initialization
// and read one element per clock, b_i for the subtracter.
// Interface: wr_en/wr_addr/wr_data write; rd_en with rd_addr gives rd_data
// one clock later (synchronous read). N_MAX is this design's choice.
module b_store
  import fp64_pkg::*;
#(
  parameter int unsigned N_MAX = 1024
) (
  input  logic                     clk,
  input  logic                     wr_en,
  input  logic [$clog2(N_MAX)-1:0] wr_addr,
  input  fp64_t                    wr_data,
  input  logic                     rd_en,
  input  logic [$clog2(N_MAX)-1:0] rd_addr,
  output fp64_t                    rd_data
);

  fp64_t mem [N_MAX];

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_addr] <= wr_data;
    if (rd_en) rd_data <= mem[rd_addr];
  end

endmodule
