// x_store: on-chip store for the current iterate x(delta).
//
// The vector is held in K banks; element e lives in bank e mod K at word
// e / K, so the K consecutive elements x_jK .. x_jK+K-1 that one sub-row
// needs are read in a single clock, one from each bank. Elements are written
// one at a time during initialization.
// Interface: wr_en/wr_addr/wr_data write element wr_addr. rd_en with word
// address rd_word (the sub-row counter j) gives rd_data one clock later
// (synchronous read, as a block RAM does); lane l of rd_data is x_{jK+l}.
// N_MAX, the largest vector held, is this design's choice; it must be a
// multiple of K.
module x_store
  import fp64_pkg::*;
#(
  parameter int unsigned K     = 8,
  parameter int unsigned N_MAX = 1024
) (
  input  logic                              clk,
  input  logic                              wr_en,
  input  logic [$clog2(N_MAX)-1:0]          wr_addr,
  input  fp64_t                             wr_data,
  input  logic                              rd_en,
  input  logic [$clog2(N_MAX/K)-1:0]        rd_word,
  output fp64_t [K-1:0]                     rd_data
);

  localparam int unsigned WORDS = N_MAX / K;
  localparam int unsigned LW    = $clog2(K);

  for (genvar l = 0; l < int'(K); l++) begin : g_bank
    fp64_t bank [WORDS];
    always_ff @(posedge clk) begin
      if (wr_en && wr_addr[LW-1:0] == LW'(l)) bank[wr_addr[$clog2(N_MAX)-1:LW]] <= wr_data;
      if (rd_en) rd_data[l] <= bank[rd_word];
    end
  end

  initial assert (N_MAX % K == 0 && K >= 2 && (K & (K - 1)) == 0)
    else $fatal(1, "N_MAX must be a multiple of K, K a power of two");

endmodule
