// diag_select: picks the diagonal element a_ii out of a dispatched sub-row.
//
// In the sub-row that holds column i, the row counter marks the lane
// i mod K (sel_valid, sel_lane). This multiplexer takes that lane's element
// and presents it to the divider that forms 1/a_ii, one clock later
// (registered output), so that the divider sees one operand per row, in row
// order.
module diag_select
  import fp64_pkg::*;
#(
  parameter int unsigned K = 8
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 sel_valid,
  input  logic [$clog2(K)-1:0] sel_lane,
  input  fp64_t [K-1:0]        subrow,
  output logic                 aii_valid,
  output fp64_t                aii
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      aii_valid <= 1'b0;
      aii       <= FP64_ZERO;
    end else begin
      aii_valid <= sel_valid;
      if (sel_valid) aii <= subrow[sel_lane];
    end
  end

endmodule
