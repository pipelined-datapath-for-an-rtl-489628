// tree_datapath: the binary tree datapath of the Jacobi solver.
//
// Each clock it takes one sub-row of A (k consecutive elements a_ij..a_ij+k-1)
// together with the matching k elements of x, forms the k products in k
// pipelined binary64 multipliers, and sums them in a balanced binary tree of
// k-1 pipelined adders arranged in lg(k) levels. It therefore emits one
// partial sum per clock, and 2k-1 floating-point operations are performed
// per clock (15 for k = 8).
//
// Lanes named in zero_ip have both their multiplier operands replaced by +0,
// so the product a_ii*x_i of the diagonal element contributes nothing to the
// row sum (this is how the row counter removes the j = i term of the Jacobi
// sum; forcing both operands keeps an infinite x_i from producing a NaN).
//
// Interface (port names follow the signal names of the simulation trace:
// clk_ip, valid_ip, fp_ipr, valid_op, tree_opv; fp_ipx, zero_ip and rst_ip
// are this design's names): lane l of fp_ipr/fp_ipx/zero_ip holds column
// j+l. The datapath never stalls.
// Timing: latency is MUL_LAT + lg(k)*ADD_LAT = 10 + 3*14 = 52 cycles for
// k = 8, as in the reference design; a new sub-row may enter every clock.
module tree_datapath
  import fp64_pkg::*;
#(
  parameter int unsigned K       = 8,
  parameter int unsigned MUL_LAT = 10,
  parameter int unsigned ADD_LAT = 14
) (
  input  logic                clk_ip,
  input  logic                rst_ip,     // asynchronous reset, active high
  input  logic                valid_ip,
  input  fp64_t [K-1:0]       fp_ipr,     // a_ij .. a_i,j+K-1
  input  fp64_t [K-1:0]       fp_ipx,     // x_j  .. x_j+K-1
  input  logic  [K-1:0]       zero_ip,    // lanes whose product is forced to zero
  output logic                valid_op,
  output fp64_t               tree_opv
);

  localparam int unsigned LEVELS = $clog2(K);
  localparam int unsigned LATENCY = MUL_LAT + LEVELS * ADD_LAT;

  // heap-ordered nodes: leaves K..2K-1 are the products, node 1 is the root
  fp64_t node   [1:2*K-1];
  logic  node_v [1:2*K-1];

  logic rst_n;
  assign rst_n = !rst_ip;

  for (genvar l = 0; l < int'(K); l++) begin : g_mul
    fp64_t a_in, x_in;
    assign a_in = zero_ip[l] ? FP64_ZERO : fp_ipr[l];
    assign x_in = zero_ip[l] ? FP64_ZERO : fp_ipx[l];
    fp64_mul #(.LAT(MUL_LAT)) u_mul (
      .clk(clk_ip), .rst_n, .in_valid(valid_ip),
      .a(a_in), .b(x_in), .out_valid(node_v[K+l]), .y(node[K+l])
    );
  end

  for (genvar n = 1; n < int'(K); n++) begin : g_add
    fp64_add #(.LAT(ADD_LAT)) u_add (
      .clk(clk_ip), .rst_n, .in_valid(node_v[2*n]),
      .a(node[2*n]), .b(node[2*n+1]), .out_valid(node_v[n]), .y(node[n])
    );
  end

  assign valid_op = node_v[1];
  assign tree_opv = node[1];

  initial begin
    assert (K >= 2 && (K & (K - 1)) == 0) else $fatal(1, "K must be a power of two, at least 2");
    assert (LATENCY == MUL_LAT + LEVELS * ADD_LAT);
  end

endmodule
