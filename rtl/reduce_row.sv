// reduce_row: the reduce circuit. It sums the stream of partial sums that the
// tree datapath emits for each matrix row (row_len values, one per sub-row)
// into the row sum  sum_j a_ij x_j, using a single pipelined adder, and
// accepts up to one partial sum per clock.
//
// How it works: arriving partial sums wait in an input FIFO. Every operand
// carries a one-bit row tag, so two rows can be in progress: the row taking
// inputs and the row before it, still draining its last additions. Each clock
// the circuit looks at the FIFO head, the value leaving the adder (with its
// tag, carried in a delay line beside the adder) and one holding register per
// tag. Two operands of the same row go into the adder: FIFO head with adder
// output, else adder output with its row's register, else FIFO head with its
// row's register. A lone operand is parked in its row's register. If the FIFO
// head can neither be added nor parked it stays in the FIFO for a clock. A
// row is emitted when all its inputs have been taken, none of its additions
// is in flight and one value is left. Rows are emitted in order; a third row
// cannot start until the oldest has been emitted.
// The controller must not have more than FIFO_DEPTH partial sums between its
// dispatch and this FIFO's output; in_pop reports each one that leaves.
//
// The dedicated reduction circuits the Jacobi datapath was designed for are
// published separately and are not reproduced here; this is a simple
// single-adder circuit built for this design. It adds in an order that
// depends on timing, so sums equal a sequential sum only up to rounding.
//
// Timing: the row sum appears about ADD_LAT*(1+lg min(m, ADD_LAT)) cycles
// after the last of m > 1 inputs, and in the next clock for m = 1. Input is
// taken every clock except when the draining row's register and the new row's
// register are both full and the adder is busy, which happens a few cycles per
// row; rows of one partial sum go through back to back.
module reduce_row
  import fp64_pkg::*;
#(
  parameter int unsigned ADD_LAT    = 14,
  parameter int unsigned FIFO_DEPTH = 64,
  parameter int unsigned LEN_W      = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,   // partial sum from the tree
  input  fp64_t            in_value,
  input  logic [LEN_W-1:0] row_len,    // partial sums per row (n/k), >= 1, constant during a run
  output logic             in_pop,     // a partial sum left the input FIFO
  output logic             out_valid,  // row sum ready
  output fp64_t            out_sum
);

  fp64_t fifo_dout;
  logic  fifo_empty, fifo_full;
  logic [$clog2(FIFO_DEPTH+1)-1:0] fifo_count;

  sync_fifo #(.W(64), .DEPTH(FIFO_DEPTH)) u_fifo (
    .clk, .rst_n, .push(in_valid), .din(in_value), .pop(in_pop),
    .dout(fifo_dout), .empty(fifo_empty), .full(fifo_full), .count(fifo_count)
  );

  // two row contexts, told apart by a tag bit: the row taking inputs and,
  // possibly, the row before it that is still draining
  logic             buf_v   [2];
  fp64_t            buf_val [2];
  logic             open_q  [2];             // row of this tag has inputs and is not emitted
  logic [$clog2(ADD_LAT+2)-1:0] inflight [2]; // additions issued per tag, result not yet seen
  logic             in_tag, head, row_full;
  logic [LEN_W-1:0] taken;                   // inputs of the input row taken so far

  logic  add_in_v, add_out_v, add_tag, out_tag;
  fp64_t add_a, add_b, add_y;

  fp64_add #(.LAT(ADD_LAT)) u_add (
    .clk, .rst_n, .in_valid(add_in_v), .a(add_a), .b(add_b),
    .out_valid(add_out_v), .y(add_y)
  );
  delay_line #(.W(1), .LAT(ADD_LAT)) u_tag (.clk, .d(add_tag), .q(out_tag));

  // operand selection
  logic in_avail, t_in, use_in, park_out, park_in, clr_out_buf, clr_in_buf;
  logic emit;

  always_comb begin
    in_avail    = !fifo_empty && (!row_full || !open_q[!in_tag]);
    t_in        = row_full ? !in_tag : in_tag;
    add_in_v    = 1'b0;
    add_tag     = out_tag;
    add_a       = add_y;
    add_b       = buf_val[out_tag];
    use_in      = 1'b0;
    park_out    = 1'b0;
    park_in     = 1'b0;
    clr_out_buf = 1'b0;
    clr_in_buf  = 1'b0;
    if (add_out_v) begin
      if (in_avail && t_in == out_tag) begin
        add_in_v = 1'b1; add_a = fifo_dout; add_b = add_y; use_in = 1'b1;
      end else if (buf_v[out_tag]) begin
        add_in_v = 1'b1; clr_out_buf = 1'b1;
      end else begin
        park_out = 1'b1;
      end
    end
    if (in_avail && !use_in) begin
      if (!add_in_v && buf_v[t_in]) begin
        add_in_v = 1'b1; add_tag = t_in; add_a = fifo_dout; add_b = buf_val[t_in];
        use_in = 1'b1; clr_in_buf = 1'b1;
      end else if (!buf_v[t_in]) begin
        use_in = 1'b1; park_in = 1'b1;
      end
    end
    emit = open_q[head] && (head != in_tag || row_full) && inflight[head] == '0
           && buf_v[head] && !(use_in && t_in == head);
  end

  assign in_pop    = use_in;
  assign out_valid = emit;
  assign out_sum   = buf_val[head];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int t = 0; t < 2; t++) begin
        buf_v[t]    <= 1'b0;
        buf_val[t]  <= FP64_ZERO;
        open_q[t]   <= 1'b0;
        inflight[t] <= '0;
      end
      in_tag   <= 1'b1;
      head     <= 1'b0;
      row_full <= 1'b1;
      taken    <= '0;
    end else begin
      for (int t = 0; t < 2; t++)
        inflight[t] <= inflight[t] + (($clog2(ADD_LAT+2))'(add_in_v && add_tag == 1'(t)))
                                   - (($clog2(ADD_LAT+2))'(add_out_v && out_tag == 1'(t)));
      if (use_in) begin
        open_q[t_in] <= 1'b1;
        if (row_full) begin
          in_tag   <= !in_tag;
          taken    <= LEN_W'(1);
          row_full <= (row_len == LEN_W'(1));
        end else begin
          taken    <= taken + 1'b1;
          row_full <= (taken + 1'b1 == row_len);
        end
      end
      if (clr_out_buf) buf_v[out_tag] <= 1'b0;
      if (clr_in_buf)  buf_v[t_in]    <= 1'b0;
      if (park_out) begin buf_v[out_tag] <= 1'b1; buf_val[out_tag] <= add_y;     end
      if (park_in)  begin buf_v[t_in]    <= 1'b1; buf_val[t_in]    <= fifo_dout; end
      if (emit) begin
        buf_v[head]  <= 1'b0;
        open_q[head] <= 1'b0;
        head         <= !head;
      end
    end
  end

  a_fifo_room:  assert property (@(posedge clk) disable iff (!rst_n) !(in_valid && fifo_full));
  a_row_len_ok: assert property (@(posedge clk) disable iff (!rst_n) row_len != '0);

endmodule
