// tb_reduce_row: self-checking testbench for the reduce circuit.
//
// For several row lengths m (1, 2, 3, 5, 8, 17, 40) it streams rows of
// partial sums into the circuit, one per clock with random gaps, never
// exceeding the FIFO depth of partial sums outstanding (the controller's
// credit rule). Values are small integers times 1/16, so every sum is exact
// in binary64 and does not depend on the order of the additions; each row
// sum must then equal the reference exactly, and rows must come out in order.
// With m = 1 and an uninterrupted stream the circuit must finish one row per
// clock, and with rows of 128 partial sums fewer than 10% of the clocks may
// be lost waiting for FIFO room (the drain of a row overlaps the next row).
module tb_reduce_row;
  import fp64_pkg::*;

  localparam int DEPTH = 64;

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid;
  fp64_t in_value;
  logic [15:0] row_len;
  logic in_pop, out_valid;
  fp64_t out_sum;
  int checks = 0, failures = 0;
  int outstanding = 0;
  int waits = 0;

  reduce_row #(.FIFO_DEPTH(DEPTH)) dut (.clk, .rst_n, .in_valid, .in_value, .row_len,
                                        .in_pop, .out_valid, .out_sum);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  real exp_q[$];
  int  out_cycles[$];
  int  cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  always @(posedge clk) begin
    if (rst_n) begin
      outstanding <= outstanding + (in_valid ? 1 : 0) - (in_pop ? 1 : 0);
      if (out_valid) begin
        real e;
        checks++;
        out_cycles.push_back(cycle);
        if (exp_q.size() == 0) begin
          failures++;
          $display("unexpected row sum");
        end else begin
          e = exp_q.pop_front();
          if ($bitstoreal(out_sum) != e) begin
            failures++;
            if (failures < 10) $display("row sum %f expected %f", $bitstoreal(out_sum), e);
          end
        end
      end
    end
  end

  task automatic run_rows(input int m, input int rows, input bit gaps);
    row_len = 16'(m);
    for (int r = 0; r < rows; r++) begin
      real s = 0.0;
      for (int p = 0; p < m; p++) begin
        real v;
        v = real'(int'($urandom_range(2000)) - 1000) / 16.0;
        s += v;
        while (outstanding + (in_valid ? 1 : 0) >= DEPTH) begin
          in_valid = 1'b0;
          waits++;
          @(posedge clk); #1;
        end
        in_valid = 1'b1;
        in_value = $realtobits(v);
        if (p == m - 1) exp_q.push_back(s);
        @(posedge clk); #1;
        in_valid = 1'b0;
        if (gaps && $urandom_range(5) == 0) begin @(posedge clk); #1; end
      end
    end
    while (exp_q.size() != 0) begin @(posedge clk); #1; end
    repeat (3) @(posedge clk);
    #1;
  endtask

  initial begin
    int m_list[7] = '{1, 2, 3, 5, 8, 17, 40};
    in_valid = 1'b0; in_value = '0; row_len = 16'd1;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    // throughput: 100 rows of one partial sum, back to back
    out_cycles.delete();
    run_rows(1, 100, 1'b0);
    checks++;
    if (out_cycles.size() != 100 || out_cycles[99] - out_cycles[0] != 99) begin
      failures++;
      $display("m=1 rows not finished one per clock");
    end
    foreach (m_list[k]) run_rows(m_list[k], 30, 1'b1);
    foreach (m_list[k]) run_rows(m_list[k], 10, 1'b0);
    // long rows overlap the drain of one row with the next row's inputs:
    // fewer than 10% of the clocks may be lost to a full FIFO
    waits = 0;
    run_rows(128, 8, 1'b0);
    checks++;
    if (waits * 10 > 8 * 128) begin
      failures++;
      $display("long rows: %0d waits for 1024 inputs", waits);
    end
    $display("long rows: %0d waits for 1024 inputs", waits);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
