// tb_fp64_mul: self-checking testbench for fp64_mul.
//
// Streams random normal operands (one set per clock, with some idle cycles)
// plus special values (zeros, infinities, NaN, cancellation) into the unit.
// The expected result comes from the simulator's own binary64 arithmetic on
// real numbers, which rounds to nearest even; operand exponents are kept in a
// range where no result is subnormal, since the unit flushes those to zero.
// Every result must appear exactly LAT = 10 cycles after its operands.
module tb_fp64_mul;
  import fp64_pkg::*;

  localparam int unsigned LAT = 10;
  localparam int NRAND = 3000;

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid;
  fp64_t a, b;
  logic out_valid;
  fp64_t y;
  int checks = 0, failures = 0;
  int cycle = 0;

  fp64_mul dut (.clk, .rst_n, .in_valid, .a, .b, .out_valid, .y);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  fp64_t exp_q[$];
  int    cyc_q[$];

  function automatic fp64_t rnd_fp(input int emin, input int emax);
    logic [51:0] f;
    int e;
    f = {$urandom(), $urandom()};
    e = emin + int'($urandom_range(emax - emin));
    return {1'($urandom()), 11'(e), f};
  endfunction

  function automatic fp64_t model(input fp64_t p, input fp64_t q);
    real r;
    r = $bitstoreal(p) * $bitstoreal(q);
    return $realtobits(r);
  endfunction

  task automatic drive(input fp64_t p, input fp64_t q);
    a = p; b = q; in_valid = 1'b1;
    exp_q.push_back(model(p, q));
    cyc_q.push_back(cycle);
    @(posedge clk);
    #1 in_valid = 1'b0;
  endtask

  // checker
  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      fp64_t e;
      int c;
      checks++;
      if (exp_q.size() == 0) begin
        failures++;
        $display("unexpected output %h", y);
      end else begin
        e = exp_q.pop_front();
        c = cyc_q.pop_front();
        if (is_nan(e) ? !is_nan(y) : (y !== e)) begin
          failures++;
          if (failures < 10) $display("mismatch: got %h expected %h", y, e);
        end
        if (cycle - c != int'(LAT)) begin
          failures++;
          if (failures < 10) $display("latency %0d, expected %0d", cycle - c, LAT);
        end
      end
    end
  end

  fp64_t sp[8];
  initial begin
    sp[0] = 64'h0000_0000_0000_0000;  sp[1] = 64'h8000_0000_0000_0000;
    sp[2] = 64'h7FF0_0000_0000_0000;  sp[3] = 64'hFFF0_0000_0000_0000;
    sp[4] = 64'h7FF8_0000_0000_0000;  sp[5] = 64'h3FF0_0000_0000_0000;
    sp[6] = 64'hC000_0000_0000_0000;  sp[7] = 64'h3FF8_0000_0000_0000;
    in_valid = 1'b0; a = '0; b = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    @(posedge clk); #1;
    foreach (sp[i]) foreach (sp[j]) drive(sp[i], sp[j]);
    for (int n = 0; n < NRAND; n++) begin
      fp64_t p, q;
      p = rnd_fp(700, 1300);
      q = rnd_fp(700, 1300);
      if (n % 4 == 1) q = {~p[63], p[62:52], p[51:0] ^ 52'($urandom_range(3))}; // cancellation
      if (n % 4 == 2) q = {q[63], p[62:52] - 11'($urandom_range(60)), q[51:0]};  // close exponents
      drive(p, q);
      if ($urandom_range(9) == 0) begin @(posedge clk); #1; end
    end
    repeat (LAT + 5) @(posedge clk);
    if (exp_q.size() != 0) begin
      failures++;
      $display("%0d results missing", exp_q.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
