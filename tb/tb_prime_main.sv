// tb_prime_main: self-checking test of the Prime example's main design.
//
// Runs main() on operand pairs that take the short-circuit (first operand
// after the swap not prime) and pairs that need both calls, including the
// benchmark's own operands. Checks the return value against an independent
// model, the cycle count against the documented schedule, and the order and
// values of the assertion starters and auxiliary port (y first, then x).
module tb_prime_main;
  import prime_ref_pkg::*;
  localparam int unsigned W = 32;
  logic clk = 0, rst_n = 0, start = 0, busy, done, result, assert_start;
  logic [W-1:0] x = '0, y = '0, aux_n;
  logic [W-1:0] seen [$];
  int checks = 0, failures = 0, n_short = 0, n_both = 0;

  prime_main #(.DATA_W(W)) dut (.clk, .rst_n, .start, .x, .y, .busy, .done, .result, .aux_n, .assert_start);

  always #5 clk = ~clk;
  always @(posedge clk) if (rst_n && assert_start) seen.push_back(aux_n);

  task automatic check(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic run(input logic [W-1:0] a, input logic [W-1:0] b);
    int cyc;
    bit both;
    both = is_prime_ref(b);
    seen.delete();
    x = a; y = b; start = 1;
    @(posedge clk); #1;
    start = 0; x = '0; y = '0;
    cyc = 0;
    do begin @(posedge clk); #1; cyc++; end while (!done && cyc < 100000);
    check(result == main_result(a, b), $sformatf("result(%0d,%0d)", a, b));
    check(cyc == int'(main_latency(a, b)), $sformatf("latency %0d vs %0d", cyc, main_latency(a, b)));
    if (both) begin
      n_both++;
      check(seen.size() == 2 && seen[0] == b && seen[1] == a, "two starters: y then x");
    end else begin
      n_short++;
      check(seen.size() == 1 && seen[0] == b, "one starter (short-circuit)");
    end
  endtask

  initial begin
    repeat (2) @(posedge clk); #1;
    rst_n = 1;
    run(21649, 513239);
    run(513239, 21649);
    run(7, 8);
    run(8, 7);
    run(0, 3);
    run(3, 0);
    run(1, 1);
    for (int i = 0; i < 30; i++) run(W'($urandom_range(0, 5000)), W'($urandom_range(0, 5000)));
    check(n_short > 0 && n_both > 0, "both paths taken");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
