// tb_prime_check: self-checking test of prime_check.
//
// Calls prime(n) for small corner values, the two operands of the Prime
// benchmark, squares of primes and random numbers; checks is_prime against an
// independent trial-division model, the cycle count against the documented
// schedule, and that the assertion starter pulses once per call with the
// auxiliary port carrying n.
module tb_prime_check;
  import prime_ref_pkg::*;
  localparam int unsigned W = 32;
  logic clk = 0, rst_n = 0, start = 0, busy, done, is_prime, assert_start;
  logic [W-1:0] n = '0, aux_n;
  int checks = 0, failures = 0, starters = 0;
  logic [W-1:0] last_aux;

  prime_check #(.DATA_W(W)) dut (.clk, .rst_n, .start, .n, .busy, .done, .is_prime, .aux_n, .assert_start);

  always #5 clk = ~clk;

  always @(posedge clk) if (rst_n && assert_start) begin
    starters++;
    last_aux = aux_n;
  end

  task automatic check(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic call(input logic [W-1:0] v);
    int cyc, s0;
    n = v; start = 1; s0 = starters;
    @(posedge clk); #1;
    start = 0; n = ~v;
    cyc = 0;
    do begin @(posedge clk); #1; cyc++; end while (!done && cyc < 100000);
    check(is_prime == is_prime_ref(v), $sformatf("is_prime(%0d)", v));
    check(cyc == int'(check_latency(v)), $sformatf("latency(%0d) %0d vs %0d", v, cyc, check_latency(v)));
    check(starters == s0 + 1 && last_aux == v, "one starter with aux_n = n");
    check(!busy, "idle after done");
  endtask

  initial begin
    repeat (2) @(posedge clk); #1;
    rst_n = 1;
    call(0); call(1); call(2); call(3); call(4); call(5); call(9); call(15);
    call(25); call(49); call(97); call(121); call(169); call(65521);
    call(21649); call(513239);
    call(32'd4294967291);                      // largest 32-bit prime
    call(32'd65521 * 32'd65519);               // product of two large primes
    for (int i = 0; i < 40; i++) call(W'($urandom_range(0, 200000)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
