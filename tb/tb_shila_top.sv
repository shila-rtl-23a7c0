// tb_shila_top: end-to-end test of the Prime design with its synthesized
// assertion, at the default parameters (32-bit data, forbidden value 0).
//
// It runs main() on the benchmark's own operands (21649, 513239) and on pairs
// that pass the forbidden value 0 to prime() in the first or the second call,
// that short-circuit, or that need both calls. For every run it checks:
//   - main()'s return value against an independent model;
//   - the cycle count against that of the assertion-free schedule, so the
//     assertion adds no cycle to the design;
//   - for every assertion starter, that the checker drops ready on the edge
//     that samples it and raises it on the next with fired exactly when the
//     value was 0;
//   - after the run, the OR output, the encoder and a serial scan-chain
//     readout of the last result.
// It counts how often each mechanism happened (starter, firing, pass,
// short-circuit, two calls, scan readout of a firing) and fails if one never
// did.
module tb_shila_top;
  import prime_ref_pkg::*;
  logic clk = 0, rst_n = 0, start = 0, scan_load = 0, scan_shift = 0;
  logic [31:0] x = '0, y = '0;
  logic busy, done, result, any_fired, enc_valid, scan_out;
  logic [0:0] assert_ready, assert_fired, enc_index;
  int checks = 0, failures = 0;
  int n_start = 0, n_fire = 0, n_pass = 0, n_short = 0, n_both = 0, n_scan_fire = 0;

  shila_top dut (
    .clk, .rst_n, .start, .x, .y, .busy, .done, .result,
    .assert_ready, .assert_fired, .any_fired, .enc_valid, .enc_index,
    .scan_load, .scan_shift, .scan_out);

  always #5 clk = ~clk;

  task automatic check(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // Assertion monitor: the edge that samples a starter drops ready, the next
  // edge raises it with the result.
  always @(posedge clk) if (rst_n && dut.assert_start) begin
    automatic logic [31:0] v = dut.aux_n;
    n_start++;
    #1;
    check(!assert_ready[0], "ready low while checking");
    @(posedge clk); #1;
    check(assert_ready[0], "ready one edge after the starter edge");
    check(assert_fired[0] == (v == 0), $sformatf("fired for n=%0d", v));
    if (assert_fired[0]) n_fire++; else n_pass++;
  end

  task automatic run(input logic [31:0] a, input logic [31:0] b);
    int cyc;
    bit last_bad;
    x = a; y = b; start = 1;
    @(posedge clk); #1;
    start = 0; x = 32'hFFFF_FFFF; y = 32'hFFFF_FFFF;
    cyc = 0;
    do begin @(posedge clk); #1; cyc++; end while (!done && cyc < 1000000);
    check(result == main_result(a, b), $sformatf("result(%0d,%0d)", a, b));
    check(cyc == int'(main_latency(a, b)), $sformatf("cycles %0d vs %0d", cyc, main_latency(a, b)));
    if (is_prime_ref(b)) n_both++; else n_short++;
    // The last call's check finishes one edge after done at the latest.
    @(posedge clk); #1;
    last_bad = is_prime_ref(b) ? (a == 0) : (b == 0);
    check(assert_ready[0] && assert_fired[0] == last_bad, "last result held");
    check(any_fired == last_bad, "OR output");
    check(enc_valid == last_bad && enc_index == 1'b0, "encoder");
    scan_load = 1;
    @(posedge clk); #1;
    scan_load = 0;
    check(scan_out == last_bad, "scan bit");
    if (scan_out) n_scan_fire++;
    scan_shift = 1;
    @(posedge clk); #1;
    scan_shift = 0;
    check(scan_out == 0, "scan drained");
  endtask

  initial begin
    repeat (2) @(posedge clk); #1;
    check(!assert_ready[0] && !any_fired, "reset state");
    rst_n = 1;
    run(21649, 513239);        // the benchmark's operands
    run(0, 21649);             // forbidden value in the second call
    run(21649, 0);             // forbidden value in the first call, short-circuit
    run(10, 7);
    run(7, 10);
    run(0, 0);
    for (int i = 0; i < 10; i++) run(32'($urandom_range(0, 3000)), 32'($urandom_range(0, 3000)));
    $display("starters=%0d fired=%0d passed=%0d short=%0d both=%0d scan_fired=%0d",
             n_start, n_fire, n_pass, n_short, n_both, n_scan_fire);
    check(n_start > 0, "starter happened");
    check(n_fire > 0, "firing happened");
    check(n_pass > 0, "passing check happened");
    check(n_short > 0, "short-circuit happened");
    check(n_both > 0, "two calls happened");
    check(n_scan_fire > 0, "scan readout of a firing happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (500000) @(posedge clk);
    failures++;
    $display("watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
