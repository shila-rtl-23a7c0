// tb_prime_workload: the Prime benchmark run as a long hardware-assisted
// simulation workload at default parameters.
//
// Streams RUNS executions of main() back to back on shila_top, starting a new
// run in the cycle after each done, alternating the benchmark's own operands
// (21649, 513239) with pseudo-random pairs. It checks every result, that each
// run takes exactly the assertion-free cycle count, that the total cycle
// count matches the sum, and that the assertion fires exactly on the runs
// that pass the forbidden value 0 into prime().
module tb_prime_workload;
  import prime_ref_pkg::*;
  localparam int RUNS = 300;
  logic clk = 0, rst_n = 0, start = 0;
  logic [31:0] x = '0, y = '0;
  logic busy, done, result, any_fired, enc_valid, scan_out;
  logic [0:0] assert_ready, assert_fired, enc_index;
  int checks = 0, failures = 0, fire_runs = 0;
  longint total = 0, expected_total = 0;

  shila_top dut (
    .clk, .rst_n, .start, .x, .y, .busy, .done, .result,
    .assert_ready, .assert_fired, .any_fired, .enc_valid, .enc_index,
    .scan_load(1'b0), .scan_shift(1'b0), .scan_out);

  always #5 clk = ~clk;

  task automatic check(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    repeat (2) @(posedge clk); #1;
    rst_n = 1;
    for (int r = 0; r < RUNS; r++) begin
      logic [31:0] a, b;
      int cyc;
      bit bad;
      if (r % 2 == 0) begin a = 21649; b = 513239; end
      else begin a = 32'($urandom_range(0, 20000)); b = 32'($urandom_range(0, 20000)); end
      if (r % 37 == 5) a = 0;
      bad = is_prime_ref(b) ? (a == 0) : (b == 0);
      x = a; y = b; start = 1;
      @(posedge clk); #1;
      start = 0;
      cyc = 0;
      do begin @(posedge clk); #1; cyc++; end while (!done && cyc < 1000000);
      total += cyc + 1;
      expected_total += main_latency(a, b) + 1;
      check(result == main_result(a, b), "result");
      check(cyc == int'(main_latency(a, b)), "run latency");
      // Sample the assertion one edge after done, then restart at once.
      @(posedge clk); #1;
      total++;
      expected_total++;
      check(any_fired == bad, "assertion outcome of the run");
      if (any_fired) fire_runs++;
    end
    check(total == expected_total, "total cycles");
    check(fire_runs > 0, "workload included a firing run");
    $display("runs=%0d cycles=%0d firing_runs=%0d", RUNS, total, fire_runs);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
