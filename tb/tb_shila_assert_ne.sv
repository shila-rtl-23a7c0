// tb_shila_assert_ne: self-checking test of the "value is not forbidden"
// assertion module, with a non-zero forbidden value.
//
// For each enable it checks ready low on the enable edge, ready high one
// edge later, and fired exactly when the sampled value equals the forbidden
// value, even though the input changes right after the enable.
module tb_shila_assert_ne;
  localparam int unsigned W = 32;
  localparam logic [W-1:0] BAD = 32'd12345;
  logic clk = 0, rst_n = 0, enable = 0, ready, fired;
  logic [W-1:0] value = '0;
  int checks = 0, failures = 0, n_fired = 0;

  shila_assert_ne #(.DATA_W(W), .FORBIDDEN_VALUE(BAD)) dut (.clk, .rst_n, .enable, .value, .ready, .fired);

  always #5 clk = ~clk;

  task automatic check(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic run_one(input logic [W-1:0] v);
    value = v; enable = 1;
    @(posedge clk); #1;
    enable = 0; value = BAD ^ W'(1);           // not the forbidden value
    if (v != BAD) value = BAD;                 // forbidden value appears too late
    check(!ready, "ready low");
    @(posedge clk); #1;
    check(ready, "ready high");
    check(fired == (v == BAD), "fired iff forbidden value");
    if (fired) n_fired++;
    @(posedge clk); #1;
  endtask

  initial begin
    repeat (2) @(posedge clk); #1;
    rst_n = 1;
    run_one(BAD);
    run_one(0);
    run_one(BAD + 1);
    run_one(BAD - 1);
    for (int i = 0; i < 30; i++) run_one((i % 5 == 0) ? BAD : W'($urandom));
    check(n_fired == 7, "number of firings");   // 1 + 6 of the loop
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
