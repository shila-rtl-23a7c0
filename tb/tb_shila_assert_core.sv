// tb_shila_assert_core: self-checking test of the assertion handshake.
//
// Checks that an enable captures local copies of the variables, that ready
// drops on the enable edge and rises exactly one edge later with
// fired = !cond_ok, that changing the inputs after the enable does not affect
// the copies, that outputs hold while enable is low, and that an enable while
// a check is pending restarts it. The condition fed back is "var0 < var1",
// computed here from the copies.
module tb_shila_assert_core;
  localparam int unsigned W = 16;
  logic clk = 0, rst_n = 0, enable = 0;
  logic [1:0][W-1:0] vin, vcopy;
  logic cond_ok, ready, fired;
  int checks = 0, failures = 0;

  shila_assert_core #(.DATA_W(W), .NUM_VARS(2)) dut (
    .clk, .rst_n, .enable, .vars_in(vin), .vars_copy(vcopy), .cond_ok, .ready, .fired);

  always #5 clk = ~clk;
  always_comb cond_ok = vcopy[0] < vcopy[1];

  task automatic check(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // One check: enable for one cycle with (a,b), scramble inputs, look at outputs.
  task automatic run_one(input logic [W-1:0] a, input logic [W-1:0] b);
    vin = {b, a}; enable = 1;
    @(posedge clk); #1;
    enable = 0;
    check(!ready, "ready low after enable edge");
    check(vcopy[0] == a && vcopy[1] == b, "copies taken");
    vin = {W'($urandom), W'($urandom)};     // the design moves on
    @(posedge clk); #1;
    check(ready, "ready one edge later");
    check(fired == !(a < b), "fired value");
    check(vcopy[0] == a && vcopy[1] == b, "copies kept");
    repeat (3) @(posedge clk); #1;
    check(ready && fired == !(a < b), "result held while idle");
  endtask

  initial begin
    vin = '0;
    repeat (2) @(posedge clk); #1;
    check(!ready && !fired, "reset values");
    rst_n = 1;
    run_one(3, 9);
    run_one(9, 3);
    run_one(5, 5);
    for (int i = 0; i < 40; i++) run_one(W'($urandom), W'($urandom));
    // Restart: a second enable while pending replaces the values.
    vin = {W'(1), W'(2)}; enable = 1;           // 2 < 1 false -> would fire
    @(posedge clk); #1;
    vin = {W'(8), W'(2)};                       // 2 < 8 true
    @(posedge clk); #1;
    enable = 0;
    check(!ready, "still pending after restart");
    @(posedge clk); #1;
    check(ready && !fired, "restart uses new values");
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
