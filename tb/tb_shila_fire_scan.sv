// tb_shila_fire_scan: self-checking test of the firing scan chain.
//
// Loads random firing patterns into a five-assertion chain, reads them back
// serially (assertion 0 first, one bit per shift), checks that cycles without
// shift hold the chain and that the chain drains to zero.
module tb_shila_fire_scan;
  localparam int unsigned N = 5;
  logic clk = 0, rst_n = 0, load = 0, shift = 0, scan_out;
  logic [N-1:0] fired = '0;
  int checks = 0, failures = 0;

  shila_fire_scan #(.NUM_ASSERTS(N)) dut (.clk, .rst_n, .load, .shift, .fired, .scan_out);

  always #5 clk = ~clk;

  task automatic check(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    repeat (2) @(posedge clk); #1;
    check(scan_out == 0, "reset clears chain");
    rst_n = 1;
    for (int t = 0; t < 40; t++) begin
      logic [N-1:0] pat;
      pat = N'($urandom);
      if (t == 0) pat = 5'b10110;
      fired = pat; load = 1;
      @(posedge clk); #1;
      load = 0; fired = ~pat;                  // later changes are not seen
      for (int i = 0; i < N; i++) begin
        check(scan_out == pat[i], "serial bit");
        if (i == 2) begin                      // a pause holds the chain
          @(posedge clk); #1;
          check(scan_out == pat[i], "hold without shift");
        end
        shift = 1;
        @(posedge clk); #1;
        shift = 0;
      end
      check(scan_out == 0, "drained");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
