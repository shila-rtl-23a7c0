// tb_shila_fire_collector: self-checking test of the firing collector.
//
// Drives random ready/fired vectors for five assertions and checks the
// ready-gated vector, the OR output, the encoder outputs and a full serial
// readout through the scan chain against values computed here.
module tb_shila_fire_collector;
  localparam int unsigned N = 5;
  logic clk = 0, rst_n = 0, scan_load = 0, scan_shift = 0;
  logic [N-1:0] ready = '0, fired = '0, fired_valid;
  logic any_fired, enc_valid, scan_out;
  logic [2:0] enc_index;
  int checks = 0, failures = 0;

  shila_fire_collector #(.NUM_ASSERTS(N)) dut (
    .clk, .rst_n, .ready, .fired, .fired_valid, .any_fired, .enc_valid, .enc_index,
    .scan_load, .scan_shift, .scan_out);

  always #5 clk = ~clk;

  task automatic check(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    repeat (2) @(posedge clk); #1;
    rst_n = 1;
    for (int t = 0; t < 60; t++) begin
      logic [N-1:0] v;
      int lowest;
      ready = N'($urandom); fired = N'($urandom);
      if (t == 0) begin ready = '1; fired = 5'b01000; end
      if (t == 1) begin ready = 5'b00111; fired = 5'b11000; end   // firings not ready
      #1;
      v = '0;
      for (int i = 0; i < N; i++) v[i] = ready[i] && fired[i];
      lowest = 0;
      for (int i = N - 1; i >= 0; i--) if (v[i]) lowest = i;
      check(fired_valid == v, "gated vector");
      check(any_fired == (v != 0), "OR output");
      check(enc_valid == (v != 0) && enc_index == 3'(lowest), "encoder");
      scan_load = 1;
      @(posedge clk); #1;
      scan_load = 0;
      for (int i = 0; i < N; i++) begin
        check(scan_out == v[i], "scan bit");
        scan_shift = 1;
        @(posedge clk); #1;
        scan_shift = 0;
      end
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
