// tb_shila_fire_encoder: exhaustive self-checking test of the firing encoder
// for five assertions: every input pattern, compared with the lowest set bit.
module tb_shila_fire_encoder;
  localparam int unsigned N = 5;
  logic [N-1:0] fired;
  logic valid;
  logic [2:0] index;
  int checks = 0, failures = 0;

  shila_fire_encoder #(.NUM_ASSERTS(N)) dut (.fired, .valid, .index);

  initial begin
    for (int p = 0; p < (1 << N); p++) begin
      int exp_idx;
      fired = N'(p);
      exp_idx = 0;
      for (int i = 0; i < N; i++) if (p[i]) begin exp_idx = i; break; end
      #1;
      checks++;
      if (valid !== (p != 0) || index !== 3'(exp_idx)) begin
        failures++;
        $display("FAIL pattern %b: valid=%0b index=%0d", fired, valid, index);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
