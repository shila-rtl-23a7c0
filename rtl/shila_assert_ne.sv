// shila_assert_ne: the synthesized assertion of the Prime example,
// assert(n != FORBIDDEN_VALUE), placed at the entry of prime(n).
//
// It wraps shila_assert_core: `enable` is prime()'s assertion starter and
// `value` its auxiliary port carrying n. The core takes a local copy of n;
// this module compares the copy with FORBIDDEN_VALUE. The edge that samples
// enable drops ready; the next edge raises it, with fired 1 exactly when the
// forbidden value was supplied. ready and fired then hold until the next enable.
//
// The source method says only that the assertion checks that one specific
// value is not passed as the parameter; the value (0 by default) and the
// width are this design's choice.
module shila_assert_ne #(
  parameter int unsigned         DATA_W          = shila_pkg::DEFAULT_DATA_W,
  parameter logic [DATA_W-1:0]   FORBIDDEN_VALUE = '0
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              enable,
  input  logic [DATA_W-1:0] value,
  output logic              ready,
  output logic              fired
);

  logic [0:0][DATA_W-1:0] copy;
  logic                   cond_ok;

  always_comb cond_ok = (copy[0] != FORBIDDEN_VALUE);

  shila_assert_core #(.DATA_W(DATA_W), .NUM_VARS(1)) u_core (
    .clk       (clk),
    .rst_n     (rst_n),
    .enable    (enable),
    .vars_in   (value),
    .vars_copy (copy),
    .cond_ok   (cond_ok),
    .ready     (ready),
    .fired     (fired)
  );

endmodule
