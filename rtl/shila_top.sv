// shila_top: a high-level design and its synthesized assertion, integrated.
//
// The C source of the Prime example holds one assert, at the entry of
// prime(n), checking that n is not a forbidden value. In this system that
// assert is gone from the design IP (prime_main) and lives in a separate
// checker (shila_assert_ne) that runs alongside it:
//
//   prime_main --assert_start (starter)--> shila_assert_ne --ready,fired-->
//              --aux_n (auxiliary port)-->                  shila_fire_collector
//
// The design never waits for the checker, so its cycle count is that of the
// assertion-free design. The checker copies n on the edge that samples the
// starter and reports on the next edge, while prime() keeps running. Each
// call of prime() restarts it, so after a run assert_ready/assert_fired
// show the check of the last call, and so do any_fired, the encoder and the
// scan chain. A firing always ends up there: a call on the forbidden value 0
// finds 0 not prime, so no second call follows to overwrite it.
//
// Ports: start/x/y/busy/done/result are main()'s handshake (see prime_main).
// assert_ready/assert_fired are the per-assertion outputs; any_fired,
// enc_valid/enc_index and scan_load/scan_shift/scan_out are the three
// collected forms (see shila_fire_collector). Synchronous active-low reset.
//
// NUM_ASSERTS is 1 because the example carries one assertion; the collector
// takes any number. DATA_W (32, the benchmark's unsigned int) and
// FORBIDDEN_VALUE (0) are this design's choices.
module shila_top #(
  parameter int unsigned       DATA_W          = shila_pkg::DEFAULT_DATA_W,
  parameter logic [DATA_W-1:0] FORBIDDEN_VALUE = '0,
  localparam int unsigned      NUM_ASSERTS     = 1,
  localparam int unsigned      IDX_W           = shila_pkg::idx_w(NUM_ASSERTS)
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   start,
  input  logic [DATA_W-1:0]      x,
  input  logic [DATA_W-1:0]      y,
  output logic                   busy,
  output logic                   done,
  output logic                   result,
  output logic [NUM_ASSERTS-1:0] assert_ready,
  output logic [NUM_ASSERTS-1:0] assert_fired,
  output logic                   any_fired,
  output logic                   enc_valid,
  output logic [IDX_W-1:0]       enc_index,
  input  logic                   scan_load,
  input  logic                   scan_shift,
  output logic                   scan_out
);

  logic [DATA_W-1:0]      aux_n;
  logic                   assert_start;

  prime_main #(.DATA_W(DATA_W)) u_design (
    .clk          (clk),
    .rst_n        (rst_n),
    .start        (start),
    .x            (x),
    .y            (y),
    .busy         (busy),
    .done         (done),
    .result       (result),
    .aux_n        (aux_n),
    .assert_start (assert_start)
  );

  shila_assert_ne #(.DATA_W(DATA_W), .FORBIDDEN_VALUE(FORBIDDEN_VALUE)) u_assert_n (
    .clk    (clk),
    .rst_n  (rst_n),
    .enable (assert_start),
    .value  (aux_n),
    .ready  (assert_ready[0]),
    .fired  (assert_fired[0])
  );

  shila_fire_collector #(.NUM_ASSERTS(NUM_ASSERTS)) u_collect (
    .clk         (clk),
    .rst_n       (rst_n),
    .ready       (assert_ready),
    .fired       (assert_fired),
    .fired_valid (),
    .any_fired   (any_fired),
    .enc_valid   (enc_valid),
    .enc_index   (enc_index),
    .scan_load   (scan_load),
    .scan_shift  (scan_shift),
    .scan_out    (scan_out)
  );

endmodule
