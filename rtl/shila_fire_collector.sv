// shila_fire_collector: gathers the results of all assertion modules.
//
// A firing counts only while its module's `ready` is high, so each input pair
// is reduced to ready & fired first. Three views of that vector are offered,
// for the three ways of bringing firings out of a device:
//   any_fired            - OR of all firings (one pin, "something failed")
//   enc_valid/enc_index  - encoder (few pins, which assertion failed)
//   scan_out             - scan chain (one pin, slower, exact per assertion;
//                          controlled by scan_load and scan_shift)
// The vector itself, `fired_valid`, is also output. The OR and the encoder are
// combinational; the scan chain follows shila_fire_scan.
//
// The three options are those the source method lists; offering them side by
// side and gating with ready are this design's choices.
module shila_fire_collector #(
  parameter int unsigned NUM_ASSERTS = 5,
  localparam int unsigned IDX_W      = shila_pkg::idx_w(NUM_ASSERTS)
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic [NUM_ASSERTS-1:0] ready,
  input  logic [NUM_ASSERTS-1:0] fired,
  output logic [NUM_ASSERTS-1:0] fired_valid,
  output logic                   any_fired,
  output logic                   enc_valid,
  output logic [IDX_W-1:0]       enc_index,
  input  logic                   scan_load,
  input  logic                   scan_shift,
  output logic                   scan_out
);

  always_comb begin
    fired_valid = ready & fired;
    any_fired   = |fired_valid;
  end

  shila_fire_encoder #(.NUM_ASSERTS(NUM_ASSERTS)) u_enc (
    .fired (fired_valid),
    .valid (enc_valid),
    .index (enc_index)
  );

  shila_fire_scan #(.NUM_ASSERTS(NUM_ASSERTS)) u_scan (
    .clk      (clk),
    .rst_n    (rst_n),
    .load     (scan_load),
    .shift    (scan_shift),
    .fired    (fired_valid),
    .scan_out (scan_out)
  );

endmodule
