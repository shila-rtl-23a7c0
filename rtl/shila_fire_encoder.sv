// shila_fire_encoder: encoder for assertion firing signals.
//
// A design with many synthesized assertions has one firing signal per
// assertion, more than a device may have pins for. This encoder reduces
// NUM_ASSERTS firing bits to a `valid` bit (some assertion fired) and the
// binary `index` of the lowest-numbered assertion that fired; index is 0
// when none fired. Purely combinational.
//
// The source method suggests an encoder for this purpose without giving its
// form; priority to the lowest index is this design's choice.
module shila_fire_encoder #(
  parameter int unsigned NUM_ASSERTS = 5,
  localparam int unsigned IDX_W      = shila_pkg::idx_w(NUM_ASSERTS)
) (
  input  logic [NUM_ASSERTS-1:0] fired,
  output logic                   valid,
  output logic [IDX_W-1:0]       index
);

  always_comb begin
    valid = 1'b0;
    index = '0;
    for (int i = NUM_ASSERTS - 1; i >= 0; i--) begin
      if (fired[i]) begin
        valid = 1'b1;
        index = IDX_W'(i);
      end
    end
  end

endmodule
