// shila_fire_scan: scan chain that sends the assertion firing results out
// one bit per cycle on a single pin.
//
// `load` captures the NUM_ASSERTS firing bits into a shift register. Each
// cycle with `shift` high moves the register one place toward `scan_out`,
// filling with 0. scan_out shows assertion 0 right after the load, then
// assertions 1, 2, ... after each shift, so NUM_ASSERTS - 1 shifts read the
// whole set and the position of a 1 gives the exact firing assertion. load
// wins over shift. Synchronous active-low reset clears the register.
//
// The source method names a scan chain for this purpose; the bit order,
// load/shift controls and zero fill are this design's choice.
module shila_fire_scan #(
  parameter int unsigned NUM_ASSERTS = 5
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   load,
  input  logic                   shift,
  input  logic [NUM_ASSERTS-1:0] fired,
  output logic                   scan_out
);

  logic [NUM_ASSERTS-1:0] chain;

  always_ff @(posedge clk) begin
    if (!rst_n)      chain <= '0;
    else if (load)   chain <= fired;
    else if (shift)  chain <= chain >> 1;
  end

  always_comb scan_out = chain[0];

endmodule
