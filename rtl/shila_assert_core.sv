// shila_assert_core: the handshake every synthesized assertion module shares.
//
// A C `assert(expr)` removed from a high-level design becomes a separate
// hardware checker. The design notifies it through `enable` (the assertion
// starter) when execution reaches the point of the assert, and presents the
// variables of `expr` on `vars_in` (the auxiliary ports). Because the design
// keeps running and may change those variables, the checker first takes local
// copies of all of them in one cycle, then evaluates `expr` on the copies.
//
// The condition itself is specific to each assertion, so it is computed
// outside this module from `vars_copy` and returned on `cond_ok`
// (combinational, no registers on that path). A wrapper per assertion,
// such as shila_assert_ne, ties the two together.
//
// Timing (all on rising clk):
//   edge 0: enable=1 sampled -> vars_copy <= vars_in, ready <= 0
//   edge 1:                  -> fired <= !cond_ok, ready <= 1
// So ready rises two edges after enable is sampled and stays high, holding
// `fired`, until the next enable. An enable while a check is pending restarts
// the check with the new values. While enable stays low nothing changes.
// fired is only meaningful while ready is 1. Synchronous active-low reset
// clears ready, fired and the copies.
//
// From the source method: enable/ready/fired, ready dropped at the start and
// raised at the end, local copies taken in one cycle, fired=1 meaning failure.
// This design's own choices: the two-cycle latency, the restart rule, the
// reset values and the split between protocol and condition.
module shila_assert_core #(
  parameter int unsigned DATA_W   = shila_pkg::DEFAULT_DATA_W,
  parameter int unsigned NUM_VARS = 1
) (
  input  logic                           clk,
  input  logic                           rst_n,
  input  logic                           enable,
  input  logic [NUM_VARS-1:0][DATA_W-1:0] vars_in,
  output logic [NUM_VARS-1:0][DATA_W-1:0] vars_copy,
  input  logic                           cond_ok,
  output logic                           ready,
  output logic                           fired
);

  logic pending;  // copies taken, result not yet produced

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      vars_copy <= '0;
      pending   <= 1'b0;
      ready     <= 1'b0;
      fired     <= 1'b0;
    end else if (enable) begin
      vars_copy <= vars_in;
      pending   <= 1'b1;
      ready     <= 1'b0;
    end else if (pending) begin
      fired     <= !cond_ok;
      ready     <= 1'b1;
      pending   <= 1'b0;
    end
  end

  // ready and pending are never both high.
  a_ready_pending : assert property (@(posedge clk) disable iff (!rst_n) !(ready && pending));
  // A pending check that is not restarted produces its result on the next edge.
  a_result_follows : assert property (@(posedge clk) disable iff (!rst_n)
                                      (pending && !enable) |=> ready);

endmodule
