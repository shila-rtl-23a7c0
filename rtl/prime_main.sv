// prime_main: the assertion-free main design of the Prime example.
//
// It computes main() of the Prime benchmark for two operands:
//   swap(x, y); return !(prime(x) && prime(y));
// After the swap the first call is prime(y) and the second prime(x). The AND
// short-circuits: if the first operand is not prime, prime() is not called a
// second time. One prime_check instance serves both calls.
//
// prime() holds the design's only assert, on its parameter. Because prime()
// is a called function, its assertion starter and the auxiliary port with its
// local variable n are passed up through this caller's ports (`assert_start`,
// `aux_n`), so that the separate assertion module can reach them.
//
// Interface and timing: `start` while idle latches x and y; `busy` is high
// from the next cycle until `done`, which pulses for one cycle with `result`.
// With L1 and L2 the prime_check latencies of the two calls (see
// prime_check), the edge that sets `done` comes 2 + L1 edges after the one
// that samples `start` when only one call is made, and 4 + L1 + L2 edges
// after it when both are. Synchronous active-low reset.
//
// The function of main() is the benchmark's; the source method names the
// benchmark only. Operands are ports rather than constants so the same IP can
// be run on many inputs. The handshake and schedule are this design's own.
module prime_main #(
  parameter int unsigned DATA_W = shila_pkg::DEFAULT_DATA_W
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic [DATA_W-1:0] x,
  input  logic [DATA_W-1:0] y,
  output logic              busy,
  output logic              done,
  output logic              result,
  output logic [DATA_W-1:0] aux_n,
  output logic              assert_start
);

  typedef enum logic [2:0] {IDLE, CALL1, WAIT1, CALL2, WAIT2} state_t;

  state_t            state;
  logic [DATA_W-1:0] a_r, b_r;     // operands after the swap
  logic              pc_start;
  logic [DATA_W-1:0] pc_n;
  logic              pc_busy, pc_done, pc_is_prime;

  prime_check #(.DATA_W(DATA_W)) u_prime (
    .clk          (clk),
    .rst_n        (rst_n),
    .start        (pc_start),
    .n            (pc_n),
    .busy         (pc_busy),
    .done         (pc_done),
    .is_prime     (pc_is_prime),
    .aux_n        (aux_n),
    .assert_start (assert_start)
  );

  always_comb begin
    pc_start = (state == CALL1) || (state == CALL2);
    pc_n     = (state == CALL2) ? b_r : a_r;
    busy     = (state != IDLE);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state  <= IDLE;
      a_r    <= '0;
      b_r    <= '0;
      done   <= 1'b0;
      result <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        IDLE: if (start) begin
          a_r   <= y;          // swap(&x, &y)
          b_r   <= x;
          state <= CALL1;
        end
        CALL1: state <= WAIT1;
        WAIT1: if (pc_done) begin
          if (pc_is_prime) begin
            state <= CALL2;
          end else begin
            result <= 1'b1;    // !(0 && ...) without the second call
            done   <= 1'b1;
            state  <= IDLE;
          end
        end
        CALL2: state <= WAIT2;
        WAIT2: if (pc_done) begin
          result <= !pc_is_prime;
          done   <= 1'b1;
          state  <= IDLE;
        end
        default: state <= IDLE;
      endcase
    end
  end

  // The function block is idle whenever a call is issued.
  a_call_idle : assert property (@(posedge clk) disable iff (!rst_n) pc_start |-> !pc_busy);

endmodule
