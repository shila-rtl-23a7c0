// prime_check: prime(n) of the Prime benchmark, as the assertion-free function
// block of the design IP, with the auxiliary ports of its assertion.
//
// prime(n): an even n is prime only if it equals 2; an odd n is tested by
// trial division with the odd divisors i = 3, 5, 7, ... while i*i <= n, and is
// prime if none divides it and n > 1. One divisor is tried per clock cycle.
//
// The assert at the entry of prime() is replaced by an assertion starter:
// `assert_start` pulses for one cycle when the call begins, while `aux_n`
// (the auxiliary port) carries n. aux_n holds n for the whole call.
//
// Interface and timing: a `start` pulse while idle (busy=0) loads n. The next
// cycle (CHECK) raises assert_start and decides even numbers. Odd numbers then
// spend one cycle per divisor in LOOP. `done` pulses for one cycle together
// with `is_prime`. Counting clock edges from the one that samples `start` to
// the one that sets `done`: 1 for an even n, and 1 + k for an odd n, where k
// is the number of divisors examined including the last one (the one that
// divides n or whose square exceeds n). start while busy is ignored. Synchronous active-low reset.
//
// The algorithm is the usual one of this benchmark; the source method names
// the benchmark only. The start/done handshake and the cycle schedule are
// this design's own choices.
module prime_check #(
  parameter int unsigned DATA_W = shila_pkg::DEFAULT_DATA_W
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic [DATA_W-1:0] n,
  output logic              busy,
  output logic              done,
  output logic              is_prime,
  output logic [DATA_W-1:0] aux_n,
  output logic              assert_start
);

  typedef enum logic [1:0] {IDLE, CHECK, LOOP} state_t;

  state_t                  state;
  logic [DATA_W-1:0]       n_r;
  logic [DATA_W-1:0]       div;       // current odd divisor i
  logic [2*DATA_W-1:0]     div_sq;    // i*i, wide enough not to overflow
  logic                    divides;

  always_comb begin
    div_sq  = div * div;
    divides = (n_r % div) == '0;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state    <= IDLE;
      n_r      <= '0;
      div      <= DATA_W'(3);
      done     <= 1'b0;
      is_prime <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        IDLE: if (start) begin
          n_r   <= n;
          state <= CHECK;
        end
        CHECK: begin
          div <= DATA_W'(3);
          if (!n_r[0]) begin
            is_prime <= (n_r == DATA_W'(2));
            done     <= 1'b1;
            state    <= IDLE;
          end else begin
            state <= LOOP;
          end
        end
        LOOP: begin
          if (div_sq > (2*DATA_W)'(n_r)) begin
            is_prime <= (n_r > DATA_W'(1));
            done     <= 1'b1;
            state    <= IDLE;
          end else if (divides) begin
            is_prime <= 1'b0;
            done     <= 1'b1;
            state    <= IDLE;
          end else begin
            div <= div + DATA_W'(2);
          end
        end
        default: state <= IDLE;
      endcase
    end
  end

  always_comb begin
    busy         = (state != IDLE);
    assert_start = (state == CHECK);
    aux_n        = n_r;
  end

endmodule
