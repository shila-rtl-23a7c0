// prime_ref_pkg: reference model of the Prime example for the testbenches.
//
// is_prime_ref tests primality by plain trial division with every divisor
// from 2 (a different method from the RTL's odd-divisor loop). The latency
// functions give the expected cycle counts of the RTL's documented schedule:
// prime_check takes 1 edge for an even n and 1 + k for an odd n, k being the
// number of odd divisors 3, 5, ... looked at up to and including the one that
// ends the loop; prime_main takes 2 + L1 with one call and 4 + L1 + L2 with two.
package prime_ref_pkg;

  function automatic bit is_prime_ref(input longint unsigned n);
    if (n < 2) return 0;
    for (longint unsigned d = 2; d * d <= n; d++)
      if (n % d == 0) return 0;
    return 1;
  endfunction

  function automatic int unsigned check_latency(input longint unsigned n);
    int unsigned k;
    longint unsigned i;
    if (n % 2 == 0) return 1;
    k = 0;
    i = 3;
    forever begin
      k++;
      if (i * i > n) break;
      if (n % i == 0) break;
      i += 2;
    end
    return 1 + k;
  endfunction

  // swap(x, y) first: the first call is prime(y), the second prime(x).
  function automatic int unsigned main_latency(input longint unsigned x, input longint unsigned y);
    if (!is_prime_ref(y)) return 2 + check_latency(y);
    return 4 + check_latency(y) + check_latency(x);
  endfunction

  function automatic bit main_result(input longint unsigned x, input longint unsigned y);
    return !(is_prime_ref(y) && is_prime_ref(x));
  endfunction

endpackage
