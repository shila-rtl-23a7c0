// shila_pkg: constants and helpers shared by the assertion-synthesis RTL.
//
// DEFAULT_DATA_W is the width of the checked variables. The helper function
// idx_w gives the width of an index into a set of n assertions, never less than one bit, so that a design with a
// single assertion still has a legal index port.
package shila_pkg;

  // Width of the C `unsigned int` variables of the Prime example.
  localparam int unsigned DEFAULT_DATA_W = 32;

  function automatic int unsigned idx_w(input int unsigned n);
    return (n > 1) ? $clog2(n) : 1;
  endfunction

endpackage
