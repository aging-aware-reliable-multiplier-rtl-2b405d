// Shared types and constants of the aging-aware variable-latency multiplier.
//
// bypass_e selects which bypassing array sits in the datapath. In the column
// bypassing form the adder stages are skipped on zero bits of the multiplicand
// and the adaptive hold logic (AHL) inspects the multiplicand; in the row
// bypassing form the stages are skipped on zero bits of the multiplicator and
// the AHL inspects the multiplicator. Column bypassing is the default.
//
// hamming_parity_bits() returns the number of Hamming check bits r needed to
// protect k data bits with single-error correction: the smallest r with
// 2**r >= k + r + 1. Check bits sit at the power-of-two positions 1, 2, 4, ...
// of the 1-based code word, data bits fill the other positions in order.
package amm_pkg;

  typedef enum logic {
    BYPASS_COLUMN = 1'b0,
    BYPASS_ROW    = 1'b1
  } bypass_e;

  function automatic int hamming_parity_bits(input int k);
    int r;
    r = 0;
    while ((1 << r) < k + r + 1) r++;
    return r;
  endfunction

endpackage
