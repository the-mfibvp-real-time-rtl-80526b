// mfibvp_pkg - shared types and constants of the MSB-first, interval-bounded,
// variable-precision (MFIBVP) multiplier.
//
// The multiplier turns an N x N unsigned product into 2N/K result digits of
// K bits each and resolves them one per phase, most significant digit first.
// This package holds the helper functions that size the phase counter and the
// Wallace tree, and the enumeration that tells why a run stopped. The reasons
// for stopping (all phases done, time used up, accuracy reached) follow the
// variable-precision idea of the design; the encoding is this design's own.
package mfibvp_pkg;

  // Why a multiplication stopped.
  typedef enum logic [1:0] {
    STOP_COMPLETE = 2'd0,  // every digit resolved: lower bound == upper bound == product
    STOP_BUDGET   = 2'd1,  // the requested number of phases has been computed
    STOP_ACCURACY = 2'd2,  // upper - lower is at or below the requested error limit
    STOP_ABORT    = 2'd3   // stopped from outside (deadline reached)
  } stop_reason_e;

  // Number of phases (result digits) of an N x N product with K-bit digits.
  function automatic int num_phases(int n, int k);
    return (2 * n) / k;
  endfunction

  // Bits needed to count 0 .. num_phases inclusive.
  function automatic int phase_bits(int n, int k);
    return $clog2(num_phases(n, k) + 1);
  endfunction

  // Rows left after one layer of 3:2 carry-save adders.
  function automatic int csa_rows_after(int rows);
    return 2 * (rows / 3) + (rows % 3);
  endfunction

  // Layers of 3:2 carry-save adders needed to reduce `rows` rows to two.
  function automatic int csa_levels(int rows);
    int r = rows;
    int l = 0;
    while (r > 2) begin
      r = csa_rows_after(r);
      l++;
    end
    return l;
  endfunction

endpackage
