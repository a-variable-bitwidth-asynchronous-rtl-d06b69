// madd_pkg: types and width arithmetic shared by the MADD dot product unit.
//
// A MADD array of 2^W_BITS entries (index 0 unused) holds ENTRY_BITS-wide
// multiplicands. With every entry at its maximum E = 2^ENTRY_BITS-1 the
// height register reaches E*(2^W_BITS-1) < 2^(ENTRY_BITS+W_BITS) and the
// accumulator reaches E*(2^W_BITS-1)*2^W_BITS/2 < 2^(ENTRY_BITS+2*W_BITS-1).
// These widths are this design's choice: they make overflow impossible.
package madd_pkg;

  // Width of the height register (running sum of entries).
  function automatic int height_bits(int w_bits, int entry_bits);
    return entry_bits + w_bits;
  endfunction

  // Width of the accumulator (the dot product).
  function automatic int acc_bits(int w_bits, int entry_bits);
    return entry_bits + 2 * w_bits - 1;
  endfunction

  // Controller states. RUN executes the while loop of the algorithm,
  // DRAIN is the extra clock of the height-register tap option, DONE holds
  // the completion acknowledge until the request is withdrawn.
  typedef enum logic [1:0] {
    S_IDLE  = 2'd0,
    S_RUN   = 2'd1,
    S_DRAIN = 2'd2,
    S_DONE  = 2'd3
  } madd_state_e;

endpackage
