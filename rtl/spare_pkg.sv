// Shared constants and elaboration-time helpers for the SPaRe concurrent
// fault detection blocks.
//
// SPaRe (selective partial replication) guards the next-state logic of a
// finite state machine with a prediction logic that replicates only L of the
// K next-state bits for every transition. Which L bits are replicated depends
// on a small "group" number formed from C of the previous-state/input bits.
// The group-to-bit assignment is carried as a packed table of 8-bit indices,
// R_SEL, and the address bit choice as a packed table ADDR_IDX; both have a
// fixed width so that modules can take them as plain parameters.
//
//   R_SEL   : entry (g*L + j) at bits [(g*L+j)*8 +: 8] names the next-state
//             bit that slot j of the prediction compares in group g.
//   ADDR_IDX: entry (j*C + i) at bits [(j*C+i)*8 +: 8] names the bit of
//             the vector {inputs, previous state} that drives address bit
//             i of multiplexer j (state bits are positions 0..K-1, inputs
//             K..K+N-1). Multiplexers may share address bits (the usual
//             case, and the default) or each use their own.
//
// The default tables and the random FSM generator below are this design's
// own choices; the method only says that the bit assignment comes from an
// offline selection algorithm and that the benchmark FSMs are random.
package spare_pkg;

  // Width of one entry of the index tables.
  localparam int unsigned IDXW = 8;
  // Largest supported number of groups (2**C) and predicted bits (L).
  localparam int unsigned MAX_GROUPS = 8;
  localparam int unsigned MAX_L      = 8;
  localparam int unsigned MAX_C      = 3;
  localparam int unsigned RSEL_W     = MAX_GROUPS * MAX_L * IDXW;  // 512
  localparam int unsigned ADDR_W     = MAX_L * MAX_C * IDXW;       // 192

  typedef logic [RSEL_W-1:0] rsel_t;
  typedef logic [ADDR_W-1:0] addr_idx_t;

  // Default group-to-bit assignment: slot j of group g observes next-state
  // bit (g*L + j) mod K, so that consecutive groups cycle through all bits.
  function automatic rsel_t default_rsel(input int unsigned k,
                                         input int unsigned l,
                                         input int unsigned c);
    rsel_t r;
    r = '0;
    for (int unsigned g = 0; g < (1 << c); g++)
      for (int unsigned j = 0; j < l; j++)
        r[(g*l + j)*IDXW +: IDXW] = IDXW'((g*l + j) % k);
    return r;
  endfunction

  // Default address bits, the same for all l multiplexers: the FSM inputs
  // first, then previous-state bits from bit 0 upwards if there are fewer
  // inputs than address bits.
  function automatic addr_idx_t default_addr(input int unsigned k,
                                             input int unsigned n,
                                             input int unsigned c,
                                             input int unsigned l);
    addr_idx_t a;
    a = '0;
    for (int unsigned j = 0; j < l; j++)
      for (int unsigned i = 0; i < c; i++)
        a[(j*c + i)*IDXW +: IDXW] = (i < n) ? IDXW'(k + i) : IDXW'(i - n);
    return a;
  endfunction

  // 32-bit integer mixer used to fill the next-state table of a random FSM:
  // word v of the table for a given seed. Evaluated at elaboration only.
  function automatic logic [31:0] rand_ns_word(input logic [31:0] seed,
                                               input logic [31:0] v);
    logic [31:0] x;
    x = seed ^ (v * 32'h9E37_79B9);
    x = x ^ (x >> 16);
    x = x * 32'h85EB_CA6B;
    x = x ^ (x >> 13);
    x = x * 32'hC2B2_AE35;
    x = x ^ (x >> 16);
    return x;
  endfunction

endpackage
