// Reference model for the SPaRe testbenches, written separately from the
// RTL: the random next-state table, the default group-to-bit assignment
// and the default address-bit positions.
package tb_spare_ref_pkg;

  // Word v of the pseudo-random table for a seed (32-bit integer mixer).
  function automatic int unsigned ref_word(int unsigned seed, int unsigned v);
    int unsigned x;
    x = seed ^ (v * 32'h9E3779B9);
    x ^= x >> 16;
    x *= 32'h85EBCA6B;
    x ^= x >> 13;
    x *= 32'hC2B2AE35;
    x ^= x >> 16;
    return x;
  endfunction

  // Next state of a random FSM with k state bits for input vector
  // v = {inputs, state}.
  function automatic int unsigned ref_ns(int unsigned seed, int unsigned k, int unsigned v);
    return ref_word(seed, v) & ((1 << k) - 1);
  endfunction

  // Default assignment: slot j of group g observes bit (g*l + j) mod k.
  function automatic int unsigned ref_rsel(int unsigned k, int unsigned l,
                                           int unsigned g, int unsigned j);
    return (g*l + j) % k;
  endfunction

  // Default address bit i: input i if it exists, else state bit i-n.
  function automatic int unsigned ref_addr_pos(int unsigned k, int unsigned n, int unsigned i);
    return (i < n) ? k + i : i - n;
  endfunction

endpackage
