// Next-state logic of a random FSM with 2**K states and N inputs, the kind
// of benchmark machine SPaRe is evaluated on.
//
// The next state of every (previous state, input) pair is drawn from a
// fixed pseudo-random table that is computed at elaboration from SEED with
// spare_pkg::rand_ns_word, so that the logic is a K-output function of
// N+K inputs with no structure to exploit. The table index is the vector
// {in_i, ps_i}: previous-state bits are I1..IK (positions 0..K-1), the
// inputs I(K+1)..I(K+N). Purely combinational. The way the random machine
// is generated is this design's own choice.
module rand_fsm_next_state #(
  parameter int unsigned K    = 6,             // state bits (64 states)
  parameter int unsigned N    = 3,             // FSM inputs
  parameter logic [31:0] SEED = 32'h5EED_0643  // picks the random machine
) (
  input  logic [K-1:0] ps_i,  // previous state
  input  logic [N-1:0] in_i,  // FSM inputs
  output logic [K-1:0] ns_o   // next state
);

  localparam int unsigned NV = 1 << (K + N);  // number of vectors

  function automatic logic [NV*K-1:0] build_table();
    logic [NV*K-1:0] t;
    t = '0;
    for (int unsigned v = 0; v < NV; v++) begin
      t[v*K +: K] = K'(spare_pkg::rand_ns_word(SEED, 32'(v)));
    end
    return t;
  endfunction

  localparam logic [NV*K-1:0] NS_TABLE = build_table();

  assign ns_o = NS_TABLE[{in_i, ps_i}*K +: K];

endmodule
