// SPaRe prediction logic for a random FSM: an L-output partial replica of
// the K-output next-state logic.
//
// The C address bits, taken directly from the vector {in_i, ps_i} at the
// positions listed in ADDR_IDX, split all transitions into 2**C groups.
// For a transition in group g the prediction logic outputs the next-state
// bits named by R_SEL for g: pred_o[j] = NS[R_SEL(g, j)]. When the
// multiplexers have address bits of their own, g is worked out per output
// j from multiplexer j's bits. It therefore
// implements L functions of N+K inputs instead of K. The next-state values
// come from the same elaboration-time table as rand_fsm_next_state (same
// K, N and SEED), computed independently here, so the two share no wires.
// Purely combinational; the result is held one cycle in the predicted
// L-bit register.
module rand_fsm_prediction_logic
  import spare_pkg::*;
#(
  parameter int unsigned K        = 6,
  parameter int unsigned N        = 3,
  parameter int unsigned L        = 3,
  parameter int unsigned C        = 2,
  parameter logic [31:0] SEED     = 32'h5EED_0643,
  parameter addr_idx_t   ADDR_IDX = default_addr(K, N, C, L),
  parameter rsel_t       R_SEL    = default_rsel(K, L, C)
) (
  input  logic [K-1:0] ps_i,
  input  logic [N-1:0] in_i,
  output logic [L-1:0] pred_o
);

  localparam int unsigned NV = 1 << (K + N);
  localparam int unsigned VW = $clog2(N + K);
  localparam int unsigned KW = (K > 1) ? $clog2(K) : 1;

  function automatic logic [NV*K-1:0] build_table();
    logic [NV*K-1:0] t;
    t = '0;
    for (int unsigned v = 0; v < NV; v++) begin
      t[v*K +: K] = K'(rand_ns_word(SEED, 32'(v)));
    end
    return t;
  endfunction

  localparam logic [NV*K-1:0] NS_TABLE = build_table();

  logic [N+K-1:0] vec;
  logic [C-1:0]   grp;   // group seen by output j
  logic [K-1:0]   ns;
  logic [VW-1:0]  vidx;
  logic [KW-1:0]  bidx;

  assign vec = {in_i, ps_i};
  assign ns  = NS_TABLE[vec*K +: K];

  always_comb begin
    for (int unsigned j = 0; j < L; j++) begin
      for (int unsigned i = 0; i < C; i++) begin
        vidx   = VW'(ADDR_IDX[(j*C + i)*IDXW +: IDXW]);
        grp[i] = vec[vidx];
      end
      bidx      = KW'(R_SEL[(int'(grp)*L + j)*IDXW +: IDXW]);
      pred_o[j] = ns[bidx];
    end
  end

endmodule
