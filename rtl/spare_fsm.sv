// Random FSM protected by SPaRe, the general scheme of selective partial
// replication.
//
// Original FSM: a K-bit state register fed by the K-output next-state
// logic of a random machine with N inputs (rand_fsm_next_state); its state
// is the FSM output. Testability hardware, added in parallel without
// touching the FSM:
//   * prediction logic: L of the K next-state bits for each transition,
//     which L depending on the transition's group;
//   * predicted L-bit register: holds the prediction for one cycle;
//   * selection logic: C address bits per multiplexer, wired directly from
//     previous-state and input bits (no address logic) and delayed one
//     cycle, drive L multiplexers that pick the matching state register
//     bits; by default all multiplexers share the same address bits;
//   * L-bit inequality comparator: test_o = 1 when they differ.
// In a fault-free machine the state register, one cycle after a
// transition, holds exactly the bits that were predicted, so test_o never
// rises falsely; a fault shows once a transition observes a bit it
// corrupts.
//
// Timing: in_i is sampled on the rising clock edge; state_o is registered;
// test_o is combinational from registers and refers to the transition made
// at the previous edge. All registers reset to zero (asynchronous, active
// low) and the random machine's reset state is 0; with the prediction
// register also at 0 no alarm follows reset.
//
// Parameters follow the largest benchmark type, 64 states and 3 inputs with
// 3 predicted bits; C = 2 address bits, the seed, the address bits chosen
// and the group-to-bit table are this design's defaults (an offline
// selection algorithm would supply the last two).
module spare_fsm
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
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] in_i,     // FSM inputs
  output logic [K-1:0] state_o,  // FSM state / outputs
  output logic         test_o    // 1 = fault detected
);

  logic [K-1:0]   ns, ps;
  logic [L-1:0]   pred, pred_q, obs;
  logic [N+K-1:0] vec;
  logic [L*C-1:0] addr;  // address of multiplexer j at [j*C +: C]
  logic [$clog2(N+K)-1:0] vidx;

  // ---- original FSM hardware ----
  rand_fsm_next_state #(.K(K), .N(N), .SEED(SEED)) u_nsl (
    .ps_i(ps),
    .in_i(in_i),
    .ns_o(ns)
  );

  spare_register #(.W(K)) u_state_reg (
    .clk  (clk),
    .rst_n(rst_n),
    .d    (ns),
    .q    (ps)
  );

  assign state_o = ps;

  // ---- testability hardware ----
  rand_fsm_prediction_logic #(
    .K(K), .N(N), .L(L), .C(C), .SEED(SEED),
    .ADDR_IDX(ADDR_IDX), .R_SEL(R_SEL)
  ) u_pred (
    .ps_i  (ps),
    .in_i  (in_i),
    .pred_o(pred)
  );

  spare_register #(.W(L)) u_pred_reg (
    .clk  (clk),
    .rst_n(rst_n),
    .d    (pred),
    .q    (pred_q)
  );

  // Address bits straight from previous-state and input bits.
  assign vec = {in_i, ps};
  always_comb begin
    for (int unsigned k = 0; k < L*C; k++) begin
      vidx    = ($clog2(N+K))'(ADDR_IDX[k*IDXW +: IDXW]);
      addr[k] = vec[vidx];
    end
  end

  spare_selection_logic #(.K(K), .L(L), .C(C), .R_SEL(R_SEL)) u_sel (
    .clk    (clk),
    .rst_n  (rst_n),
    .addr_i (addr),
    .state_i(ps),
    .obs_o  (obs)
  );

  spare_comparator #(.L(L)) u_cmp (
    .pred_i(pred_q),
    .obs_i (obs),
    .err_o (test_o)
  );

endmodule
