// 2-bit up/down counter with SPaRe concurrent fault detection.
//
// The counter itself (next-state logic plus 2-bit state register) is left
// untouched. Beside it, a one-output prediction logic computes, for each
// transition, the value of one next-state bit; a D flip-flop holds it for
// one cycle. The bit to observe is chosen by PS1 xor PS0 of the transition,
// also delayed one cycle in a D flip-flop: 0 observes NS0, 1 observes NS1.
// A 2-to-1 multiplexer routes that bit of the state register to a 1-bit
// inequality comparator, whose output test_o is 1 on a detected fault.
// Comparing one cycle late lets faults in the state register show too.
//
// Interface: ud_i selects up (0) or down (1) counting; state_o is the
// counter output OUT; test_o is the test output. All registers reset to
// zero (asynchronous, active low), which is consistent: state 00 has
// NS0 = 0 in group 0, so no alarm is raised after reset. The reset scheme
// and the mapping of the multiplexer inputs are this design's choices.
module spare_counter (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       ud_i,     // 0 = count up, 1 = count down
  output logic [1:0] state_o,  // counter state / FSM output
  output logic       test_o    // 1 = fault detected
);

  import spare_pkg::*;

  // Group 0 observes NS0, group 1 observes NS1.
  localparam rsel_t CNT_RSEL = rsel_t'({8'd1, 8'd0});

  logic [1:0] ns, ps;
  logic       pred, pred_q, obs;
  logic       sel;

  // ---- original FSM hardware ----
  updown_next_state u_nsl (
    .ud_i(ud_i),
    .ps_i(ps),
    .ns_o(ns)
  );

  spare_register #(.W(2)) u_state_reg (
    .clk  (clk),
    .rst_n(rst_n),
    .d    (ns),
    .q    (ps)
  );

  assign state_o = ps;

  // ---- testability hardware ----
  updown_prediction_logic u_pred (
    .ud_i  (ud_i),
    .ps_i  (ps),
    .pred_o(pred)
  );

  spare_register #(.W(1)) u_pred_ff (
    .clk  (clk),
    .rst_n(rst_n),
    .d    (pred),
    .q    (pred_q)
  );

  // Select function of the previous state: PS1 xor PS0.
  assign sel = ps[1] ^ ps[0];

  // D flip-flop on the select line and 2-to-1 multiplexer.
  spare_selection_logic #(
    .K    (2),
    .L    (1),
    .C    (1),
    .R_SEL(CNT_RSEL)
  ) u_sel (
    .clk    (clk),
    .rst_n  (rst_n),
    .addr_i (sel),
    .state_i(ps),
    .obs_o  (obs)
  );

  spare_comparator #(.L(1)) u_cmp (
    .pred_i(pred_q),
    .obs_i (obs),
    .err_o (test_o)
  );

endmodule
