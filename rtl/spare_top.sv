// Top level: the two SPaRe-protected machines side by side.
//
//   * spare_counter: the 2-bit up/down counter with a one-bit prediction,
//     the worked example of the method.
//   * spare_fsm: the general scheme around a random FSM, by default of the
//     largest benchmark type (64 states, 3 inputs, 3 predicted bits).
//
// The two share only the clock and the reset and have their own ports;
// each test output is 1 when its checker sees a fault. See those modules
// for the timing.
module spare_top
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
  // 2-bit up/down counter
  input  logic         cnt_ud_i,
  output logic [1:0]   cnt_state_o,
  output logic         cnt_test_o,
  // random FSM
  input  logic [N-1:0] fsm_in_i,
  output logic [K-1:0] fsm_state_o,
  output logic         fsm_test_o
);

  spare_counter u_counter (
    .clk    (clk),
    .rst_n  (rst_n),
    .ud_i   (cnt_ud_i),
    .state_o(cnt_state_o),
    .test_o (cnt_test_o)
  );

  spare_fsm #(
    .K(K), .N(N), .L(L), .C(C), .SEED(SEED),
    .ADDR_IDX(ADDR_IDX), .R_SEL(R_SEL)
  ) u_fsm (
    .clk    (clk),
    .rst_n  (rst_n),
    .in_i   (fsm_in_i),
    .state_o(fsm_state_o),
    .test_o (fsm_test_o)
  );

endmodule
