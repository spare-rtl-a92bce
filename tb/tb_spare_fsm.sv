// Self-checking testbench for spare_fsm at its default size (64 states,
// 3 inputs, 3 predicted bits): fault-free run with a reference model,
// then a single stuck-at fault campaign in which every fault must be
// detected and none may be reported before the FSM state goes wrong.
// Run twice: with all multiplexers on the same address bits (default) and
// with each multiplexer on its own address bits.
module tb_spare_fsm;
  logic done, done2;
  int checks, failures, nf, nd, ng;
  int checks2, failures2, nf2, nd2, ng2;

  // Each multiplexer on its own pair of input bits (inputs are vector
  // positions 6, 7 and 8): mux 0 on {7,6}, mux 1 on {8,7}, mux 2 on {6,8}.
  localparam spare_pkg::addr_idx_t PER_MUX =
    spare_pkg::addr_idx_t'({8'd8, 8'd6, 8'd7, 8'd8, 8'd6, 8'd7});

  spare_fsm_campaign #(.CYCLES(3000), .REQUIRE_ALL(1'b1)) u_camp (
    .done(done), .checks(checks), .failures(failures),
    .n_faults(nf), .n_detected(nd), .n_groups_seen(ng));

  spare_fsm_campaign #(.CYCLES(3000), .REQUIRE_ALL(1'b1), .ADDR_IDX(PER_MUX)) u_camp2 (
    .done(done2), .checks(checks2), .failures(failures2),
    .n_faults(nf2), .n_detected(nd2), .n_groups_seen(ng2));

  initial begin
    #10_000_000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks + checks2, failures + failures2 + 1);
    $finish;
  end

  initial begin
    #1 wait (done === 1'b1 && done2 === 1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks + checks2, failures + failures2);
    $finish;
  end
endmodule
