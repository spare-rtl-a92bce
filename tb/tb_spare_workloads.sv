// Benchmark sweep over the ten random FSM types (states, inputs):
// (8,1) (8,2) (16,1) (16,2) (32,1) (32,2) (32,3) (64,1) (64,2) (64,3),
// each protected with the number of predicted bits of its type (2 of 3,
// 2 of 4, 2 of 5 and 3 of 6 state bits) and 2 address bits.
//
// Every type runs in its own harness (spare_fsm_campaign): a 5000-pattern
// fault-free run that must stay silent and use every group, then a single
// stuck-at fault campaign over the next-state outputs, the state register
// and the predicted-bit register with the same 5000 random patterns,
// reporting activated, detected and missed faults and the maximum and
// average detection latency. Coverage is reported, not required: with
// the default group-to-bit table (not one found by a selection algorithm)
// some faults may be missed.
module tb_spare_workloads;
  localparam int NT = 10;
  logic done [NT];
  int   chk [NT], fail [NT], nf [NT], nd [NT], ng [NT];

  spare_fsm_campaign #(.K(3), .N(1), .L(2), .SEED(32'hA001)) c0 (done[0], chk[0], fail[0], nf[0], nd[0], ng[0]);
  spare_fsm_campaign #(.K(3), .N(2), .L(2), .SEED(32'hA002)) c1 (done[1], chk[1], fail[1], nf[1], nd[1], ng[1]);
  spare_fsm_campaign #(.K(4), .N(1), .L(2), .SEED(32'hA003)) c2 (done[2], chk[2], fail[2], nf[2], nd[2], ng[2]);
  spare_fsm_campaign #(.K(4), .N(2), .L(2), .SEED(32'hA004)) c3 (done[3], chk[3], fail[3], nf[3], nd[3], ng[3]);
  spare_fsm_campaign #(.K(5), .N(1), .L(2), .SEED(32'hA005)) c4 (done[4], chk[4], fail[4], nf[4], nd[4], ng[4]);
  spare_fsm_campaign #(.K(5), .N(2), .L(2), .SEED(32'hA006)) c5 (done[5], chk[5], fail[5], nf[5], nd[5], ng[5]);
  spare_fsm_campaign #(.K(5), .N(3), .L(2), .SEED(32'hA007)) c6 (done[6], chk[6], fail[6], nf[6], nd[6], ng[6]);
  spare_fsm_campaign #(.K(6), .N(1), .L(3), .SEED(32'hA008)) c7 (done[7], chk[7], fail[7], nf[7], nd[7], ng[7]);
  spare_fsm_campaign #(.K(6), .N(2), .L(3), .SEED(32'hA009)) c8 (done[8], chk[8], fail[8], nf[8], nd[8], ng[8]);
  spare_fsm_campaign #(.K(6), .N(3), .L(3), .SEED(32'hA00A)) c9 (done[9], chk[9], fail[9], nf[9], nd[9], ng[9]);

  function automatic bit all_done();
    foreach (done[i]) if (done[i] !== 1'b1) return 1'b0;
    return 1'b1;
  endfunction

  initial begin
    #100_000_000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", 0, 1);
    $finish;
  end

  initial begin
    int checks, failures, tf, td;
    #1;
    while (!all_done()) #1000;
    checks = 0; failures = 0; tf = 0; td = 0;
    foreach (chk[i]) begin
      checks += chk[i]; failures += fail[i]; tf += nf[i]; td += nd[i];
    end
    $display("all types: %0d of %0d injected faults detected", td, tf);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
