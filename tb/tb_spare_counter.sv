// Self-checking testbench for spare_counter, the SPaRe-protected 2-bit
// up/down counter.
//
// 1. Fault-free: 1000 random U/D values; the state must follow a reference
//    up/down counter and the test output must stay 0.
// 2. Fault campaign: stuck-at-0/1 on each next-state output bit, on each
//    state register bit, on the internal toggle net of the next-state
//    logic, on the prediction logic output and on the prediction
//    flip-flop, each with 200 random U/D values. Every fault must be
//    detected, and for faults in the counter itself the test output must
//    not rise before the counter state differs from the reference.
//    One fault is a known escape and is reported, not counted: with the
//    toggle net stuck at 1 the faulty counter is trapped in states 00 and
//    11, where PS1 xor PS0 = 0 and only the still-correct NS0 is observed.
module tb_spare_counter;
  logic clk = 1'b0, rst_n = 1'b0;
  logic ud, test;
  logic [1:0] state, ref_st;
  int checks = 0, failures = 0;
  int f_id = -1;
  logic f_val;

  spare_counter dut (.clk(clk), .rst_n(rst_n), .ud_i(ud), .state_o(state), .test_o(test));

  always #5 clk = ~clk;

  always @(f_id or f_val) begin
    case (f_id)
      0: force dut.u_nsl.ns_o[0] = f_val;
      1: force dut.u_nsl.ns_o[1] = f_val;
      2: force dut.u_state_reg.q[0] = f_val;
      3: force dut.u_state_reg.q[1] = f_val;
      4: force dut.u_pred.pred_o = f_val;
      5: force dut.u_pred_ff.q = f_val;
      6: force dut.u_nsl.t1 = f_val;
      default: begin
        release dut.u_nsl.ns_o[0];
        release dut.u_nsl.ns_o[1];
        release dut.u_state_reg.q[0];
        release dut.u_state_reg.q[1];
        release dut.u_pred.pred_o;
        release dut.u_pred_ff.q;
        release dut.u_nsl.t1;
      end
    endcase
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic do_reset();
    rst_n = 1'b0; ud = 1'b0;
    @(negedge clk); @(negedge clk);
    rst_n = 1'b1; ref_st = 2'b00;
  endtask

  initial begin
    int act, det;
    f_val = 1'b0;
    do_reset();
    for (int t = 0; t < 1000; t++) begin
      ud = 1'($urandom);
      @(posedge clk);
      ref_st = ud ? ref_st - 2'd1 : ref_st + 2'd1;
      @(negedge clk);
      checks++;
      if (state !== ref_st || test !== 1'b0) begin
        failures++;
        $display("fault-free t=%0d state=%b ref=%b test=%b", t, state, ref_st, test);
      end
    end

    for (int f = 0; f < 7; f++) begin
      for (int v = 0; v < 2; v++) begin
        f_id = -1;
        do_reset();
        f_val = v[0]; f_id = f;
        act = -1; det = -1;
        #1 if (state !== ref_st) act = 0;  // deviates already in the reset state
        for (int t = 0; t < 200 && det < 0; t++) begin
          ud = 1'($urandom);
          @(posedge clk);
          ref_st = ud ? ref_st - 2'd1 : ref_st + 2'd1;
          @(negedge clk);
          if (act < 0 && state !== ref_st) act = t;
          if (test) det = t;
        end
        // Known escape: with the toggle net stuck at 1 the faulty counter
        // only alternates 00 <-> 11, where PS1 xor PS0 = 0 and only the
        // (correct) NS0 is ever observed.
        if (f == 6 && v == 1) begin
          if (det < 0) $display("fault %0d sa%0d not detected (expected escape)", f, v);
        end else begin
          checks++;
          if (det < 0) begin
            failures++;
            $display("fault %0d sa%0d not detected", f, v);
          end
        end
        if (f < 4 || f == 6) begin
          checks++;
          if (det >= 0 && (act < 0 || det < act)) begin
            failures++;
            $display("fault %0d sa%0d: alarm at %0d before deviation at %0d", f, v, det, act);
          end
        end
        $display("fault %0d sa%0d activated=%0d detected=%0d", f, v, act, det);
      end
    end
    f_id = -1;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
