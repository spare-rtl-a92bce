// End-to-end testbench for spare_top at its default parameters (the 2-bit
// counter and a 64-state, 3-input random FSM with 3 predicted bits).
//
// 1. Both machines run 4000 cycles of random inputs fault-free: states must
//    match reference models, both test outputs must stay 0, and every
//    group of both checkers must be used (counter: select 0 and 1; FSM:
//    all four address values).
// 2. A stuck-at-0/1 fault is injected in turn on every next-state output
//    bit and every state register bit of each machine (4 + 12 faults
//    on the counter side and 12 + 12 on the FSM side). With the same input
//    sequence replayed, each fault must be detected, never before the
//    machine's state deviates, and the machine that is not faulted must
//    stay silent. Detections and latencies are counted and printed.
module tb_spare_top;
  import tb_spare_ref_pkg::*;
  localparam int unsigned K = 6, N = 3, SEED = 32'h5EED_0643;
  localparam int unsigned CYC = 4000;

  logic clk = 1'b0, rst_n = 1'b0;
  logic cnt_ud, cnt_test, fsm_test;
  logic [1:0] cnt_state;
  logic [N-1:0] fsm_in;
  logic [K-1:0] fsm_state;
  int checks = 0, failures = 0;

  spare_top dut (
    .clk(clk), .rst_n(rst_n),
    .cnt_ud_i(cnt_ud), .cnt_state_o(cnt_state), .cnt_test_o(cnt_test),
    .fsm_in_i(fsm_in), .fsm_state_o(fsm_state), .fsm_test_o(fsm_test));

  always #5 clk = ~clk;

  // fault control: machine 0 = counter, 1 = FSM; site 0 = next-state
  // output, 1 = state register
  logic f_on = 1'b0, f_val = 1'b0;
  int   f_mach = 0, f_site = 0, f_bit = 0;

  for (genvar b = 0; b < K; b++) begin : g_fsm_f
    always @(f_on or f_mach or f_site or f_bit or f_val) begin
      if (f_on && f_mach == 1 && f_site == 0 && f_bit == b) force dut.u_fsm.u_nsl.ns_o[b] = f_val;
      else release dut.u_fsm.u_nsl.ns_o[b];
      if (f_on && f_mach == 1 && f_site == 1 && f_bit == b) force dut.u_fsm.u_state_reg.q[b] = f_val;
      else release dut.u_fsm.u_state_reg.q[b];
    end
  end
  for (genvar b = 0; b < 2; b++) begin : g_cnt_f
    always @(f_on or f_mach or f_site or f_bit or f_val) begin
      if (f_on && f_mach == 0 && f_site == 0 && f_bit == b) force dut.u_counter.u_nsl.ns_o[b] = f_val;
      else release dut.u_counter.u_nsl.ns_o[b];
      if (f_on && f_mach == 0 && f_site == 1 && f_bit == b) force dut.u_counter.u_state_reg.q[b] = f_val;
      else release dut.u_counter.u_state_reg.q[b];
    end
  end

  logic [N:0]  seq [CYC];   // {ud, fsm inputs}
  logic [1:0]  ref_cnt;
  int unsigned ref_fsm;
  int          n_cnt_sel [2];
  int          n_fsm_grp [4];
  int          n_cnt_det = 0, n_fsm_det = 0, lat_max = 0;
  real         lat_sum = 0.0;

  initial begin
    #100_000_000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  task automatic do_reset();
    rst_n = 1'b0; cnt_ud = 1'b0; fsm_in = '0;
    @(negedge clk); @(negedge clk);
    rst_n = 1'b1; ref_cnt = 2'b00; ref_fsm = 0;
  endtask

  // One transition of both machines and their reference models.
  task automatic step(input int t);
    {cnt_ud, fsm_in} = seq[t];
    @(posedge clk);
    ref_cnt = cnt_ud ? ref_cnt - 2'd1 : ref_cnt + 2'd1;
    ref_fsm = ref_ns(SEED, K, (int'(fsm_in) << K) | ref_fsm);
    @(negedge clk);
  endtask

  function automatic bit dev(int mach);
    return (mach == 0) ? (cnt_state !== ref_cnt) : (fsm_state !== K'(ref_fsm));
  endfunction

  initial begin
    int a, d, nb;
    logic quiet_test;
    foreach (n_cnt_sel[i]) n_cnt_sel[i] = 0;
    foreach (n_fsm_grp[i]) n_fsm_grp[i] = 0;
    for (int t = 0; t < CYC; t++) seq[t] = (N+1)'($urandom);

    // ---- fault-free run ----
    do_reset();
    for (int t = 0; t < CYC; t++) begin
      step(t);
      checks++;
      if (cnt_state !== ref_cnt || fsm_state !== K'(ref_fsm) || cnt_test || fsm_test) begin
        failures++;
        $display("fault-free t=%0d cnt=%b/%b fsm=%0d/%0d tests=%b%b",
                 t, cnt_state, ref_cnt, fsm_state, ref_fsm, cnt_test, fsm_test);
      end
      n_cnt_sel[dut.u_counter.u_sel.addr_q]++;
      n_fsm_grp[dut.u_fsm.u_sel.addr_q[1:0]]++;
    end
    foreach (n_cnt_sel[i]) begin
      checks++;
      if (n_cnt_sel[i] == 0) begin failures++; $display("counter select %0d never used", i); end
    end
    foreach (n_fsm_grp[i]) begin
      checks++;
      if (n_fsm_grp[i] == 0) begin failures++; $display("FSM group %0d never used", i); end
    end

    // ---- fault campaign ----
    for (int mach = 0; mach < 2; mach++) begin
      nb = (mach == 0) ? 2 : K;
      for (int site = 0; site < 2; site++)
        for (int b = 0; b < nb; b++)
          for (int v = 0; v < 2; v++) begin
            f_on = 1'b0;
            do_reset();
            f_mach = mach; f_site = site; f_bit = b; f_val = v[0]; f_on = 1'b1;
            #1;
            a = dev(mach) ? 0 : -1;
            d = -1;
            for (int t = 0; t < CYC && d < 0; t++) begin
              step(t);
              if (a < 0 && dev(mach)) a = t;
              if ((mach == 0 ? cnt_test : fsm_test) && d < 0) d = t;
              quiet_test = (mach == 0) ? fsm_test : cnt_test;
              if (quiet_test) begin
                checks++; failures++;
                $display("machine %0d raised an alarm for a fault in the other", 1 - mach);
              end
            end
            checks++;
            if (d < 0) begin
              failures++;
              $display("mach %0d site %0d bit %0d sa%0d undetected", mach, site, b, v);
            end else if (a < 0 || d < a) begin
              failures++;
              $display("mach %0d site %0d bit %0d sa%0d: alarm before deviation", mach, site, b, v);
            end else begin
              if (mach == 0) n_cnt_det++; else n_fsm_det++;
              lat_sum += real'(d - a);
              if (d - a > lat_max) lat_max = d - a;
            end
          end
    end
    f_on = 1'b0;
    checks++;
    if (n_cnt_det == 0 || n_fsm_det == 0) failures++;
    $display("counter select uses: %0d %0d; FSM group uses: %0d %0d %0d %0d",
             n_cnt_sel[0], n_cnt_sel[1], n_fsm_grp[0], n_fsm_grp[1], n_fsm_grp[2], n_fsm_grp[3]);
    $display("faults detected: counter %0d/8, FSM %0d/24; latency max %0d avg %0.2f cycles",
             n_cnt_det, n_fsm_det, lat_max, lat_sum / real'(n_cnt_det + n_fsm_det));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
