// Test harness that runs one SPaRe-protected random FSM (spare_fsm) through
// a fault-free run and a single stuck-at fault campaign, with its own clock.
//
// Fault-free run: CYCLES random input patterns; every cycle the state must
// match the reference model and the test output must stay 0; every group
// (delayed address value) must occur at least once on some multiplexer.
// Fault campaign: the same input sequence is replayed once per fault. The
// faults are stuck-at-0/1 on each next-state logic output, on each state
// register bit and on each predicted-register bit. A fault is "activated"
// in the first cycle the FSM state differs from the fault-free reference
// and "detected" in the first cycle the test output is 1; the latency is
// the difference. A detection before activation is a false alarm and
// counts as a failure. Results are printed as a table row; done rises at
// the end and checks/failures hold the counts.
module spare_fsm_campaign
  import tb_spare_ref_pkg::*;
#(
  parameter int unsigned K      = 6,
  parameter int unsigned N      = 3,
  parameter int unsigned L      = 3,
  parameter int unsigned C      = 2,
  parameter int unsigned SEED   = 32'h5EED_0643,
  parameter spare_pkg::addr_idx_t ADDR_IDX = spare_pkg::default_addr(K, N, C, L),
  parameter int unsigned CYCLES = 5000,
  parameter bit          REQUIRE_ALL = 1'b0  // every fault must be detected
) (
  output logic done,
  output int   checks,
  output int   failures,
  output int   n_faults,
  output int   n_detected,
  output int   n_groups_seen
);

  logic clk = 1'b0, rst_n = 1'b0;
  logic [N-1:0] in;
  logic [K-1:0] state;
  logic test;

  spare_fsm #(.K(K), .N(N), .L(L), .C(C), .SEED(SEED), .ADDR_IDX(ADDR_IDX)) dut (
    .clk(clk), .rst_n(rst_n), .in_i(in), .state_o(state), .test_o(test));

  always #5 clk = ~clk;

  // fault control
  logic       f_on = 1'b0;
  int         f_site = 0, f_bit = 0;
  logic       f_val = 1'b0;

  for (genvar b = 0; b < K; b++) begin : g_fk
    always @(f_on or f_site or f_bit or f_val) begin
      if (f_on && f_bit == b && f_site == 0) force dut.u_nsl.ns_o[b] = f_val;
      else release dut.u_nsl.ns_o[b];
      if (f_on && f_bit == b && f_site == 1) force dut.u_state_reg.q[b] = f_val;
      else release dut.u_state_reg.q[b];
    end
  end
  for (genvar b = 0; b < L; b++) begin : g_fl
    always @(f_on or f_site or f_bit or f_val) begin
      if (f_on && f_bit == b && f_site == 2) force dut.u_pred_reg.q[b] = f_val;
      else release dut.u_pred_reg.q[b];
    end
  end

  logic [N-1:0] seq [CYCLES];
  bit           grp_seen [1 << C];
  int unsigned  ref_st;
  int           max_lat, n_act, n_latd;
  real          sum_lat;
  // per-fault activation/detection cycles of the FSM faults, for the
  // snapshot table
  int           fa [$], fd [$];
  localparam int NSNAP = 6;
  localparam int SNAP [NSNAP] = '{10, 50, 100, 500, 1000, 5000};

  task automatic do_reset();
    rst_n = 1'b0;
    in = '0;
    @(negedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    ref_st = 0;
  endtask

  // Runs the input sequence; returns activation and detection cycles
  // (-1 when they never happen).
  task automatic run_seq(input bit fault_free, output int a, output int d);
    a = -1; d = -1;
    if (state !== K'(ref_st)) a = 0;  // deviates already in the reset state
    for (int t = 0; t < CYCLES; t++) begin
      in = seq[t];
      @(posedge clk);
      ref_st = ref_ns(SEED, K, (int'(in) << K) | ref_st);
      @(negedge clk);
      if (fault_free) begin
        checks++;
        if (state !== K'(ref_st) || test !== 1'b0) begin
          failures++;
          $display("K=%0d N=%0d t=%0d state=%0d ref=%0d test=%0b", K, N, t, state, ref_st, test);
        end
        for (int j = 0; j < L; j++) grp_seen[dut.u_sel.addr_q[j*C +: C]] = 1'b1;
      end
      if (a < 0 && state !== K'(ref_st)) a = t;
      if (d < 0 && test) d = t;
      if (d >= 0 && (a >= 0 || f_site == 2)) break;
    end
  endtask

  initial begin
    int a, d;
    done = 1'b0; checks = 0; failures = 0;
    n_faults = 0; n_detected = 0; n_groups_seen = 0;
    n_act = 0; n_latd = 0; max_lat = 0; sum_lat = 0.0;
    foreach (grp_seen[g]) grp_seen[g] = 1'b0;
    for (int t = 0; t < CYCLES; t++) seq[t] = N'($urandom);

    // fault-free run
    do_reset();
    run_seq(1'b1, a, d);
    foreach (grp_seen[g]) if (grp_seen[g]) n_groups_seen++;
    checks++;
    if (n_groups_seen != (1 << C)) begin
      failures++;
      $display("K=%0d N=%0d only %0d groups seen", K, N, n_groups_seen);
    end

    // single stuck-at fault campaign
    for (int site = 0; site < 3; site++) begin
      for (int b = 0; b < ((site == 2) ? L : K); b++) begin
        for (int v = 0; v < 2; v++) begin
          f_on = 1'b0;
          do_reset();
          f_site = site; f_bit = b; f_val = v[0]; f_on = 1'b1;
          #1;
          run_seq(1'b0, a, d);
          f_on = 1'b0;
          n_faults++;
          if (a >= 0) n_act++;
          if (d >= 0) n_detected++;
          if (site < 2) begin
            fa.push_back(a);
            fd.push_back(d);
            checks++;
            if (d >= 0 && (a < 0 || d < a)) begin
              failures++;
              $display("K=%0d N=%0d false alarm site=%0d bit=%0d sa%0d", K, N, site, b, v);
            end
            if (a >= 0 && d >= a) begin
              n_latd++;
              sum_lat += real'(d - a);
              if (d - a > max_lat) max_lat = d - a;
            end
          end
          if (d < 0)
            $display("(%0d,%0d) missed: site %0d bit %0d stuck-at-%0d", 1 << K, N, site, b, v);
          if (REQUIRE_ALL) begin
            checks++;
            if (d < 0) begin
              failures++;
              $display("K=%0d N=%0d undetected site=%0d bit=%0d sa%0d", K, N, site, b, v);
            end
          end
        end
      end
    end
    checks++;
    if (n_detected == 0) failures++;
    $display("(%0d,%0d) L=%0d: faults=%0d activated=%0d detected=%0d missed=%0d max_lat=%0d avg_lat=%0.2f",
             1 << K, N, L, n_faults, n_act, n_detected, n_faults - n_detected, max_lat,
             (n_latd > 0) ? sum_lat / n_latd : 0.0);
    // Snapshot table over the FSM faults: after S patterns, faults not yet
    // activated (remaining), activated and detected, activated but not yet
    // detected (missed), and the max/average latency of the detected ones.
    for (int si = 0; si < NSNAP; si++) begin
      int rem, det_n, mis, mx;
      real sm;
      if (SNAP[si] > CYCLES) break;
      rem = 0; det_n = 0; mis = 0; mx = 0; sm = 0.0;
      foreach (fa[i]) begin
        if (fa[i] < 0 || fa[i] >= SNAP[si]) rem++;
        else if (fd[i] >= 0 && fd[i] < SNAP[si]) begin
          det_n++;
          sm += real'(fd[i] - fa[i]);
          if (fd[i] - fa[i] > mx) mx = fd[i] - fa[i];
        end else mis++;
      end
      $display("(%0d,%0d) after %0d patterns: remaining=%0d detected=%0d missed=%0d max_lat=%0d avg_lat=%0.2f",
               1 << K, N, SNAP[si], rem, det_n, mis, mx, (det_n > 0) ? sm / det_n : 0.0);
    end
    done = 1'b1;
  end

endmodule
