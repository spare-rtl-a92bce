// Self-checking testbench for rand_fsm_next_state at its default size
// (6 state bits, 3 inputs): all 512 (state, input) pairs against the
// reference table of tb_spare_ref_pkg.
module tb_rand_fsm_next_state;
  import tb_spare_ref_pkg::*;
  localparam int unsigned K = 6, N = 3, SEED = 32'h5EED_0643;
  logic [K-1:0] ps, ns;
  logic [N-1:0] in;
  int checks = 0, failures = 0;

  rand_fsm_next_state dut (.ps_i(ps), .in_i(in), .ns_o(ns));

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int unsigned e;
    for (int v = 0; v < (1 << (K + N)); v++) begin
      {in, ps} = (K+N)'(v); #1;
      e = ref_ns(SEED, K, v);
      checks++;
      if (ns !== K'(e)) begin failures++; $display("v=%0d ns=%0d exp=%0d", v, ns, e); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
