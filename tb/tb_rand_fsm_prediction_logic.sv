// Self-checking testbench for rand_fsm_prediction_logic at its default size
// (6 state bits, 3 inputs, 3 predicted bits, 2 address bits): for all 512
// vectors, each prediction bit must equal the next-state bit that the
// default assignment names for the vector's group, computed from the
// reference model. A second instance gives each output its own address
// bits (output 0 on vector bits 7 and 6, output 1 on 8 and 7, output 2 on
// 6 and 8) and is checked the same way, per output.
module tb_rand_fsm_prediction_logic;
  import tb_spare_ref_pkg::*;
  localparam int unsigned K = 6, N = 3, L = 3, C = 2, SEED = 32'h5EED_0643;
  logic [K-1:0] ps;
  logic [N-1:0] in;
  logic [L-1:0] pred, e, pred2, e2;
  localparam int unsigned APOS [3][2] = '{'{7, 6}, '{8, 7}, '{6, 8}};
  localparam spare_pkg::addr_idx_t PER_MUX =
    spare_pkg::addr_idx_t'({8'd8, 8'd6, 8'd7, 8'd8, 8'd6, 8'd7});
  int checks = 0, failures = 0;

  rand_fsm_prediction_logic dut (.ps_i(ps), .in_i(in), .pred_o(pred));
  rand_fsm_prediction_logic #(.ADDR_IDX(PER_MUX)) dut2 (.ps_i(ps), .in_i(in), .pred_o(pred2));

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int unsigned ns, g;
    for (int v = 0; v < (1 << (K + N)); v++) begin
      {in, ps} = (K+N)'(v); #1;
      ns = ref_ns(SEED, K, v);
      g = 0;
      for (int i = 0; i < C; i++) g |= ((v >> ref_addr_pos(K, N, i)) & 1) << i;
      for (int j = 0; j < L; j++) e[j] = 1'((ns >> ref_rsel(K, L, g, j)) & 1);
      checks++;
      if (pred !== e) begin failures++; $display("v=%0d g=%0d pred=%b exp=%b", v, g, pred, e); end
      for (int j = 0; j < L; j++) begin
        g = ((v >> APOS[j][0]) & 1) | (((v >> APOS[j][1]) & 1) << 1);
        e2[j] = 1'((ns >> ref_rsel(K, L, g, j)) & 1);
      end
      checks++;
      if (pred2 !== e2) begin failures++; $display("per-mux v=%0d pred=%b exp=%b", v, pred2, e2); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
