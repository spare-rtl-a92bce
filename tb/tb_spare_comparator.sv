// Self-checking testbench for spare_comparator: exhaustive over all pairs of
// 3-bit inputs, err_o must be 1 exactly when the two words differ.
module tb_spare_comparator;
  localparam int unsigned L = 3;
  logic [L-1:0] p, o;
  logic err;
  int checks = 0, failures = 0;

  spare_comparator #(.L(L)) dut (.pred_i(p), .obs_i(o), .err_o(err));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < (1 << L); a++)
      for (int b = 0; b < (1 << L); b++) begin
        p = L'(a); o = L'(b); #1;
        checks++;
        if (err !== (a != b)) begin failures++; $display("p=%0d o=%0d err=%0b", a, b, err); end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
