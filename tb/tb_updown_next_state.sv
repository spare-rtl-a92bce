// Self-checking testbench for updown_next_state: all eight rows of the
// counter's transition table, written out as constants.
module tb_updown_next_state;
  logic ud;
  logic [1:0] ps, ns;
  int checks = 0, failures = 0;
  // expected {NS1,NS0} indexed by {U/D,PS1,PS0}
  localparam logic [1:0] EXP [8] = '{2'b01, 2'b10, 2'b11, 2'b00,
                                     2'b11, 2'b00, 2'b01, 2'b10};

  updown_next_state dut (.ud_i(ud), .ps_i(ps), .ns_o(ns));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      {ud, ps} = 3'(v); #1;
      checks++;
      if (ns !== EXP[v]) begin failures++; $display("row %0d ns=%b exp=%b", v, ns, EXP[v]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
