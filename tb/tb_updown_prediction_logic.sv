// Self-checking testbench for updown_prediction_logic: for each of the eight
// transitions the prediction must equal the observed next-state bit, i.e.
// NS0 when PS1 xor PS0 = 0 and NS1 otherwise, taken from the counter's
// transition table written out as constants.
module tb_updown_prediction_logic;
  logic ud, pred;
  logic [1:0] ps;
  int checks = 0, failures = 0;
  localparam logic [1:0] NS [8] = '{2'b01, 2'b10, 2'b11, 2'b00,
                                    2'b11, 2'b00, 2'b01, 2'b10};

  updown_prediction_logic dut (.ud_i(ud), .ps_i(ps), .pred_o(pred));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic e;
    for (int v = 0; v < 8; v++) begin
      {ud, ps} = 3'(v); #1;
      e = NS[v][ps[1] ^ ps[0]];
      checks++;
      if (pred !== e) begin failures++; $display("row %0d pred=%b exp=%b", v, pred, e); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
