// Self-checking testbench for spare_register: reset value, then q must equal
// the d sampled at the previous rising edge, for random data, and reset
// must act asynchronously.
module tb_spare_register;
  localparam int unsigned W = 6;
  localparam logic [W-1:0] RV = 6'h2A;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [W-1:0] d, q, exp_q;
  int checks = 0, failures = 0;

  spare_register #(.W(W), .RST_VAL(RV)) dut (.clk(clk), .rst_n(rst_n), .d(d), .q(q));

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    d = '0;
    #12;
    checks++; if (q !== RV) begin failures++; $display("reset value %h", q); end
    rst_n = 1'b1;
    exp_q = d;  // the edge at 15 loads d
    for (int i = 0; i < 200; i++) begin
      @(negedge clk);
      checks++; if (q !== exp_q) begin failures++; $display("cycle %0d q=%h exp=%h", i, q, exp_q); end
      d = W'($urandom);
      @(posedge clk); #1 exp_q = d;
    end
    // asynchronous reset between edges
    @(negedge clk); #2 rst_n = 1'b0; #1;
    checks++; if (q !== RV) begin failures++; $display("async reset failed"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
