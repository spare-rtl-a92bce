// W-bit D flip-flop register with asynchronous active-low reset.
//
// Used for every storage element of a SPaRe-protected FSM: the FSM's own
// state register, the predicted L-bit register that holds the prediction
// for one clock cycle, and the flip-flops that delay the selection address.
// q takes d on each rising clock edge; rst_n low forces q to RST_VAL.
// The reset style and value are this design's choice; the method only asks
// for one-cycle delay elements.
module spare_register #(
  parameter int unsigned W       = 1,
  parameter logic [W-1:0] RST_VAL = '0
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) q <= RST_VAL;
    else        q <= d;
  end

endmodule
