// L-bit inequality comparator: the property verifier of SPaRe.
//
// Compares the predicted bits, held one cycle in the predicted L-bit
// register, with the L state bits that the selection logic routed to it.
// err_o is 1 when any bit pair differs (test output, error if '1') and is
// purely combinational, as in the method's block diagram.
module spare_comparator #(
  parameter int unsigned L = 3
) (
  input  logic [L-1:0] pred_i,  // registered prediction
  input  logic [L-1:0] obs_i,   // selected state register bits
  output logic         err_o    // 1 = fault detected
);

  assign err_o = |(pred_i ^ obs_i);

endmodule
