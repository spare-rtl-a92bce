// Combinational prediction logic of the SPaRe-protected 2-bit up/down
// counter.
//
// For every transition it produces one bit: the value the counter's next
// state will have in the bit that SPaRe observes for that transition. The
// observed bit is NS0 when PS1 xor PS0 = 0 and NS1 when PS1 xor PS0 = 1,
// which gives the truth table
//
//     U/D PS1 PS0 | pred        U/D PS1 PS0 | pred
//      0   0   0  |  1 (NS0)     1   0   0  |  1 (NS0)
//      0   0   1  |  1 (NS1)     1   0   1  |  0 (NS1)
//      0   1   0  |  1 (NS1)     1   1   0  |  0 (NS1)
//      0   1   1  |  0 (NS0)     1   1   1  |  0 (NS0)
//
// i.e. pred = 1 for any up-count except from 11, and for a down-count from
// 00 only. The function is written as its own two-level logic, not as a
// copy of the next-state logic, so that it is a one-output replica.
module updown_prediction_logic (
  input  logic       ud_i,   // 0 = up, 1 = down
  input  logic [1:0] ps_i,   // present state {PS1, PS0}
  output logic       pred_o  // predicted value of the observed bit
);

  assign pred_o = (~ud_i & ~(ps_i[1] & ps_i[0]))
                | ( ud_i & ~ps_i[1] & ~ps_i[0]);

endmodule
