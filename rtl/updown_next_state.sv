// Next-state logic of the 2-bit up/down counter used as the worked example
// of SPaRe.
//
// With ud_i = 0 the counter counts up (00, 01, 10, 11, 00, ...), with
// ud_i = 1 it counts down. This is the original FSM hardware that the
// SPaRe logic monitors without changing it. Purely combinational; the
// state register is a separate spare_register. The transition table is
// the one of the counter example; the two-gate structure below is this
// design's own implementation of it.
module updown_next_state (
  input  logic       ud_i,  // 0 = up, 1 = down
  input  logic [1:0] ps_i,  // present state {PS1, PS0}
  output logic [1:0] ns_o   // next state {NS1, NS0}
);

  // Gate form of increment/decrement: NS0 toggles every cycle; NS1 toggles
  // when PS0 = 1 counting up or PS0 = 0 counting down.
  logic t1;  // 1 when PS1 must toggle

  assign t1      = ps_i[0] ^ ud_i;
  assign ns_o[0] = ~ps_i[0];
  assign ns_o[1] = ps_i[1] ^ t1;

endmodule
