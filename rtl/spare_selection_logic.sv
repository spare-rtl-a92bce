// SPaRe selection logic: L multiplexers that route, for every transition,
// the state register bits that the prediction logic predicted.
//
// The address of each multiplexer is C bits wide. SPaRe has no address
// logic: the address bits are taken directly from previous-state and input
// bits (or, in a hand-designed case such as the 2-bit counter, from a small
// function of them) and are delayed by one clock in C flip-flops, so that
// they line up with the state register, which has just loaded the next
// state. Multiplexer j then drives obs_o[j] = state_i[R_SEL(g_j, j)],
// where g_j is its delayed address.
// With 2**C groups each multiplexer chooses among at most 2**C of the K
// state bits. The assignment table R_SEL comes from the offline selection
// algorithm; its default here is spare_pkg::default_rsel.
//
// Each multiplexer has its own C address bits (addr_i[j*C +: C]) and its
// own C flip-flops. Usually all multiplexers are wired to the same bits;
// synthesis then merges the duplicate flip-flops.
//
// Timing: addr_i is sampled on the rising clock edge together with the
// state register; obs_o is combinational from state_i and the delayed
// address. Reset clears the address flip-flops (group 0).
module spare_selection_logic
  import spare_pkg::*;
#(
  parameter int unsigned K     = 6,   // state bits (FSM outputs)
  parameter int unsigned L     = 3,   // predicted bits per transition
  parameter int unsigned C     = 2,   // address bits
  parameter rsel_t       R_SEL = default_rsel(K, L, C)
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [L*C-1:0] addr_i, // address of each multiplexer, this transition
  input  logic [K-1:0] state_i,  // state register output
  output logic [L-1:0] obs_o     // selected state bits
);

  localparam int unsigned KW = (K > 1) ? $clog2(K) : 1;

  logic [L*C-1:0] addr_q;
  logic [KW-1:0] idx;

  // Address flip-flops.
  spare_register #(.W(L*C)) u_addr_ff (
    .clk  (clk),
    .rst_n(rst_n),
    .d    (addr_i),
    .q    (addr_q)
  );

  // L multiplexers, each (2**C)-to-1 over the state bits named by R_SEL.
  always_comb begin
    for (int unsigned j = 0; j < L; j++) begin
      idx      = KW'(R_SEL[(int'(addr_q[j*C +: C])*L + j)*IDXW +: IDXW]);
      obs_o[j] = state_i[idx];
    end
  end

  // The packed tables hold at most MAX_GROUPS groups of MAX_L entries.
  if ((1 << C) > MAX_GROUPS || L > MAX_L) begin : g_size_bad
    $error("C or L exceeds the size of the selection tables");
  end

  // Every table entry in use must name an existing state bit.
  for (genvar g = 0; g < (1 << C); g++) begin : g_chk_g
    for (genvar j = 0; j < L; j++) begin : g_chk_j
      if (int'(R_SEL[(g*L + j)*IDXW +: IDXW]) >= K) begin : g_bad
        $error("R_SEL entry out of range");
      end
    end
  end

endmodule
