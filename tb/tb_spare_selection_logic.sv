// Self-checking testbench for spare_selection_logic with 6 state bits, 3
// multiplexers and 2 address bits. A hand-written assignment table is
// used, and each multiplexer gets its own random address; each cycle every
// output must equal the state bit that the table names for that
// multiplexer's address applied one clock earlier.
module tb_spare_selection_logic;
  import spare_pkg::*;
  localparam int unsigned K = 6, L = 3, C = 2;
  // group -> three bit indices
  localparam int unsigned TAB [4][3] = '{'{5, 0, 3}, '{1, 2, 4}, '{4, 4, 0}, '{3, 1, 5}};

  function automatic rsel_t make_rsel();
    rsel_t r = '0;
    for (int g = 0; g < 4; g++)
      for (int j = 0; j < 3; j++) r[(g*L + j)*IDXW +: IDXW] = 8'(TAB[g][j]);
    return r;
  endfunction

  logic clk = 1'b0, rst_n = 1'b0;
  logic [L*C-1:0] addr, addr_prev;
  logic [K-1:0] st;
  logic [L-1:0] obs, e;
  int checks = 0, failures = 0;

  spare_selection_logic #(.K(K), .L(L), .C(C), .R_SEL(make_rsel())) dut (
    .clk(clk), .rst_n(rst_n), .addr_i(addr), .state_i(st), .obs_o(obs));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    addr = '0; st = '0; addr_prev = '0;
    #12 rst_n = 1'b1;
    for (int i = 0; i < 400; i++) begin
      @(negedge clk);
      addr = (L*C)'($urandom);
      st = K'($urandom);
      #1;
      for (int j = 0; j < 3; j++) e[j] = st[TAB[addr_prev[j*C +: C]][j]];
      checks++;
      if (obs !== e) begin failures++; $display("i=%0d addr_prev=%h st=%b obs=%b exp=%b", i, addr_prev, st, obs, e); end
      @(posedge clk); addr_prev = addr;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
