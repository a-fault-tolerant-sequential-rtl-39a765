// scsc1: SCSC1, the self-checking sequential circuit of the scheme.
//
// K1 (k1_comb) together with its state flip-flops d' (state_reg). The
// flip-flops load z_fb, the next state chosen by the multiplexer, not K1's own
// z', as the scheme's block diagram connects them. All outputs of K1 - y',
// the check bits and z' - leave the module for the checker.
//
// Timing: y', chk and z' are combinational in x and the present state; the
// present state changes at the rising edge of clk. Reset (asynchronous, active
// low, to RESET_STATE (default 0)) is this design's choice.
module scsc1
  import ft_fsm_pkg::*;
#(
  parameter z_t RESET_STATE = '0  // state loaded by rst_n
) (
  input  logic clk,
  input  logic rst_n,
  input  x_t   x,      // primary inputs
  input  z_t   z_fb,   // selected next state z_1..z_p
  output y_t   y,      // y'_1..y'_m
  output chk_t chk,    // y'_{m+1}..y'_{m+s}
  output z_t   z_nx    // z'_1..z'_p
);

  z_t z_q;  // present state, flip-flops d'

  state_reg #(.P_STATE(P_STATE), .RESET_STATE(RESET_STATE)) u_dreg (
    .clk  (clk),
    .rst_n(rst_n),
    .d    (z_fb),
    .q    (z_q)
  );

  k1_comb u_k1 (
    .x   (x),
    .z_q (z_q),
    .y   (y),
    .chk (chk),
    .z_nx(z_nx)
  );

endmodule
