// sc2: SC2, the normal (unprotected) sequential circuit of the scheme.
//
// K2 (k2_comb) together with its state flip-flops d'' (state_reg). Same state
// encoding as SCSC1, no code outputs. Its flip-flops also load z_fb, the next
// state chosen by the multiplexer, as in the scheme's block diagram.
//
// Timing: y'' and z'' are combinational in x and the present state; the
// present state changes at the rising edge of clk. Reset (asynchronous, active
// low, to RESET_STATE (default 0)) is this design's choice.
module sc2
  import ft_fsm_pkg::*;
#(
  parameter z_t RESET_STATE = '0  // state loaded by rst_n
) (
  input  logic clk,
  input  logic rst_n,
  input  x_t   x,      // primary inputs
  input  z_t   z_fb,   // selected next state z_1..z_p
  output y_t   y,      // y''_1..y''_m
  output z_t   z_nx    // z''_1..z''_p
);

  z_t z_q;  // present state, flip-flops d''

  state_reg #(.P_STATE(P_STATE), .RESET_STATE(RESET_STATE)) u_dreg (
    .clk  (clk),
    .rst_n(rst_n),
    .d    (z_fb),
    .q    (z_q)
  );

  k2_comb u_k2 (
    .x   (x),
    .z_q (z_q),
    .y   (y),
    .z_nx(z_nx)
  );

endmodule
