// ft_mux: MUX, the output multiplexer of the fault-tolerant scheme.
//
// Control inputs u1, u2 come from the checker. When they are 1 0 the
// multiplexer connects K1's lines y', z' to the primary outputs y and the
// next-state lines z; for every other value (0 1, 0 0, 1 1) it connects K2's
// lines y'', z''. This rule is the scheme's own. Purely combinational.
module ft_mux
  import ft_fsm_pkg::*;
(
  input  logic u1,
  input  logic u2,
  input  y_t   y_a,  // y'  from K1
  input  z_t   z_a,  // z'  from K1
  input  y_t   y_b,  // y'' from K2
  input  z_t   z_b,  // z'' from K2
  output y_t   y,    // primary outputs y_1..y_m
  output z_t   z     // next state z_1..z_p
);

  logic sel_k1;

  assign sel_k1 = u1 && !u2;

  always_comb begin
    y = sel_k1 ? y_a : y_b;
    z = sel_k1 ? z_a : z_b;
  end

endmodule
