// k1_comb: K1, the combinational part of the self-checking sequential circuit.
//
// From the primary inputs x and the present state z_q (held in flip-flops d')
// it computes the primary outputs y' and next-state lines z' of the protected
// state machine, and in addition the check outputs chk (y'_{m+1}..y'_{m+s})
// that make the word {y', z', chk} a code word. The checker watches all three
// groups; any unidirectional error on them gives a non-code word.
//
// Following the scheme: K1 has the same outputs as K2 plus the extra code
// outputs. This design's choices: the code is a Berger code (zeros count of
// {y', z'}), and the machine is ft_fsm_pkg::fsm_step. The gate-level technique
// that makes every single stuck-at fault of K1 unidirectional belongs to logic
// synthesis and is not expressed in this RTL.
//
// Purely combinational; no clock.
module k1_comb
  import ft_fsm_pkg::*;
(
  input  x_t   x,     // primary inputs x_1..x_n
  input  z_t   z_q,   // present state from d'
  output y_t   y,     // y'_1..y'_m
  output chk_t chk,   // y'_{m+1}..y'_{m+s}
  output z_t   z_nx   // z'_1..z'_p
);

  step_t s;

  always_comb begin
    s    = fsm_step(x, z_q);
    y    = s.y;
    z_nx = s.z;
    chk  = berger_check({s.y, s.z});
  end

endmodule
