// k2_comb: K2, the combinational part of the normal (unprotected) sequential
// circuit SC2.
//
// It realises the same outputs y'' and next-state lines z'' as K1, with the
// same state encoding, but without K1's extra code outputs, so it can be built
// at the lowest cost synthesis finds. Its outputs reach the primary outputs
// whenever the checker does not report a code word on K1.
//
// The machine is ft_fsm_pkg::fsm_step, shared with K1 (this design's example
// machine). Purely combinational.
module k2_comb
  import ft_fsm_pkg::*;
(
  input  x_t x,     // primary inputs x_1..x_n
  input  z_t z_q,   // present state from d''
  output y_t y,     // y''_1..y''_m
  output z_t z_nx   // z''_1..z''_p
);

  step_t s;

  always_comb begin
    s    = fsm_step(x, z_q);
    y    = s.y;
    z_nx = s.z;
  end

endmodule
