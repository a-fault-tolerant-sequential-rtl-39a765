// berger_checker: Ch, the code checker on the outputs of K1.
//
// It takes the whole output word of K1 - y', the check bits y'_{m+1}..y'_{m+s}
// and z' - recomputes the Berger check symbol (count of zeros) of the
// information bits {y', z'} and compares it with the received check bits.
// A code word gives u1 u2 = 1 0, which tells the multiplexer to pass K1's
// outputs; a non-code word gives 0 1, and the multiplexer then passes SC2's.
//
// The scheme allows the checker to be not self-testing, since a checker fault
// only switches the multiplexer between two correct sources; this one is the
// plain compare-and-flag form. The Berger code and the 0 1 value for a
// non-code word are this design's choices. Purely combinational.
module berger_checker
  import ft_fsm_pkg::*;
(
  input  y_t   y,    // y'_1..y'_m
  input  chk_t chk,  // y'_{m+1}..y'_{m+s}
  input  z_t   z,    // z'_1..z'_p
  output logic u1,
  output logic u2
);

  logic code_ok;

  always_comb begin
    code_ok = (berger_check({y, z}) == chk);
    u1 = code_ok;
    u2 = !code_ok;
  end

endmodule
