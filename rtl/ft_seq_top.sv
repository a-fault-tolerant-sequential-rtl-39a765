// ft_seq_top: fault-tolerant synchronous sequential circuit.
//
// One state machine is built twice. SCSC1 is a self-checking copy whose
// combinational part K1 also emits Berger check bits, so that every
// unidirectional error on its outputs gives a non-code word. SC2 is a plain,
// cheaper copy with the same state encoding. The checker Ch watches K1's
// outputs and drives u1 u2; the multiplexer passes K1's outputs y', z' when
// u1 u2 = 1 0 and SC2's outputs y'', z'' otherwise. The selected next state z
// is loaded into the state flip-flops of both copies, so whichever copy was
// wrong is put back on the correct state at the next clock edge.
//
// With one transient or intermittent fault at a time, in one module only, the
// outputs stay correct: a fault in SCSC1 is caught by the checker and SC2's
// outputs are used; a fault in SC2 is invisible because K1's code word is
// valid; a checker fault only chooses between two correct sources; a
// multiplexer fault swaps lines that carry equal values.
//
// Interface: clk, asynchronous active-low rst_n (this design's choice; the
// reset state is RESET_STATE (default 0)), inputs x, Mealy outputs y, and the
// next state z. err is this design's own observation output: 1 whenever the
// checker output is not 1 0, i.e. when SC2 drives y and z.
// Timing: y, z and err are combinational in x and the present state; the
// state advances at every rising clock edge.
module ft_seq_top
  import ft_fsm_pkg::*;
#(
  parameter z_t RESET_STATE = '0  // state loaded by rst_n
) (
  input  logic clk,
  input  logic rst_n,
  input  x_t   x,     // primary inputs x_1..x_n
  output y_t   y,     // primary outputs y_1..y_m
  output z_t   z,     // selected next state z_1..z_p
  output logic err    // checker saw a non-code word (or reports one)
);

  y_t   k1_y;    // y'
  chk_t k1_chk;  // y'_{m+1}..y'_{m+s}
  z_t   k1_z;    // z'
  y_t   k2_y;    // y''
  z_t   k2_z;    // z''
  logic u1, u2;  // checker outputs

  scsc1 #(.RESET_STATE(RESET_STATE)) u_scsc1 (
    .clk  (clk),
    .rst_n(rst_n),
    .x    (x),
    .z_fb (z),
    .y    (k1_y),
    .chk  (k1_chk),
    .z_nx (k1_z)
  );

  sc2 #(.RESET_STATE(RESET_STATE)) u_sc2 (
    .clk  (clk),
    .rst_n(rst_n),
    .x    (x),
    .z_fb (z),
    .y    (k2_y),
    .z_nx (k2_z)
  );

  berger_checker u_ch (
    .y  (k1_y),
    .chk(k1_chk),
    .z  (k1_z),
    .u1 (u1),
    .u2 (u2)
  );

  ft_mux u_mux (
    .u1 (u1),
    .u2 (u2),
    .y_a(k1_y),
    .z_a(k1_z),
    .y_b(k2_y),
    .z_b(k2_z),
    .y  (y),
    .z  (z)
  );

  assign err = !(u1 && !u2);

endmodule
