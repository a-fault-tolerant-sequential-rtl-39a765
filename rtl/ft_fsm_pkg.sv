// ft_fsm_pkg: sizes, types and the state-machine function shared by the two
// copies of the sequential circuit in the fault-tolerant scheme.
//
// The scheme protects an arbitrary finite state machine. Both combinational
// parts (K1 in the self-checking copy, K2 in the unprotected copy) must realise
// the same machine with the same state encoding, so the machine is defined once
// here, as fsm_step(). To protect a different machine, change N_IN, M_OUT,
// P_STATE and fsm_step(); everything else follows.
//
// The example machine is this design's own choice (no particular machine is
// prescribed): an up/down modulo-2^P_STATE counter with enable.
//   x[0] = enable, x[1] = direction (1 = up)
//   next state = enable ? (up ? state+1 : state-1) : state
//   y[0] = carry  = enable & up   & (state == all ones)
//   y[1] = borrow = enable & ~up  & (state == 0)
// The outputs are Mealy outputs: they depend on the present state and x.
//
// The code that makes K1's outputs self-checking is a Berger code, also this
// design's choice: the check bits are the binary count of zeros among the
// information bits {y, z}. A Berger code detects every unidirectional error,
// which is the error class a single stuck-at fault or a single path delay
// fault in K1 is meant to produce.
package ft_fsm_pkg;

  localparam int unsigned N_IN    = 2;  // primary inputs x_1..x_n
  localparam int unsigned M_OUT   = 2;  // primary outputs y_1..y_m
  localparam int unsigned P_STATE = 3;  // state variables z_1..z_p
  localparam int unsigned K_INFO  = M_OUT + P_STATE;  // information bits of a code word
  localparam int unsigned S_CHK   = $clog2(K_INFO + 1); // Berger check bits y_{m+1}..y_{m+s}

  typedef logic [N_IN-1:0]    x_t;
  typedef logic [M_OUT-1:0]   y_t;
  typedef logic [P_STATE-1:0] z_t;
  typedef logic [S_CHK-1:0]   chk_t;

  // Result of one step of the machine: outputs and next state.
  typedef struct packed {
    y_t y;
    z_t z;
  } step_t;

  function automatic step_t fsm_step(input x_t x, input z_t z);
    step_t r;
    logic en, up;
    en = x[0];
    up = x[1];
    r.z    = en ? (up ? z + z_t'(1) : z - z_t'(1)) : z;
    r.y[0] = en &  up & (&z);
    r.y[1] = en & ~up & ~(|z);
    return r;
  endfunction

  // Berger check symbol: number of zeros among the information bits.
  function automatic chk_t berger_check(input logic [K_INFO-1:0] info);
    chk_t n;
    n = '0;
    for (int i = 0; i < int'(K_INFO); i++) begin
      n = n + chk_t'(!info[i]);
    end
    return n;
  endfunction

endpackage
