// state_reg: the state flip-flops of one sequential circuit (d'_1..d'_p in
// SCSC1, d''_1..d''_p in SC2).
//
// Both registers load the same next state z, the one the multiplexer selected,
// so a copy whose combinational part produced a wrong next state is brought
// back to the correct state at the next clock edge. That feedback follows the
// scheme's block diagram. Reset is this design's choice: asynchronous, active
// low, loading RESET_STATE.
//
// Timing: q takes d at every rising edge of clk; no enable.
module state_reg #(
  parameter int unsigned       P_STATE     = 3,
  parameter logic [P_STATE-1:0] RESET_STATE = '0
) (
  input  logic               clk,
  input  logic               rst_n,  // asynchronous reset, active low
  input  logic [P_STATE-1:0] d,      // next state z from the multiplexer
  output logic [P_STATE-1:0] q       // present state
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) q <= RESET_STATE;
    else        q <= d;
  end

endmodule
