// Control unit of the clock-gated adder.
//
// It decides, cycle by cycle, whether the adder is active or idle and
// produces the enable for the AND clock gate. The state register samples the
// external request add_req on the FALLING edge of clk, so clk_en only changes
// while clk is low and is steady through each high phase: the AND gate's
// output is then a whole clock pulse or nothing, never a glitch.
//
// Timing: add_req, set up before the falling edge of cycle n, makes clk_en
// high from that falling edge, lets the rising edge that ends cycle n through
// the gate, and drops again at the next falling edge if add_req has gone low.
// result_valid is registered on the free-running rising edge and is high in
// the cycle after every rising edge that the gate let through, i.e. while the
// adder output shows a freshly loaded result.
//
// The request input, the idle/active state and the glitch-free timing follow
// the design's description of the control unit; the single request line, the
// falling-edge register, the asynchronous active-low reset to CG_IDLE and the
// result_valid flag are this implementation's choices.
module control_unit
  import cg_adder_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  logic      add_req,
  output cg_state_e state,
  output logic      clk_en,
  output logic      result_valid
);

  cg_state_e state_q;
  cg_state_e state_d;

  always_comb begin
    state_d = add_req ? CG_ACTIVE : CG_IDLE;
  end

  // Falling-edge state register: the enable is settled before clk rises.
  always_ff @(negedge clk or negedge rst_n) begin
    if (!rst_n) state_q <= CG_IDLE;
    else        state_q <= state_d;
  end

  // Marks the cycle after a rising edge on which the adder clock pulsed.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) result_valid <= 1'b0;
    else        result_valid <= (state_q == CG_ACTIVE);
  end

  assign state  = state_q;
  assign clk_en = (state_q == CG_ACTIVE);

endmodule
