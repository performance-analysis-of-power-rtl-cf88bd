// AND-based clock gate.
//
// gclk = clk & en. While en is low the gated clock stays low and every
// flip-flop on it holds its value without toggling; while en is high gclk is
// a copy of clk. The AND gate itself has no state and no protection against
// glitches: an enable that changed while clk is high would cut or create a
// clock pulse. The enable therefore has to be launched from the falling edge
// of clk (the control unit does this) so it is settled for the whole high
// phase. An immediate assertion reports any enable change seen while clk is
// high. The plain AND gate is what the design calls for; a production flow
// would map it to a library clock-gating cell.
module clock_gate (
  input  logic clk,
  input  logic en,
  output logic gclk
);

  assign gclk = clk & en;

  // Glitch rule: en may only move during the low phase of clk.
  always @(en) begin
    assert (!clk)
      else $error("clock_gate: enable changed while clk high (glitch on gclk)");
  end

endmodule
