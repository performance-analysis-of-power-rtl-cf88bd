// Shared constants and types of the clock-gated adder.
//
// DATA_W is the operand width of the design, 8 bits as in the original
// proposal; every module takes it as the default of its WIDTH parameter so a
// wider adder is one parameter change. cg_state_e is the operational state
// kept by the control unit: CG_IDLE blocks the adder clock, CG_ACTIVE lets the
// next rising edge through.
package cg_adder_pkg;

  localparam int unsigned DATA_W = 8;

  typedef enum logic {
    CG_IDLE   = 1'b0,
    CG_ACTIVE = 1'b1
  } cg_state_e;

endpackage
