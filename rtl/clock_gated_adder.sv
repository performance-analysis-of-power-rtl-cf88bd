// Clock-gated ripple-carry adder (top level).
//
// The adder only consumes clock power when there is work: the control unit
// turns the external request add_req into a glitch-free enable, the AND clock
// gate passes clk to the operand register only while that enable is high,
// and the ripple-carry adder computes from the registered operands. In an
// idle cycle the gated clock stays low, the operand register holds, and
// because the adder's inputs do not change none of its nodes toggle either;
// sum and cout keep showing the last result.
//
// Interface and timing: drive a, b, cin together with add_req during a cycle
// (settled before the falling edge). The next rising edge loads them, and
// sum/cout are valid, after the ripple delay, in the following cycle, which
// result_valid marks. A new operation can be issued every cycle. clk_en and
// gclk are brought out so the gating can be observed. rst_n is asynchronous,
// active low, and clears the operand register and the control state.
//
// The three parts (ripple-carry adder, AND-based gate, control unit) and the
// 8-bit width follow the original design; where the flip-flops sit (operands
// registered, adder after them), the one-cycle latency and the reset values
// are this implementation's choices.
module clock_gated_adder #(
  parameter int unsigned WIDTH = cg_adder_pkg::DATA_W
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             add_req,
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] sum,
  output logic             cout,
  output logic             clk_en,
  output logic             gclk,
  output logic             result_valid
);

  import cg_adder_pkg::*;

  cg_state_e        state;
  logic [WIDTH-1:0] a_q;
  logic [WIDTH-1:0] b_q;
  logic             cin_q;

  control_unit u_ctrl (
    .clk          (clk),
    .rst_n        (rst_n),
    .add_req      (add_req),
    .state        (state),
    .clk_en       (clk_en),
    .result_valid (result_valid)
  );

  clock_gate u_cg (
    .clk  (clk),
    .en   (clk_en),
    .gclk (gclk)
  );

  // Operand register on the gated clock: it only toggles in active cycles.
  always_ff @(posedge gclk or negedge rst_n) begin
    if (!rst_n) begin
      a_q   <= '0;
      b_q   <= '0;
      cin_q <= 1'b0;
    end else begin
      a_q   <= a;
      b_q   <= b;
      cin_q <= cin;
    end
  end

  ripple_carry_adder #(.WIDTH(WIDTH)) u_rca (
    .a    (a_q),
    .b    (b_q),
    .cin  (cin_q),
    .sum  (sum),
    .cout (cout)
  );

  // The gate only opens in the active state.
  always @(posedge gclk) begin
    assert (state == CG_ACTIVE)
      else $error("clock_gated_adder: gated clock pulsed while idle");
  end

endmodule
