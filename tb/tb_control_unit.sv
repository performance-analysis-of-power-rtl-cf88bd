// Self-checking testbench of control_unit.
//
// add_req is driven with a random pattern shortly after each rising edge.
// Checked against a reference written here: just before every rising edge
// clk_en and state must equal the add_req of the current cycle (it was
// sampled at the falling edge); clk_en must never change while clk is high;
// result_valid must equal the enable that the previous rising edge saw.
// Reset is applied twice, once in mid-run with the unit active, and must
// force CG_IDLE, clk_en low and result_valid low at once.
module tb_control_unit;

  import cg_adder_pkg::*;

  localparam int unsigned CYCLES = 400;

  logic      clk = 1'b0;
  logic      rst_n = 1'b1;
  logic      add_req = 1'b0;
  cg_state_e state;
  logic      clk_en;
  logic      result_valid;

  int unsigned checks = 0;
  int unsigned failures = 0;
  int unsigned high_phase_changes = 0;

  control_unit dut (
    .clk(clk), .rst_n(rst_n), .add_req(add_req),
    .state(state), .clk_en(clk_en), .result_valid(result_valid)
  );

  always #5 clk = ~clk;

  always @(clk_en) if (clk && $time != 0) high_phase_changes++;

  initial begin : watchdog
    #((CYCLES + 40) * 10);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_reset_state(input string where);
    checks++;
    if (state !== CG_IDLE || clk_en !== 1'b0 || result_valid !== 1'b0) begin
      failures++;
      $display("FAIL %s: state=%0d clk_en=%b valid=%b after reset",
               where, state, clk_en, result_valid);
    end
  endtask

  initial begin
    logic en_at_edge;
    logic req_now;
    rst_n = 1'b0;  // a falling edge so the asynchronous reset acts
    #1;
    expect_reset_state("power-up");
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;

    en_at_edge = 1'b0;
    for (int n = 0; n < CYCLES; n++) begin
      req_now = 1'($urandom_range(0, 1));
      if (n == CYCLES / 2) req_now = 1'b1;
      add_req = req_now;
      // The loop body starts just after a rising edge, so this waits for the
      // edge that ends the cycle; clk_en was updated at the falling edge
      // before it and is compared before any rising-edge update.
      @(posedge clk);
      checks++;
      if (clk_en !== req_now || state !== (req_now ? CG_ACTIVE : CG_IDLE)) begin
        failures++;
        $display("FAIL cycle %0d: clk_en=%b state=%0d at rising edge, add_req=%b",
                 n, clk_en, state, req_now);
      end
      en_at_edge = clk_en;
      #1;
      checks++;
      if (result_valid !== en_at_edge) begin
        failures++;
        $display("FAIL cycle %0d: result_valid=%b, enable at edge was %b",
                 n, result_valid, en_at_edge);
      end
      if (n == CYCLES / 2) begin
        // asynchronous reset in the low phase while active
        @(negedge clk); #1;
        rst_n = 1'b0;
        #1;
        expect_reset_state("mid-run");
        @(posedge clk); #1;
        rst_n = 1'b1;
      end
    end

    checks++;
    if (high_phase_changes != 0) begin
      failures++;
      $display("FAIL: clk_en changed %0d times while clk was high", high_phase_changes);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
