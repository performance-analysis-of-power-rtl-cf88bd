// Self-checking testbench of clock_gate.
//
// The enable is changed only on falling clock edges, as the control unit
// does, following a random pattern. The testbench checks gclk == clk & en in
// the middle of every high and low phase, and counts rising edges of gclk
// against the number of cycles in which en was high: each enabled cycle must
// give exactly one gated pulse and each disabled cycle none.
module tb_clock_gate;

  localparam int unsigned CYCLES = 400;

  logic clk = 1'b0;
  logic en  = 1'b0;
  logic gclk;

  int unsigned checks = 0;
  int unsigned failures = 0;
  int unsigned gpulses = 0;
  int unsigned en_cycles = 0;

  clock_gate dut (.clk(clk), .en(en), .gclk(gclk));

  always #5 clk = ~clk;

  always @(posedge gclk) gpulses++;

  initial begin : watchdog
    #((CYCLES + 20) * 10);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic gclk_before;
    for (int n = 0; n < CYCLES; n++) begin
      @(negedge clk);
      en <= 1'($urandom_range(0, 2) != 0);
      #2;  // low phase
      checks++;
      if (gclk !== 1'b0) begin
        failures++;
        $display("FAIL cycle %0d: gclk high during low clk phase", n);
      end
      gclk_before = gclk;
      @(posedge clk);
      if (en) en_cycles++;
      #2;  // high phase
      checks++;
      if (gclk !== en) begin
        failures++;
        $display("FAIL cycle %0d: gclk=%b in high phase with en=%b", n, gclk, en);
      end
    end
    @(negedge clk);
    checks++;
    if (gpulses != en_cycles) begin
      failures++;
      $display("FAIL: %0d gated pulses for %0d enabled cycles", gpulses, en_cycles);
    end
    checks++;
    if (en_cycles == 0 || en_cycles == CYCLES) begin
      failures++;
      $display("FAIL: enable pattern did not mix active and idle cycles");
    end
    $display("gated pulses %0d of %0d clock cycles", gpulses, CYCLES);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
