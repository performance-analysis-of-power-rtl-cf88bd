// End-to-end testbench of clock_gated_adder at its default 8-bit width.
//
// A random stream of operations with idle gaps of random length is driven:
// in each cycle add_req is high with probability 1/2 and a, b, cin are
// random (they also change in idle cycles, which the design must ignore).
// A reference model here keeps the last accepted operands and computes
// a + b + cin with integer arithmetic. Checked every cycle:
//   - result_valid is high exactly in the cycle after a requested cycle,
//     i.e. one cycle of latency, and sum/cout then equal the reference;
//   - in idle cycles sum/cout hold the previous result;
//   - the gated clock pulses exactly once per requested cycle and never in an
//     idle cycle, and clk_en never changes while clk is high.
// Mechanisms counted, each of which must occur: active cycles, idle cycles
// with the clock blocked, back-to-back operations, a carry out, a carry
// propagating through all 8 stages, carry in used, and an asynchronous reset
// in mid-run. The gated/free clock edge ratio is printed as the measure of
// saved flip-flop clocking.
module tb_clock_gated_adder;

  localparam int unsigned W = 8;
  localparam int unsigned CYCLES = 2000;

  logic         clk = 1'b0;
  logic         rst_n = 1'b1;
  logic         add_req = 1'b0;
  logic [W-1:0] a = '0, b = '0;
  logic         cin = 1'b0;
  logic [W-1:0] sum;
  logic         cout, clk_en, gclk, result_valid;

  int unsigned checks = 0;
  int unsigned failures = 0;
  int unsigned gpulses = 0, clk_edges = 0;
  int unsigned n_active = 0, n_idle = 0, n_b2b = 0, n_cout = 0;
  int unsigned n_full_ripple = 0, n_cin = 0, n_reset = 0, n_en_glitch = 0;

  clock_gated_adder dut (
    .clk(clk), .rst_n(rst_n), .add_req(add_req), .a(a), .b(b), .cin(cin),
    .sum(sum), .cout(cout), .clk_en(clk_en), .gclk(gclk),
    .result_valid(result_valid)
  );

  always #5 clk = ~clk;
  always @(posedge gclk) gpulses++;
  always @(posedge clk) clk_edges++;
  always @(clk_en) if (clk && $time != 0) n_en_glitch++;

  initial begin : watchdog
    #((CYCLES + 50) * 10);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic fail_if(input logic bad, input string msg);
    checks++;
    if (bad) begin
      failures++;
      if (failures < 20) $display("FAIL t=%0t: %s", $time, msg);
    end
  endtask

  task automatic need(input int unsigned count, input string what);
    checks++;
    if (count == 0) begin
      failures++;
      $display("FAIL: mechanism never exercised: %s", what);
    end else begin
      $display("  %-34s %0d", what, count);
    end
  endtask

  initial begin
    logic [W:0]   exp;        // {cout, sum} of the last accepted operation
    logic         req_prev;   // add_req of the previous cycle
    logic         req_now;
    int unsigned  pulses_before;

    exp = '0;
    req_prev = 1'b0;
    rst_n = 1'b0;  // a falling edge so the asynchronous reset acts
    #2;
    fail_if({cout, sum} !== '0 || result_valid !== 1'b0, "outputs not cleared by reset");
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;

    for (int n = 0; n < CYCLES; n++) begin
      // drive this cycle's inputs, 1 time unit after the rising edge
      req_now = 1'($urandom_range(0, 1));
      if (n % 97 == 5) begin          // make the longest carry chain happen
        req_now = 1'b1;
        a = '1; b = '0; cin = 1'b1;
      end else begin
        a = W'($urandom); b = W'($urandom); cin = 1'($urandom);
      end
      add_req = req_now;
      #3;
      // outputs of the previous edge: result_valid iff previous cycle requested
      fail_if(result_valid !== req_prev, "result_valid does not follow request by one cycle");
      fail_if({cout, sum} !== exp, $sformatf("sum/cout %b_%h expected %h", cout, sum, exp));

      pulses_before = gpulses;
      @(posedge clk);
      #1;
      fail_if(gpulses - pulses_before != (req_now ? 1 : 0),
              "gated clock pulse count does not match request");
      if (req_now) begin
        exp = {1'b0, a} + {1'b0, b} + {{W{1'b0}}, cin};
        n_active++;
        if (req_prev) n_b2b++;
        if (exp[W]) n_cout++;
        if (cin) n_cin++;
        if (a == '1 && b == '0 && cin) n_full_ripple++;
      end else begin
        n_idle++;
      end
      req_prev = req_now;

      if (n == CYCLES / 2) begin
        // asynchronous reset in mid-run, in the low phase
        @(negedge clk); #1;
        rst_n = 1'b0;
        #1;
        fail_if({cout, sum} !== '0 || clk_en !== 1'b0,
                "reset did not clear operands and enable");
        n_reset++;
        @(posedge clk); #1;
        fail_if(result_valid !== 1'b0, "result_valid high during reset");
        rst_n = 1'b1;
        add_req = 1'b0;
        exp = '0;
        req_prev = 1'b0;
      end
    end

    fail_if(n_en_glitch != 0, "clk_en changed while clk high");
    $display("mechanisms:");
    need(n_active, "active cycles (clock passed)");
    need(n_idle, "idle cycles (clock blocked)");
    need(n_b2b, "back-to-back operations");
    need(n_cout, "carry out");
    need(n_full_ripple, "carry through all stages");
    need(n_cin, "carry in used");
    need(n_reset, "asynchronous reset in mid-run");
    $display("gated clock edges %0d of %0d free-running edges", gpulses, clk_edges);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
