// Test lane for the wider-adder runs: one clock_gated_adder of width W with
// its own random stimulus and reference model. Each cycle add_req is random
// and the operands are random W-bit values (built from 32-bit $urandom
// words); one cycle in 13 adds all ones plus carry in, so the carry ripples
// through all W stages. The lane checks that sum/cout equal the reference
// a + b + cin one cycle after each request, that they hold in idle cycles,
// and that the gated clock pulses once per request. It counts its checks and
// failures and raises done after CYCLES cycles.
module scaling_lane #(
  parameter int unsigned W      = 16,
  parameter int unsigned CYCLES = 500
) (
  input  logic        clk,
  input  logic        rst_n,
  output int unsigned checks,
  output int unsigned failures,
  output int unsigned full_ripples,
  output logic        done
);

  logic         add_req = 1'b0;
  logic [W-1:0] a = '0, b = '0;
  logic         cin = 1'b0;
  logic [W-1:0] sum;
  logic         cout, clk_en, gclk, result_valid;
  int unsigned  gpulses = 0;

  clock_gated_adder #(.WIDTH(W)) dut (
    .clk(clk), .rst_n(rst_n), .add_req(add_req), .a(a), .b(b), .cin(cin),
    .sum(sum), .cout(cout), .clk_en(clk_en), .gclk(gclk),
    .result_valid(result_valid)
  );

  always @(posedge gclk) gpulses++;

  function automatic logic [W-1:0] rand_word();
    logic [W-1:0] r = '0;
    for (int i = 0; i < W; i += 32) r = (r << 32) | W'($urandom);
    return r;
  endfunction

  initial begin
    logic [W:0]  exp;
    logic        req_prev;
    logic        req_now;
    int unsigned p0;
    checks = 0; failures = 0; full_ripples = 0; done = 1'b0;
    exp = '0; req_prev = 1'b0;
    @(posedge rst_n);
    @(posedge clk); #1;
    for (int n = 0; n < CYCLES; n++) begin
      req_now = 1'($urandom_range(0, 1));
      if (n % 13 == 3) begin
        req_now = 1'b1; a = '1; b = '0; cin = 1'b1;
        full_ripples++;
      end else begin
        a = rand_word(); b = rand_word(); cin = 1'($urandom);
      end
      add_req = req_now;
      #3;
      checks++;
      if ({cout, sum} !== exp || result_valid !== req_prev) begin
        failures++;
        $display("FAIL W=%0d cycle %0d: got %b_%h valid=%b, expected %h valid=%b",
                 W, n, cout, sum, result_valid, exp, req_prev);
      end
      p0 = gpulses;
      @(posedge clk); #1;
      checks++;
      if (gpulses - p0 != (req_now ? 1 : 0)) begin
        failures++;
        $display("FAIL W=%0d cycle %0d: gated pulse count", W, n);
      end
      if (req_now) exp = {1'b0, a} + {1'b0, b} + {{W{1'b0}}, cin};
      req_prev = req_now;
    end
    done = 1'b1;
  end

endmodule
