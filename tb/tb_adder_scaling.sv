// Wider-adder testbench: the clock-gated adder is meant to scale to larger
// operand widths by its WIDTH parameter alone. This runs 16-, 32- and 64-bit
// instances side by side from one clock and reset (one scaling_lane each)
// with random operations, idle gaps and full-length carry chains, and sums
// the lanes' checks and failures. Each lane must also have exercised a carry
// through all of its stages.
module tb_adder_scaling;

  localparam int unsigned CYCLES = 600;

  logic clk = 1'b0;
  logic rst_n = 1'b1;

  int unsigned c16, f16, r16, c32, f32, r32, c64, f64, r64;
  logic d16, d32, d64;
  int unsigned checks = 0;
  int unsigned failures = 0;

  always #5 clk = ~clk;

  scaling_lane #(.W(16), .CYCLES(CYCLES)) u16 (
    .clk(clk), .rst_n(rst_n), .checks(c16), .failures(f16), .full_ripples(r16), .done(d16));
  scaling_lane #(.W(32), .CYCLES(CYCLES)) u32 (
    .clk(clk), .rst_n(rst_n), .checks(c32), .failures(f32), .full_ripples(r32), .done(d32));
  scaling_lane #(.W(64), .CYCLES(CYCLES)) u64 (
    .clk(clk), .rst_n(rst_n), .checks(c64), .failures(f64), .full_ripples(r64), .done(d64));

  initial begin : watchdog
    #((CYCLES + 50) * 10);
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks + c16 + c32 + c64,
             failures + f16 + f32 + f64 + 1);
    $finish;
  end

  initial begin
    #1 rst_n = 1'b0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    wait (d16 && d32 && d64);
    checks++;
    if (r16 == 0 || r32 == 0 || r64 == 0) begin
      failures++;
      $display("FAIL: a lane never ran a full-length carry chain");
    end
    $display("W=16: %0d checks, W=32: %0d checks, W=64: %0d checks", c16, c32, c64);
    $display("TB_RESULT checks=%0d failures=%0d", checks + c16 + c32 + c64,
             failures + f16 + f32 + f64);
    $finish;
  end

endmodule
