// Self-checking testbench of ripple_carry_adder.
//
// The 8-bit default instance is checked exhaustively: every a, b and cin
// (2^17 vectors) against the integer sum a + b + cin. A 16-bit instance is
// checked with random operands plus the carry-chain corner cases (all ones
// plus carry in, alternating bits). The adder is combinational, so each
// vector is applied and compared one time step later.
module tb_ripple_carry_adder;

  localparam int unsigned W8  = 8;
  localparam int unsigned W16 = 16;

  logic [W8-1:0]  a8, b8, s8;
  logic           ci8, co8;
  logic [W16-1:0] a16, b16, s16;
  logic           ci16, co16;

  int unsigned checks = 0;
  int unsigned failures = 0;

  ripple_carry_adder dut8 (
    .a(a8), .b(b8), .cin(ci8), .sum(s8), .cout(co8)
  );

  ripple_carry_adder #(.WIDTH(W16)) dut16 (
    .a(a16), .b(b16), .cin(ci16), .sum(s16), .cout(co16)
  );

  task automatic check16(input logic [W16-1:0] x, input logic [W16-1:0] y, input logic c);
    logic [W16:0] exp;
    a16 = x; b16 = y; ci16 = c;
    #1;
    exp = {1'b0, x} + {1'b0, y} + {{W16{1'b0}}, c};
    checks++;
    if ({co16, s16} !== exp) begin
      failures++;
      $display("FAIL w16: %h + %h + %b = %b_%h, expected %h", x, y, c, co16, s16, exp);
    end
  endtask

  initial begin : watchdog
    #5_000_000;
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int unsigned exp;
    a16 = '0; b16 = '0; ci16 = 1'b0;
    for (int x = 0; x < (1 << W8); x++) begin
      for (int y = 0; y < (1 << W8); y++) begin
        for (int c = 0; c < 2; c++) begin
          a8 = W8'(x); b8 = W8'(y); ci8 = 1'(c);
          #1;
          exp = x + y + c;
          checks++;
          if ({co8, s8} !== 9'(exp)) begin
            failures++;
            if (failures < 10)
              $display("FAIL w8: %0d + %0d + %0d = %0d, expected %0d",
                       x, y, c, {co8, s8}, exp);
          end
        end
      end
    end

    check16('1, '0, 1'b1);          // carry ripples through all 16 stages
    check16('1, '1, 1'b1);
    check16(16'h5555, 16'haaaa, 1'b0);
    check16(16'h5555, 16'haaaa, 1'b1);
    check16(16'h8000, 16'h8000, 1'b0);
    for (int i = 0; i < 2000; i++)
      check16(W16'($urandom), W16'($urandom), 1'($urandom));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
