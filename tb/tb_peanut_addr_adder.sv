// tb_peanut_addr_adder: self-checking test of the MAR address adder.
// Checks PC - 1 at the ends of the address range, passing an address with a
// zero addend, and random sums against (a + b) mod 1024.
module tb_peanut_addr_adder;
  localparam int unsigned AW = 10;
  logic [AW-1:0] a, b, sum;
  int checks = 0, failures = 0;

  peanut_addr_adder #(.AW(AW)) dut (.a, .b, .sum);

  task automatic check(input logic [AW-1:0] x, input logic [AW-1:0] y);
    int exp;
    a = x; b = y;
    #1;
    exp = (int'(x) + int'(y)) % (1 << AW);
    checks++;
    if (int'(sum) != exp) begin
      failures++;
      $display("FAIL a=%0d b=%0d sum=%0d expected %0d", x, y, sum, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check(10'd1, '1);      // PC - 1 with PC = 1 -> 0
    check(10'd0, '1);      // wraps to 1023
    check(10'd1023, '1);
    check(10'd16, '0);     // opspec passed through
    for (int i = 0; i < 500; i++) check(AW'($urandom), AW'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
