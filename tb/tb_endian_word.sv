// tb_endian_word: self-checking test of the byte-order interpreter.
// Uses the sequence 01 02 03 04 (expected 01020304 big-endian, 04030201
// little-endian) and random sequences checked against a byte-by-byte
// reference computed with shifts.
module tb_endian_word;
  logic [7:0]  bytes [4];
  logic        big_endian;
  logic [31:0] value;
  int checks = 0, failures = 0;

  endian_word #(.NBYTES(4)) dut (.bytes, .big_endian, .value);

  task automatic check(input logic [31:0] exp, input string what);
    #1;
    checks++;
    if (value !== exp) begin
      failures++;
      $display("FAIL %s: value=%h expected %h", what, value, exp);
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
    logic [31:0] be, le;
    bytes = '{8'h01, 8'h02, 8'h03, 8'h04};
    big_endian = 1'b1; check(32'h01020304, "example big-endian");
    big_endian = 1'b0; check(32'h04030201, "example little-endian");
    for (int i = 0; i < 300; i++) begin
      be = 0; le = 0;
      for (int k = 0; k < 4; k++) begin
        bytes[k] = 8'($urandom);
        be = (be << 8) | 32'(bytes[k]);
        le = le | (32'(bytes[k]) << (8 * k));
      end
      big_endian = 1'b1; check(be, "random big-endian");
      big_endian = 1'b0; check(le, "random little-endian");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
