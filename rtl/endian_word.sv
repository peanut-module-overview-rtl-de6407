// endian_word: interprets a sequence of NBYTES bytes as one integer.
//
// bytes[0] is the byte at the lowest address. In big-endian order the 0th
// byte becomes the most significant byte of the result; in little-endian
// order the last byte does. For the sequence 01 02 03 04 the result is
// 32'h01020304 big-endian and 32'h04030201 little-endian. Purely
// combinational: value follows bytes and big_endian in the same cycle.
//
// The two interpretations are the standard definitions of byte order; the
// mode input and the combinational form are this design's choices.
module endian_word #(
  parameter int unsigned NBYTES = 4
) (
  input  logic [7:0]          bytes [NBYTES],
  input  logic                big_endian,
  output logic [8*NBYTES-1:0] value
);

  always_comb begin
    for (int i = 0; i < NBYTES; i++) begin
      if (big_endian) value[8*(NBYTES-1-i) +: 8] = bytes[i];
      else            value[8*i +: 8]            = bytes[i];
    end
  end

endmodule
