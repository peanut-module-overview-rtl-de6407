// peanut_addr_adder: the adder in front of MAR.
//
// Every address the CPU loads into MAR passes through this adder. Its result
// is a + b modulo 2^AW, so adding all ones subtracts one. The control unit
// uses it to form PC - 1 for the instruction fetch (PC has already been
// incremented) and, with b = 0, to pass an operand address from the operand
// specifier or from MDR. Purely combinational.
//
// The adder and its place in front of MAR follow the PeANUt block diagram;
// which addends it is given in each step is this design's choice.
module peanut_addr_adder #(
  parameter int unsigned AW = 10
) (
  input  logic [AW-1:0] a,
  input  logic [AW-1:0] b,
  output logic [AW-1:0] sum
);

  assign sum = a + b;

endmodule
