// peanut_memory: the PeANUt main memory, CELLS words of DW bits.
//
// The memory holds programs and data alike. It has three groups of lines:
// address lines (from MAR), data lines (to and from MDR) and two control
// lines, Read/Write and Enable. To read, the CPU places the address and raises
// Enable with rw = 1; the addressed word appears on rdata in the same cycle
// and the CPU latches it into MDR at the clock edge. To write, the CPU places
// address and data and raises Enable with rw = 0; the word is stored at the
// clock edge ending that cycle.
//
// Size (1024 cells of 16 bits, 10 address lines) and the control lines follow
// the PeANUt definition. Splitting the bidirectional data lines into wdata and
// rdata, the rw polarity, the combinational read and rdata = 0 while not
// reading are this design's choices. The array has no reset.
module peanut_memory #(
  parameter int unsigned AW    = 10,
  parameter int unsigned DW    = 16,
  parameter int unsigned CELLS = 1 << AW
) (
  input  logic          clk,
  input  logic [AW-1:0] addr,
  input  logic [DW-1:0] wdata,
  output logic [DW-1:0] rdata,
  input  logic          rw,      // 1 = Read, 0 = Write
  input  logic          en
);

  logic [DW-1:0] mem [CELLS];

  always_ff @(posedge clk) begin
    if (en && !rw && (int'(addr) < CELLS)) mem[addr] <= wdata;
  end

  always_comb begin
    rdata = '0;
    if (en && rw && (int'(addr) < CELLS)) rdata = mem[addr];
  end

endmodule
