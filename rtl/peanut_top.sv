// peanut_top: the PeANUt computer, with a byte-order interpreter beside it.
//
// The computer is a peanut_cpu joined to a 1024 x 16 peanut_memory: MAR on
// the address lines, MDR on the data lines, the control unit on Read/Write
// and Enable. While run is low the CPU waits at the start of a fetch and the
// load port (ld_en, ld_addr, ld_data) may write words into memory, one per
// clock; this is how a program and its data are placed before run is raised.
// While run is high the load port is ignored. mdr is brought out where an
// input/output unit would attach to MDR. regs, instr_done and unimpl show the
// CPU's state.
//
// The byte-order interpreter (endian_word) is independent of the computer:
// bytes and big_endian in, value out, combinational.
//
// The CPU-memory connection follows the PeANUt block diagram. The load port
// and the run input are this design's own: how programs enter memory is not
// part of the PeANUt definition used here.
module peanut_top
  import peanut_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        run,
  // load port, used while run = 0
  input  logic        ld_en,
  input  addr_t       ld_addr,
  input  word_t       ld_data,
  // CPU observation
  output regs_t       regs,
  output word_t       mdr,
  output logic        instr_done,
  output logic        unimpl,
  // byte-order interpreter
  input  logic [7:0]  bytes [4],
  input  logic        big_endian,
  output logic [31:0] value
);

  addr_t cpu_addr, m_addr;
  word_t cpu_wdata, m_wdata, m_rdata;
  logic  cpu_rw, cpu_en, m_rw, m_en;
  logic  loading;

  peanut_cpu u_cpu (
    .clk, .rst_n, .run,
    .mem_addr  (cpu_addr),
    .mem_wdata (cpu_wdata),
    .mem_rdata (m_rdata),
    .mem_rw    (cpu_rw),
    .mem_en    (cpu_en),
    .regs,
    .instr_done,
    .unimpl
  );

  assign loading = !run && ld_en;
  assign m_addr  = loading ? ld_addr : cpu_addr;
  assign m_wdata = loading ? ld_data : cpu_wdata;
  assign m_rw    = loading ? 1'b0    : cpu_rw;
  assign m_en    = loading || cpu_en;

  peanut_memory #(.AW(AW), .DW(DW)) u_mem (
    .clk,
    .addr  (m_addr),
    .wdata (m_wdata),
    .rdata (m_rdata),
    .rw    (m_rw),
    .en    (m_en)
  );

  assign mdr = regs.mdr;

  endian_word #(.NBYTES(4)) u_endian (.bytes, .big_endian, .value);

endmodule
