// peanut_cpu: the PeANUt central processing unit.
//
// Holds the registers PSW (condition codes CC in bits 15-10, program counter
// PC in bits 9-0), AC (accumulator), SP (stack pointer), XR (index register),
// CI (current instruction), MAR (memory address register) and MDR (memory
// data register), and the control unit that steps them through the execution
// cycle. MAR drives the memory's address lines, MDR its data lines, and the
// control unit its Read/Write and Enable lines. Every address reaches MAR
// through the address adder.
//
// Interface: connect mem_* to a peanut_memory (combinational read). regs
// shows every register; instr_done marks the last cycle of an instruction and
// unimpl an instruction that was skipped. Timing: LOAD takes 6, 8 or 10
// cycles in immediate, direct or indirect mode (see peanut_control).
//
// The register set, the PSW layout and the fetch path follow the PeANUt
// definition. This design decodes LOAD only, moving the operand straight to
// AC; the ALU is not built because its operations are not defined, so CC
// keeps its reset value, and SP and XR are never written. All registers reset
// to zero and PC to RESET_PC (synchronous, active-low); these are this
// design's choices. No memory write is ever issued, as no store instruction is
// defined; mem_wdata still carries MDR.
module peanut_cpu
  import peanut_pkg::*;
#(
  parameter addr_t RESET_PC = '0
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  run,
  output addr_t mem_addr,
  output word_t mem_wdata,
  input  word_t mem_rdata,
  output logic  mem_rw,
  output logic  mem_en,
  output regs_t regs,
  output logic  instr_done,
  output logic  unimpl
);

  psw_t  psw;
  word_t ac, sp, xr, ci, mdr;
  addr_t mar;

  ctl_t   ctl;
  state_e state;
  instr_t ins;
  addr_t  add_a, add_b, add_sum;

  assign ins = instr_t'(ci);

  peanut_control u_ctl (
    .clk, .rst_n, .run,
    .ci,
    .ctl,
    .state,
    .instr_done,
    .unimpl
  );

  always_comb begin
    unique case (ctl.mar_src)
      MAR_PC_M1:  begin add_a = psw.pc;        add_b = '1; end
      MAR_OPSPEC: begin add_a = ins.opspec;    add_b = '0; end
      MAR_MDR:    begin add_a = mdr[AW-1:0];   add_b = '0; end
      default:    begin add_a = '0;            add_b = '0; end
    endcase
  end

  peanut_addr_adder #(.AW(AW)) u_add (.a(add_a), .b(add_b), .sum(add_sum));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      psw <= '{cc: '0, pc: RESET_PC};
      ac  <= '0;
      sp  <= '0;
      xr  <= '0;
      ci  <= '0;
      mar <= '0;
      mdr <= '0;
    end else begin
      if (ctl.pc_inc) psw.pc <= psw.pc + 1'b1;
      if (ctl.mar_ld) mar    <= add_sum;
      if (ctl.mdr_ld) mdr    <= mem_rdata;
      if (ctl.ci_ld)  ci     <= mdr;
      if (ctl.ac_ld)  ac     <= (ctl.ac_src == AC_FROM_IMM) ? sext_opspec(ins.opspec) : mdr;
    end
  end

  assign mem_addr  = mar;
  assign mem_wdata = mdr;
  assign mem_rw    = ctl.mem_rw;
  assign mem_en    = ctl.mem_en;

  assign regs = '{psw: psw, ac: ac, sp: sp, xr: xr, ci: ci, mar: mar, mdr: mdr};

endmodule
