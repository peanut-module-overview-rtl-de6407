// peanut_control: the PeANUt control unit.
//
// A state machine that runs the execution cycle one step per clock:
//
//   S_PC_INC     PC <- PC + 1
//   S_FETCH_MAR  MAR <- PC - 1 (through the address adder)
//   S_FETCH_RD   Read, Enable; MDR <- mem[MAR]
//   S_CI         CI <- MDR
//   S_DECODE     decode CI: mode and opcode
//   S_OP_MAR     MAR <- opspec                    (direct, indirect)
//   S_OP_RD      Read, Enable; MDR <- mem[MAR]    (direct, indirect)
//   S_IND_MAR    MAR <- MDR                       (indirect)
//   S_IND_RD     Read, Enable; MDR <- mem[MAR]    (indirect)
//   S_EXEC       AC <- operand; instr_done
//
// so LOAD takes 6 cycles in immediate mode, 8 in direct and 10 in indirect.
// An instruction whose opcode is not LOAD, or whose mode is not immediate,
// direct or indirect, is skipped: S_DECODE pulses unimpl and instr_done and
// returns to S_PC_INC (5 cycles). While run is low the unit waits in
// S_PC_INC and drives no control line. Reset (rst_n low, synchronous) also
// returns it to S_PC_INC.
//
// The fetch sequence and the three addressing modes follow the PeANUt
// definition. One cycle per step, skipping undecoded instructions and the
// run input are this design's choices; the exception service step is left
// out because the exception unit is not defined.
module peanut_control
  import peanut_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   run,
  input  word_t  ci,
  output ctl_t   ctl,
  output state_e state,
  output logic   instr_done,
  output logic   unimpl
);

  instr_t ins;
  logic   decodable;
  state_e state_q, state_d;

  assign ins       = instr_t'(ci);
  assign decodable = (ins.opcode == OP_LOAD) &&
                     (ins.mode inside {MODE_IMMEDIATE, MODE_DIRECT, MODE_INDIRECT});
  assign state     = state_q;

  always_ff @(posedge clk) begin
    if (!rst_n) state_q <= S_PC_INC;
    else        state_q <= state_d;
  end

  always_comb begin
    ctl        = '0;
    ctl.mem_rw = 1'b1;
    state_d    = state_q;
    instr_done = 1'b0;
    unimpl     = 1'b0;
    unique case (state_q)
      S_PC_INC: begin
        if (run) begin
          ctl.pc_inc = 1'b1;
          state_d    = S_FETCH_MAR;
        end
      end
      S_FETCH_MAR: begin
        ctl.mar_ld  = 1'b1;
        ctl.mar_src = MAR_PC_M1;
        state_d     = S_FETCH_RD;
      end
      S_FETCH_RD: begin
        ctl.mem_en = 1'b1;
        ctl.mdr_ld = 1'b1;
        state_d    = S_CI;
      end
      S_CI: begin
        ctl.ci_ld = 1'b1;
        state_d   = S_DECODE;
      end
      S_DECODE: begin
        if (!decodable) begin
          unimpl     = 1'b1;
          instr_done = 1'b1;
          state_d    = S_PC_INC;
        end else if (ins.mode == MODE_IMMEDIATE) begin
          state_d = S_EXEC;
        end else begin
          state_d = S_OP_MAR;
        end
      end
      S_OP_MAR: begin
        ctl.mar_ld  = 1'b1;
        ctl.mar_src = MAR_OPSPEC;
        state_d     = S_OP_RD;
      end
      S_OP_RD: begin
        ctl.mem_en = 1'b1;
        ctl.mdr_ld = 1'b1;
        state_d    = (ins.mode == MODE_INDIRECT) ? S_IND_MAR : S_EXEC;
      end
      S_IND_MAR: begin
        ctl.mar_ld  = 1'b1;
        ctl.mar_src = MAR_MDR;
        state_d     = S_IND_RD;
      end
      S_IND_RD: begin
        ctl.mem_en = 1'b1;
        ctl.mdr_ld = 1'b1;
        state_d    = S_EXEC;
      end
      S_EXEC: begin
        ctl.ac_ld  = 1'b1;
        ctl.ac_src = (ins.mode == MODE_IMMEDIATE) ? AC_FROM_IMM : AC_FROM_MDR;
        instr_done = 1'b1;
        state_d    = S_PC_INC;
      end
      default: state_d = S_PC_INC;
    endcase
  end

  // CI must not change while an instruction is being carried out.
  a_ci_stable: assert property (@(posedge clk) disable iff (!rst_n)
    (state_q inside {S_DECODE, S_OP_MAR, S_OP_RD, S_IND_MAR, S_IND_RD}) |=> $stable(ci));

endmodule
