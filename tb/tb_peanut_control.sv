// tb_peanut_control: self-checking test of the control unit.
// The testbench plays the datapath's part for CI: when the unit asserts
// ci_ld, CI takes the next instruction of a random stream (LOAD in each mode,
// other opcodes, indexed/stack and unused modes). For every instruction the
// testbench builds the expected cycle-by-cycle list of control lines from the
// step table of the execution cycle and compares it with what the unit
// drives, so the cycle count of each kind of instruction is checked too.
// It also checks that nothing moves while run is low.
module tb_peanut_control;
  import peanut_pkg::*;

  typedef struct packed {
    ctl_t ctl;
    logic done;
    logic unimpl;
  } step_t;

  logic   clk = 0, rst_n = 0, run = 0;
  word_t  ci;
  ctl_t   ctl;
  state_e state;
  logic   instr_done, unimpl;
  int checks = 0, failures = 0;
  int n_imm = 0, n_dir = 0, n_ind = 0, n_unimpl = 0;

  peanut_control dut (.clk, .rst_n, .run, .ci, .ctl, .state, .instr_done, .unimpl);

  always #5 clk = ~clk;

  function automatic step_t mk(logic pc_inc, logic mar_ld, mar_src_e src, logic en,
                               logic mdr_ld, logic ci_ld, logic ac_ld, ac_src_e acs,
                               logic done, logic unimp);
    step_t s;
    s.ctl.pc_inc = pc_inc; s.ctl.mar_ld = mar_ld; s.ctl.mar_src = src;
    s.ctl.mem_en = en;     s.ctl.mem_rw = 1'b1;   s.ctl.mdr_ld = mdr_ld;
    s.ctl.ci_ld = ci_ld;   s.ctl.ac_ld = ac_ld;   s.ctl.ac_src = acs;
    s.done = done; s.unimpl = unimp;
    return s;
  endfunction

  // Expected control lines, one entry per cycle, for instruction w.
  function automatic void expect_steps(word_t w, ref step_t q[$]);
    logic [2:0] mode, op;
    mode = w[15:13]; op = w[12:10];
    q.delete();
    q.push_back(mk(1,0,MAR_PC_M1,0,0,0,0,AC_FROM_IMM,0,0));   // PC <- PC+1
    q.push_back(mk(0,1,MAR_PC_M1,0,0,0,0,AC_FROM_IMM,0,0));   // MAR <- PC-1
    q.push_back(mk(0,0,MAR_PC_M1,1,1,0,0,AC_FROM_IMM,0,0));   // MDR <- mem
    q.push_back(mk(0,0,MAR_PC_M1,0,0,1,0,AC_FROM_IMM,0,0));   // CI <- MDR
    if (op != 3'b001 || mode > 3'b010) begin
      q.push_back(mk(0,0,MAR_PC_M1,0,0,0,0,AC_FROM_IMM,1,1)); // skipped
      return;
    end
    q.push_back(mk(0,0,MAR_PC_M1,0,0,0,0,AC_FROM_IMM,0,0));   // decode
    if (mode == 3'b000) begin
      q.push_back(mk(0,0,MAR_PC_M1,0,0,0,1,AC_FROM_IMM,1,0));
      return;
    end
    q.push_back(mk(0,1,MAR_OPSPEC,0,0,0,0,AC_FROM_IMM,0,0));
    q.push_back(mk(0,0,MAR_PC_M1,1,1,0,0,AC_FROM_IMM,0,0));
    if (mode == 3'b010) begin
      q.push_back(mk(0,1,MAR_MDR,0,0,0,0,AC_FROM_IMM,0,0));
      q.push_back(mk(0,0,MAR_PC_M1,1,1,0,0,AC_FROM_IMM,0,0));
    end
    q.push_back(mk(0,0,MAR_PC_M1,0,0,0,1,AC_FROM_MDR,1,0));
  endfunction

  function automatic word_t rand_instr();
    int k;
    logic [2:0] mode, op;
    k = int'($urandom_range(9));
    mode = (k < 3) ? 3'(k) : 3'($urandom);
    op   = (k < 7) ? 3'b001 : 3'($urandom);
    return {mode, op, 10'($urandom)};
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    step_t q[$];
    step_t got;
    word_t next;
    ci = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // run low: the unit must wait.
    repeat (3) begin
      @(negedge clk);
      checks++;
      if (ctl != ctl_t'({1'b0, 1'b0, MAR_PC_M1, 1'b0, 1'b1, 1'b0, 1'b0, 1'b0, AC_FROM_IMM}) ||
          state != S_PC_INC) begin
        failures++; $display("FAIL unit moved while run low");
      end
    end
    @(negedge clk);
    run = 1;
    for (int i = 0; i < 400; i++) begin
      next = rand_instr();
      expect_steps(next, q);
      foreach (q[c]) begin
        // sample in the second half of the cycle
        #1;
        got.ctl = ctl; got.done = instr_done; got.unimpl = unimpl;
        checks++;
        if (got !== q[c]) begin
          failures++;
          if (failures < 10)
            $display("FAIL instr %h cycle %0d: got %b expected %b (state %s)",
                     next, c, got, q[c], state.name());
        end
        @(posedge clk);
        if (ctl.ci_ld) ci <= next;
        @(negedge clk);
      end
      if (next[12:10] != 3'b001 || next[15:13] > 3'b010) n_unimpl++;
      else if (next[15:13] == 3'b000) n_imm++;
      else if (next[15:13] == 3'b001) n_dir++;
      else n_ind++;
    end
    checks++;
    if (n_imm == 0 || n_dir == 0 || n_ind == 0 || n_unimpl == 0) begin
      failures++; $display("FAIL some instruction kind never ran");
    end
    $display("immediate=%0d direct=%0d indirect=%0d skipped=%0d", n_imm, n_dir, n_ind, n_unimpl);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
